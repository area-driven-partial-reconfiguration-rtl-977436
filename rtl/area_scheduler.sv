// area_scheduler: area-driven choice of the operator under check, and
// on-demand scrubbing when the check finds an error.
//
// The operators of the datapath are checked one after the other in cyclic
// order (x*3, +5, x*x, +5, then again). Each one stays in the checker
// partition for AREA[k] * unit_cycles clock cycles, so that an operator is
// watched for a time proportional to its area and the large multiplier,
// where most upsets land, gets most of the attention. Moving on to the next
// operator needs a partial reconfiguration of the partition; a mismatch
// found by the comparator needs a scrub of the whole design. Both are asked
// for on the same request/done handshake, which the reconfiguration engine
// (the HWICAP path) serves:
//
//   pr_req    high from the cycle the request is made until pr_done
//   pr_kind   PR_MODULE (load pr_target into the partition) or PR_SCRUB
//   pr_target operator whose bitstream is to be loaded
//   pr_done   one-cycle pulse from the engine when the bitstream is written
//
// pr_kind and pr_target are stable while pr_req is high. Comparison
// (`cmp_en`) is on only between reconfigurations. After a scrub the same
// operator is checked for what is left of its time: the full bitstream holds
// the partition with its current contents. `enable` low stops the schedule
// after any open request completes.
//
// The cyclic order and the time proportional to area follow the published
// technique; the area weights, the request/done handshake, resuming after a
// scrub and the counters are this design's choices.
module area_scheduler
  import seu_pkg::*;
#(
  parameter int unsigned AREA [N_OPS] = '{AREA_CMUL, AREA_ADD1, AREA_MUL, AREA_ADD2},
  parameter int unsigned CNT_W = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [31:0] unit_cycles,   // cycles of checking per unit of area
  input  logic        dmr_error,
  output op_e         sel,           // drives select input and select output
  output op_e         rp_cfg,        // operator currently in the partition
  output logic        cmp_en,
  output logic        pr_req,
  output pr_kind_e    pr_kind,
  output op_e         pr_target,
  input  logic        pr_done,
  output logic [31:0] n_loads,       // partition reconfigurations done
  output logic [31:0] n_scrubs       // on-demand scrubs done
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_CHECK, S_SCRUB} state_e;
  state_e           state;
  op_e              cur;
  logic [CNT_W-1:0] dwell;

  function automatic logic [CNT_W-1:0] dwell_of(op_e k, logic [31:0] unit);
    logic [CNT_W-1:0] d;
    d = CNT_W'(AREA[k]) * CNT_W'(unit);
    return (d == '0) ? CNT_W'(1) : d;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= OP_CMUL;
      rp_cfg   <= OP_CMUL;
      dwell    <= '0;
      n_loads  <= '0;
      n_scrubs <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (enable) state <= S_LOAD;
        S_LOAD:
          if (pr_done) begin
            rp_cfg  <= cur;
            dwell   <= dwell_of(cur, unit_cycles);
            n_loads <= n_loads + 1'b1;
            state   <= S_CHECK;
          end
        S_CHECK:
          if (!enable) begin
            state <= S_IDLE;
          end else if (dmr_error) begin
            state <= S_SCRUB;
          end else if (dwell <= CNT_W'(1)) begin
            cur   <= op_e'(cur + 2'd1);   // cyclic order, wraps after OP_ADD2
            state <= S_LOAD;
          end else begin
            dwell <= dwell - 1'b1;
          end
        S_SCRUB:
          if (pr_done) begin
            n_scrubs <= n_scrubs + 1'b1;
            state    <= enable ? S_CHECK : S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sel       = cur;
  assign cmp_en    = (state == S_CHECK);
  assign pr_req    = (state == S_LOAD) || (state == S_SCRUB);
  assign pr_kind   = (state == S_SCRUB) ? PR_SCRUB : PR_MODULE;
  assign pr_target = cur;

  // Handshake rules.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pr_req && !pr_done |=> pr_req && $stable(pr_kind) && $stable(pr_target));
  a_no_cmp_during_pr: assert property (@(posedge clk) disable iff (!rst_n)
    !(pr_req && cmp_en));
endmodule
