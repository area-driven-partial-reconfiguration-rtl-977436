// seu_pkg: types and constants shared by the area-driven SEU mitigation design.
//
// The case study is the polynomial F(x) = 3x^2 + 5x + 5, evaluated in Horner
// form ((3x + 5) * x) + 5 by four operators on 16-bit integers. The four
// operators are the modules that the reconfigurable checker can host one at a
// time. Their area weights decide how long each one is checked; the bitstream
// sizes are those of the built reconfigurable design (full design and the
// checker partition alone). Operator widths, coefficients and bitstream sizes
// follow the published design; the area weights and the operator encoding are
// this design's own choice (see area_scheduler).
package seu_pkg;

  localparam int unsigned DATA_W = 16;
  typedef logic [DATA_W-1:0] word_t;

  // Operators of the polynomial datapath, in dataflow order.
  localparam int unsigned N_OPS = 4;
  typedef enum logic [1:0] {
    OP_CMUL = 2'd0,   // x * 3
    OP_ADD1 = 2'd1,   // (3x) + 5
    OP_MUL  = 2'd2,   // (3x + 5) * x
    OP_ADD2 = 2'd3    // (...) + 5
  } op_e;

  localparam int unsigned COEF_MUL  = 3;
  localparam int unsigned COEF_ADD1 = 5;
  localparam int unsigned COEF_ADD2 = 5;

  // Latency of the polynomial pipeline: every operator registers its result.
  localparam int unsigned POLY_LATENCY = 4;

  // Internal nodes of the datapath, as seen by the checker's input and output
  // multiplexers.
  typedef struct packed {
    word_t x;      // pipeline input
    word_t x_d2;   // input delayed by two stages (second multiplier operand)
    word_t m3;     // output of x * 3
    word_t a1;     // output of + 5
    word_t p;      // output of the two-input multiplier
    word_t y;      // output of the final + 5
  } poly_taps_t;

  // Area weights of the four operators, in LUTs. The adders and the
  // constant multiplier are taken as 16 LUTs (one per bit); the two-input
  // multiplier as 113 LUTs more, the spread between the smallest and the
  // largest checker contents of the built design (509 to 622 LUTs).
  localparam int unsigned AREA_CMUL = 16;
  localparam int unsigned AREA_ADD1 = 16;
  localparam int unsigned AREA_MUL  = 129;
  localparam int unsigned AREA_ADD2 = 16;

  // Bitstream sizes of the reconfigurable design, in bytes.
  localparam int unsigned FULL_BITSTREAM_BYTES = 17651;
  localparam int unsigned RP_BITSTREAM_BYTES   = 5296;

  // Kind of reconfiguration the scheduler asks for.
  typedef enum logic {
    PR_MODULE = 1'b0,  // load one operator into the checker partition
    PR_SCRUB  = 1'b1   // rewrite the whole design (on-demand scrub)
  } pr_kind_e;

endpackage
