// g72x_pkg: widths, operation encodings and small saturating helpers shared by
// the speech-coder acceleration datapath.
//
// The data memory, coefficient memory and multiplier operands are 16 bits
// wide, the multiplier is 17x17 with a 33-bit product, and the accumulator
// path carries 38 bits (32 bits plus guard bits); these numbers are printed on
// the block diagram this design follows. The operation encodings, the
// control-word layout and the saturation helpers (which follow the usual
// 16/32-bit fixed-point speech-coder arithmetic) are this design's own choices.
package g72x_pkg;

  localparam int unsigned DW   = 16;  // data / coefficient word
  localparam int unsigned MW   = 17;  // multiplier operand width
  localparam int unsigned PW   = 33;  // multiplier product width
  localparam int unsigned LW   = 32;  // long word
  localparam int unsigned AW   = 38;  // accumulator width incl. guard bits

  localparam logic signed [LW-1:0] MAX_32 = 32'sh7fff_ffff;
  localparam logic signed [LW-1:0] MIN_32 = 32'sh8000_0000;
  localparam logic signed [DW-1:0] MAX_16 = 16'sh7fff;
  localparam logic signed [DW-1:0] MIN_16 = 16'sh8000;

  // Datapath operations (mac_cmove_dp).
  typedef enum logic [2:0] {
    DP_NOP  = 3'd0,
    DP_LDH  = 3'd1,  // ACRd <= sign-extended data word in the high half
    DP_LDL  = 3'd2,  // ACRd[15:0] <= data word, upper bits kept
    DP_MUL  = 3'd3,  // ACRd <= product
    DP_MAC  = 3'd4,  // ACRd <= ACRd + product
    DP_MSU  = 3'd5,  // ACRd <= ACRd - product
    DP_CMOV = 3'd6,  // 32-bit conditional move with loop index
    DP_CLR  = 3'd7   // ACRd <= 0
  } dp_op_e;

  // One datapath instruction, issued in a single cycle.
  typedef struct packed {
    dp_op_e      op;
    logic        dst;     // 0: ACR1, 1: ACR2 (for CMOV: register that receives the larger value)
    logic        frac;    // 1: fractional product (shifted left one bit), 0: integer
    logic        sq;      // 1: x operand fed to both multiplier inputs (autocorrelation)
    logic        x_uns;   // x operand is unsigned (17th bit zero)
    logic        y_uns;   // y operand is unsigned
    logic        sat;     // saturate the result to 32 bits
    logic        abs_en;  // CMOV: take |ACR1| first
    logic        ge;      // CMOV: move on '>=' instead of '>'
    logic        idx_st;  // CMOV: store the loop index when the move happens
  } dp_ctrl_t;

  localparam dp_ctrl_t DP_CTRL_NOP = '{op: DP_NOP, default: 1'b0};

  // Saturate a guarded accumulator value to the signed 32-bit range.
  function automatic logic signed [AW-1:0] sat32(input logic signed [AW-1:0] v);
    if (v > AW'(MAX_32))      return AW'(MAX_32);
    else if (v < AW'(MIN_32)) return AW'(MIN_32);
    else                      return v;
  endfunction

  // Sign-extend a 32-bit value into the accumulator width (guard bits).
  function automatic logic signed [AW-1:0] guard32(input logic signed [LW-1:0] v);
    return AW'(v);
  endfunction

endpackage
