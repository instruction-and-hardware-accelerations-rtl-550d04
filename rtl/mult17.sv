// mult17: the multiplier branch of the MAC datapath (operand registers R1 and
// R2, a 17x17 signed multiplier, product register R3 and the guard stage).
//
// The 16-bit x word (from the data memory) and y word (from the coefficient
// memory) are widened to 17 bits, either sign-extended or zero-extended, so
// that one signed 17x17 array serves signed and unsigned (double-precision
// low half) operands. With `sq` set, the x word is fed to both inputs, as an
// autocorrelation needs. The 33-bit product is registered in R3 and then
// sign-extended to the 38-bit accumulator width by the guard stage. In
// fractional mode the guard stage also shifts the product left one bit; the
// one product that then overflows 32 bits (-32768 * -32768, both signed) is
// saturated to 0x7fffffff so results match the 16-bit fixed-point reference
// arithmetic. In integer mode the product is used unshifted.
//
// Timing: operands presented with in_valid at clock edge k are in R1/R2 after
// edge k, the product is in R3 after edge k+1, and `p`/`out_valid` show it
// during the following cycle, so an accumulator can add it at edge k+2. One
// new operand pair can be accepted every cycle.
//
// R1, R2, the 17x17 size, the 33-bit R3 and the guard to 38 bits follow the
// block diagram; the placement of the fractional shift and its saturation in
// the guard stage is this design's choice.
module mult17
  import g72x_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] y,
  input  logic                 x_uns,
  input  logic                 y_uns,
  input  logic                 sq,
  input  logic                 frac,
  output logic                 out_valid,
  output logic signed [AW-1:0] p
);

  logic signed [MW-1:0] r1, r2;
  logic signed [PW-1:0] r3;
  logic                 v1, v3;
  logic                 frac1, frac3;
  logic                 ovf1, ovf3;   // -32768 * -32768 in fractional signed mode

  logic signed [MW-1:0] x17, y17;
  logic signed [PW-1:0] prod;       // full-precision 17x17 product
  assign prod = r1 * r2;
  always_comb begin
    x17 = x_uns ? $signed({1'b0, x}) : $signed({x[DW-1], x});
    y17 = sq ? x17 : (y_uns ? $signed({1'b0, y}) : $signed({y[DW-1], y}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; r3 <= '0;
      v1 <= 1'b0; v3 <= 1'b0;
      frac1 <= 1'b0; frac3 <= 1'b0;
      ovf1 <= 1'b0; ovf3 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        r1    <= x17;
        r2    <= y17;
        frac1 <= frac;
        ovf1  <= (x17 == -17'sd32768) && (y17 == -17'sd32768);
      end
      v3 <= v1;
      if (v1) begin
        r3    <= prod;
        frac3 <= frac1;
        ovf3  <= ovf1 & frac1;
      end
    end
  end

  // Guard stage: 33 -> 38 bits, with the fractional left shift.
  always_comb begin
    if (ovf3)       p = AW'(MAX_32);
    else if (frac3) p = AW'(r3) <<< 1;
    else            p = AW'(r3);
  end

  assign out_valid = v3;

endmodule
