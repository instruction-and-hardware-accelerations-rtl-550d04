// agu: address generator with segmentation addressing and offset.
//
// A segment address register holds the base of a table (for example the
// ImrCorr correlation table of the codebook search). One adder forms the next
// address from two selectable inputs: the first is the segment address or the
// step size, the second is the offset or the current address. The result, or
// the held address, is loaded into the address register, whose output is the
// memory address. This gives, in one cycle each:
//   a_sel=0, b_sel=0 : addr <= segment + offset   (segment addressing)
//   a_sel=1, b_sel=1 : addr <= addr + step        (post-modify with step)
//   a_sel=0, b_sel=1 : addr <= segment + addr
//   a_sel=1, b_sel=0 : addr <= step + offset
// With addr_we low the address register holds. With seg_we high the segment
// register loads seg_in (at the same edge; the adder uses the old value).
//
// Timing: the new address appears at `addr` one cycle after the edge that
// loads it; a synchronous memory read with that address returns data one
// cycle later still. Reset clears both registers. Address arithmetic wraps
// modulo 2**AW.
//
// The segment address register, the step-size and offset inputs, the two
// input multiplexers, the adder, the multiplexer before the address register
// and the address register follow the document's offset-calculation figure.
// The select encodings, the width and the reset are this design's choices.
module agu #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          seg_we,
  input  logic [AW-1:0] seg_in,
  input  logic [AW-1:0] step,
  input  logic [AW-1:0] offset,
  input  logic          a_sel,
  input  logic          b_sel,
  input  logic          addr_we,
  output logic [AW-1:0] seg,
  output logic [AW-1:0] addr
);

  logic [AW-1:0] a, b, sum;

  always_comb begin
    a   = a_sel ? step : seg;
    b   = b_sel ? addr : offset;
    sum = a + b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg  <= '0;
      addr <= '0;
    end else begin
      if (seg_we)  seg  <= seg_in;
      if (addr_we) addr <= sum;
    end
  end

endmodule
