// offset_calc: table offset |loop counter - REG| for the fetch of a
// correlation value whose index is the distance between two pulse positions.
//
// REG holds a value that stays constant over a loop (the previous pulse
// position). The first adder adds the loop counter and the inverted REG with
// a carry in of one, giving loop_counter - REG. The sign bit (MSB) of that
// difference selects the difference or its bit inverse, and the second adder
// adds the MSB back in, which completes the two's complement negation, so the
// output is the absolute value. The block is purely combinational; its
// output feeds the offset input of the address generator.
//
// Both operands are treated as signed W-bit values; the absolute value is
// taken of the W-bit difference, which is exact while |lc - ref| < 2**(W-1)
// (the codebook loop keeps both below 60).
//
// The adder with the inverted REG, the MSB-controlled multiplexer with the
// inverter and the final adder follow the document's figure; the carry-in of
// one on the first adder and the width are this design's choices.
module offset_calc #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] loop_count,
  input  logic [W-1:0] ref_val,
  output logic [W-1:0] offset
);

  logic [W-1:0] diff, sel;
  logic         msb;

  always_comb begin
    diff   = loop_count + ~ref_val + W'(1);
    msb    = diff[W-1];
    sel    = msb ? ~diff : diff;
    offset = sel + W'(msb);
  end

endmodule
