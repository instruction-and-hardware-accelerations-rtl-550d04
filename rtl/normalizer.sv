// normalizer: the NORM_S / NORM_L operation, the number of left shifts that
// bring a signed value to the form where the bit below the sign bit differs
// from the sign bit.
//
// With long_mode = 0 the low 16 bits of `v` are examined (result 0..15), with
// long_mode = 1 all 32 bits (result 0..31). A value of 0 gives 0 and a value
// of -1 gives 15 or 31, as in the fixed-point reference operators. The count
// is formed combinationally by a priority search for the first bit that
// differs from the sign bit (a leading-one/leading-zero counter).
//
// That normalization deserves a hardware instruction is the document's point;
// the implementation is this design's choice.
module normalizer
  import g72x_pkg::*;
(
  input  logic [LW-1:0] v,
  input  logic          long_mode,
  output logic [4:0]    norm
);

  logic [LW-1:0] w;
  logic          s;

  always_comb begin
    w    = long_mode ? v : {v[DW-1:0], {DW{v[DW-1]}}};
    s    = w[LW-1];
    norm = '0;
    if (long_mode ? (v == '0) : (v[DW-1:0] == '0)) begin
      norm = '0;
    end else begin
      norm = long_mode ? 5'd31 : 5'd15;
      for (int i = LW-2; i >= 0; i--) begin
        if (w[i] != s) begin
          norm = 5'(LW-2-i);
          break;
        end
      end
    end
  end

endmodule
