// max16: the 16-bit "amax" / "max" instruction.
//
// amax (abs_en = 1): b <= max(|a|, b), with |a| saturating, so |-32768| is
// 32767. max (abs_en = 0): b <= max(a, b). The comparison is signed and
// strict: the new value replaces b only when it is greater, which is what the
// merged "if (a > b) b = a" sequence does. `upd` tells whether b was
// replaced. The unit is combinational; the result is written back to b's
// register by the surrounding register file.
//
// The two instructions and their behaviour are the document's; the
// implementation (an absolute-value stage and a comparator) is the simplest
// that performs them.
module max16
  import g72x_pkg::*;
(
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic                 abs_en,
  output logic signed [DW-1:0] result,
  output logic                 upd
);

  logic signed [DW-1:0] a_abs, cand;

  always_comb begin
    if (a == MIN_16)   a_abs = MAX_16;
    else if (a < 0)    a_abs = -a;
    else               a_abs = a;
    cand   = abs_en ? a_abs : a;
    upd    = cand > b;
    result = upd ? cand : b;
  end

endmodule
