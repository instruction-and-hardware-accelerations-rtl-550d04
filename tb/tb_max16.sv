// tb_max16: exhaustive corner values and random operands for the max and
// amax instructions, checked against "a = abs_s(a); if (a > b) b = a".
module tb_max16;
  import g72x_pkg::*;
  logic signed [DW-1:0] a, b, result;
  logic abs_en, upd;
  int checks = 0, failures = 0;

  max16 dut (.*);

  task automatic chk(logic signed [15:0] va, logic signed [15:0] vb, bit ab);
    int c, e;
    a = va; b = vb; abs_en = ab;
    #1;
    c = ab ? ((va == -16'sd32768) ? 32767 : (va < 0 ? -int'(va) : int'(va))) : int'(va);
    e = (c > int'(vb)) ? c : int'(vb);
    checks++;
    if (int'(result) != e || upd != (c > int'(vb))) begin
      failures++; $display("FAIL a=%0d b=%0d abs=%0b got %0d exp %0d", va, vb, ab, result, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] cv[6] = '{-16'sd32768, -16'sd1, 16'sd0, 16'sd1, 16'sd32767, -16'sd32767};
    foreach (cv[i]) foreach (cv[j]) begin chk(cv[i], cv[j], 0); chk(cv[i], cv[j], 1); end
    for (int i = 0; i < 3000; i++) chk($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
