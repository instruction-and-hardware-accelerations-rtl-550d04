// tb_offset_calc: exhaustive check of |loop_count - ref| over the codebook
// range (both operands 0..63) and a random check over the full 16-bit range
// where the difference stays representable.
module tb_offset_calc;
  localparam int unsigned W = 16;
  logic [W-1:0] loop_count, ref_val, offset;
  int checks = 0, failures = 0;

  offset_calc #(.W(W)) dut (.*);

  task automatic chk(int a, int b);
    int e;
    loop_count = W'(a); ref_val = W'(b);
    #1;
    e = (a > b) ? a - b : b - a;
    checks++;
    if (offset != W'(e)) begin
      failures++; $display("FAIL |%0d-%0d| = %0d exp %0d", a, b, offset, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) chk(a, b);
    for (int i = 0; i < 2000; i++) chk($urandom_range(0, 32767), $urandom_range(0, 32767));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
