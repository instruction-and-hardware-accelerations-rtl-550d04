// tb_normalizer: checks NORM_S and NORM_L against a shift-until-normalized
// reference for corner values and random values of every magnitude.
module tb_normalizer;
  import g72x_pkg::*;
  logic [LW-1:0] v;
  logic          long_mode;
  logic [4:0]    norm;
  int checks = 0, failures = 0;

  normalizer dut (.*);

  function automatic int ref_norm(logic [31:0] val, bit lm);
    int n;
    if (lm) begin
      logic signed [31:0] t;
      t = val;
      if (t == 0) return 0;
      if (t == -1) return 31;
      n = 0;
      while (t[31] == t[30]) begin t = t <<< 1; n++; end
      return n;
    end else begin
      logic signed [15:0] t;
      t = val[15:0];
      if (t == 0) return 0;
      if (t == -1) return 15;
      n = 0;
      while (t[15] == t[14]) begin t = t <<< 1; n++; end
      return n;
    end
  endfunction

  task automatic chk(logic [31:0] val, bit lm);
    v = val; long_mode = lm;
    #1;
    checks++;
    if (int'(norm) != ref_norm(val, lm)) begin
      failures++; $display("FAIL v=%h long=%0b got %0d exp %0d", val, lm, norm, ref_norm(val, lm));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(0, 0); chk(0, 1); chk('1, 0); chk('1, 1);
    chk(32'h0000_8000, 0); chk(32'h8000_0000, 1); chk(32'h0000_0001, 0); chk(1, 1);
    chk(32'h1234_4000, 0); chk(32'h4000_0000, 1);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] r;
      r = $urandom >>> $urandom_range(0, 31);
      if ($urandom_range(0, 1)) r = ~r;
      chk(r, $urandom_range(0, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
