// tb_divider: checks DIV_S and the 32 by 16 bit division against the
// bit-serial reference of the fixed-point operator, for corner and random
// operands, the fixed latency (done exactly 16 edges after the start edge,
// i.e. 15 quotient-bit cycles) and the out-of-domain error flag.
module tb_divider;
  import g72x_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, long_mode, busy, done, err;
  logic [LW-1:0] num;
  logic [DW-1:0] den, quot;
  int checks = 0, failures = 0;

  divider dut (.*);

  function automatic int ref_div(longint n, longint d);
    int q;
    if (n == d) return 32767;
    if (n == 0) return 0;
    q = 0;
    for (int i = 0; i < 15; i++) begin
      q <<= 1; n <<= 1;
      if (n >= d) begin n -= d; q += 1; end
    end
    return q;
  endfunction

  task automatic run(longint n, int d, bit lm, bit exp_err);
    longint dd;
    int cycles, e;
    @(negedge clk);
    start = 1; long_mode = lm; num = 32'(n); den = 16'(d);
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 40) begin @(negedge clk); cycles++; end
    dd = lm ? longint'(d) * 65536 : longint'(d);
    checks++;
    if (err != exp_err) begin failures++; $display("FAIL err %0b n=%0d d=%0d", err, n, d); end
    if (!exp_err) begin
      e = ref_div(n, dd);
      checks++;
      if (int'(quot) != e) begin failures++; $display("FAIL q=%0d exp %0d (n=%0d d=%0d lm=%0b)", quot, e, n, d, lm); end
      checks++;
      if (cycles != 16) begin failures++; $display("FAIL latency %0d", cycles); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; long_mode = 0; num = 0; den = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 2, 0, 0);
    run(100, 100, 0, 0);
    run(0, 5, 0, 0);
    run(1, 32767, 0, 0);
    run(64'h4000_0000, 16'h7fff, 1, 0);
    run(101, 100, 0, 1);
    run(5, 0, 0, 1);
    for (int i = 0; i < 300; i++) begin
      int d;
      longint n;
      bit lm;
      lm = $urandom_range(0, 1);
      d = $urandom_range(1, 32767);
      n = lm ? longint'($urandom_range(0, d * 65536 - 1)) : longint'($urandom_range(0, d));
      run(n, d, lm, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
