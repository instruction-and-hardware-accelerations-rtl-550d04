// tb_cmove_frame: frame-sized load on the conditional-move datapath.
// The G.723.1 6.3 kbit/s encoder performs up to 10869 32-bit conditional
// moves with loop index per 30 ms frame. This test issues that many
// "ACR1 = x*y, then |ACR1| >= max ? move + store index" pairs back to back
// (one datapath instruction per cycle, no idle cycles), with the index
// counting down as a hardware loop counter does. It checks the final maximum
// and its index against a reference model with an incrementing index and
// strict '>', and checks that the whole sequence occupies exactly
// 2 * 10869 issue cycles plus the two-stage pipeline fill.
module tb_cmove_frame;
  import g72x_pkg::*;

  localparam int N = 10869;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 issue;
  dp_ctrl_t             ctrl;
  logic signed [DW-1:0] x, y;
  logic        [DW-1:0] idx_in;
  logic signed [AW-1:0] acr1, acr2;
  logic                 idx_we;
  logic        [DW-1:0] idx_out;
  logic        [DW-1:0] best_idx;

  mac_cmove_dp dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, first_issue = -1, last_update = -1, n_moves = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && issue && first_issue < 0) first_issue <= cyc;
  end
  always @(posedge clk) if (rst_n && idx_we) begin
    best_idx    <= idx_out;
    n_moves     <= n_moves + 1;
  end
  always @(posedge clk) if (rst_n && dut.v2) last_update <= cyc;

  logic signed [15:0] xs [N], ys [N];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, best, a;
    int     best_pos;
    issue = 0; ctrl = DP_CTRL_NOP; x = 0; y = 0; idx_in = 0; best_idx = 0;
    for (int i = 0; i < N; i++) begin xs[i] = 16'($urandom); ys[i] = 16'($urandom); end
    // reference: positions visited in increasing order, strict '>'
    // position p is visited by the hardware at step N-1-p (counter counts down)
    acc = 0; best = 0; best_pos = 0;
    for (int s = 0; s < N; s++) begin
      acc = 2 * longint'(xs[s]) * longint'(ys[s]);
      if (acc > 64'sd2147483647) acc = 64'sd2147483647;
      if (acc < -64'sd2147483648) acc = -64'sd2147483648;
      a = (acc < 0) ? ((acc == -64'sd2147483648) ? 64'sd2147483647 : -acc) : acc;
      // hardware index of step s is N-1-s; ties go to the lower index,
      // i.e. the later step
      if (a >= best) begin best = a; best_pos = N - 1 - s; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < N; s++) begin
      ctrl = '{op: DP_MUL, dst: 1'b0, frac: 1'b1, sq: 1'b0, x_uns: 1'b0, y_uns: 1'b0, sat: 1'b1,
               abs_en: 1'b0, ge: 1'b0, idx_st: 1'b0};
      x = xs[s]; y = ys[s]; issue = 1;
      @(negedge clk);
      ctrl = '{op: DP_CMOV, dst: 1'b1, frac: 1'b1, sq: 1'b0, x_uns: 1'b0, y_uns: 1'b0, sat: 1'b1,
               abs_en: 1'b1, ge: 1'b1, idx_st: 1'b1};
      idx_in = DW'(N - 1 - s);
      @(negedge clk);
    end
    issue = 0;
    repeat (5) @(negedge clk);
    $display("max %0d at %0d, %0d moves, issue span %0d cycles", acr2, best_idx, n_moves,
             last_update - first_issue + 1);
    checks++;
    if (longint'(acr2) != best) begin failures++; $display("FAIL max %0d exp %0d", acr2, best); end
    checks++;
    if (int'(best_idx) != best_pos) begin failures++; $display("FAIL index %0d exp %0d", best_idx, best_pos); end
    checks++;
    if (last_update - first_issue + 1 != 2 * N + 2) begin
      failures++; $display("FAIL span %0d exp %0d", last_update - first_issue + 1, 2 * N + 2);
    end
    checks++;
    if (n_moves == 0) begin failures++; $display("FAIL no move"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
