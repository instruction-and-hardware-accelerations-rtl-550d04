// tb_mac_cmove_dp: self-checking test of the MAC / conditional-move datapath.
// A reference model written with 64-bit integers executes every instruction
// in issue order; the accumulators, idx_we and idx_out of the design are
// compared with it exactly three edges after the issue edge. Instructions are
// issued back to back, one per cycle, so the test also confirms that the
// conditional move (with and without absolute value, '>' and '>=') runs at a
// throughput of one per cycle. Directed sequences cover saturation,
// |0x80000000|, ties under '>' and '>=', and the guard bits without
// saturation.
module tb_mac_cmove_dp;
  import g72x_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 issue;
  dp_ctrl_t             ctrl;
  logic signed [DW-1:0] x, y;
  logic        [DW-1:0] idx_in;
  logic signed [AW-1:0] acr1, acr2;
  logic                 idx_we;
  logic        [DW-1:0] idx_out;

  mac_cmove_dp dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_take = 0, n_cmov = 0, n_sat = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model
  longint m1 = 0, m2 = 0;

  function automatic longint wrap38(longint v);
    return (v <<< 26) >>> 26;
  endfunction
  function automatic longint s32(longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction
  function automatic longint prod(logic signed [15:0] a, logic signed [15:0] b, dp_ctrl_t c);
    longint xa, yb, r;
    xa = c.x_uns ? longint'({16'b0, a}) : longint'(a);
    yb = c.sq ? xa : (c.y_uns ? longint'({16'b0, b}) : longint'(b));
    r  = xa * yb;
    if (c.frac) begin
      if (!c.x_uns && a == -16'sd32768 && yb == -32768) r = 64'sh7fffffff;
      else r = r * 2;
    end
    return r;
  endfunction

  typedef struct { int due; longint e1, e2; bit we; int idx; } exp_t;
  exp_t q[$];

  task automatic model(dp_ctrl_t c, logic signed [15:0] a, logic signed [15:0] b, int idx);
    longint d, r, cand, lo;
    bit take;
    exp_t e;
    take = 0;
    d = c.dst ? m2 : m1;
    case (c.op)
      DP_LDH: r = longint'(a) * 65536;
      DP_LDL: r = (d & ~64'hffff) | longint'({48'b0, a});
      DP_MUL: r = prod(a, b, c);
      DP_MAC: r = d + prod(a, b, c);
      DP_MSU: r = d - prod(a, b, c);
      DP_CLR: r = 0;
      default: r = d;
    endcase
    if (c.op inside {DP_MUL, DP_MAC, DP_MSU}) begin
      if (c.sat) begin
        if (s32(r) != r) n_sat++;
        r = s32(r);
      end else r = wrap38(r);
    end
    if (c.op == DP_CMOV) begin
      n_cmov++;
      lo = (m1 <<< 32) >>> 32;             // low 32 bits, signed
      if (c.abs_en) cand = (lo < 0) ? s32(-lo) : lo;
      else cand = m1;
      take = c.ge ? (cand >= m2) : (cand > m2);
      if (take) n_take++;
      if (c.dst) begin
        if (take) m2 = cand;
        m1 = cand;
      end else m1 = take ? cand : m2;
    end else if (c.op != DP_NOP) begin
      if (c.dst) m2 = r; else m1 = r;
    end
    e.due = cyc + 3; e.e1 = m1; e.e2 = m2; e.we = take && c.idx_st; e.idx = idx;
    q.push_back(e);
  endtask

  always @(negedge clk) if (rst_n) begin
    while (q.size() > 0 && q[0].due == cyc) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (longint'(acr1) != e.e1 || longint'(acr2) != e.e2) begin
        failures++;
        $display("FAIL @%0t acr1=%0d exp %0d acr2=%0d exp %0d", $time, acr1, e.e1, acr2, e.e2);
      end
      checks++;
      if (idx_we != e.we || (e.we && idx_out != DW'(e.idx))) begin
        failures++;
        $display("FAIL @%0t idx_we=%0b exp %0b idx=%0d exp %0d", $time, idx_we, e.we, idx_out, e.idx);
      end
    end
  end

  task automatic go(dp_op_e op, bit dst, logic signed [15:0] a, logic signed [15:0] b = 0,
                    bit frac = 1, bit sat = 1, bit abs_en = 0, bit ge = 0, int idx = 0,
                    bit sq = 0, bit xu = 0, bit yu = 0, bit ist = 1);
    dp_ctrl_t c;
    c = '{op: op, dst: dst, frac: frac, sq: sq, x_uns: xu, y_uns: yu, sat: sat, abs_en: abs_en, ge: ge, idx_st: ist};
    ctrl = c; x = a; y = b; idx_in = DW'(idx); issue = 1;
    @(posedge clk);
    model(c, a, b, idx);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    issue = 0; ctrl = DP_CTRL_NOP; x = 0; y = 0; idx_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // saturation and |MIN_32|
    go(DP_LDH, 0, -16'sd32768);                  // ACR1 = 0x80000000
    go(DP_CLR, 1, 0);
    go(DP_CMOV, 1, 0, 0, 1, 1, 1, 0, 7);         // |MIN| = 0x7fffffff > 0
    go(DP_LDH, 0, 16'sd30000);
    go(DP_MAC, 0, 16'sd32767, 16'sd32767);       // saturates
    go(DP_MSU, 0, -16'sd32768, -16'sd32768);
    go(DP_LDH, 0, 16'sd30000);
    go(DP_MAC, 0, 16'sd32767, 16'sd32767, 1, 0); // guard bits, no saturation
    go(DP_MAC, 0, 16'sd32767, 16'sd32767, 1, 0);
    // ties: '>' keeps first, '>=' takes the later one
    go(DP_CLR, 1, 0);
    go(DP_LDH, 0, 16'sd5);
    go(DP_CMOV, 1, 0, 0, 1, 1, 1, 0, 1);
    go(DP_LDH, 0, -16'sd5);
    go(DP_CMOV, 1, 0, 0, 1, 1, 1, 0, 2);         // tie under '>' : no move
    go(DP_LDH, 0, -16'sd5);
    go(DP_CMOV, 1, 0, 0, 1, 1, 1, 1, 3);         // tie under '>=': move
    go(DP_CMOV, 0, 0, 0, 1, 1, 0, 0, 4);         // dst ACR1, no abs
    // random mix, back to back
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom_range(0, 9);
      case (k)
        0: go(DP_LDH, $urandom_range(0,1), $urandom);
        1: go(DP_LDL, $urandom_range(0,1), $urandom);
        2: go(DP_MUL, $urandom_range(0,1), $urandom, $urandom, $urandom_range(0,1), $urandom_range(0,1),
              0, 0, 0, $urandom_range(0,1), $urandom_range(0,1), $urandom_range(0,1));
        3, 4: go(DP_MAC, $urandom_range(0,1), $urandom, $urandom, $urandom_range(0,1), 1, 0, 0, 0,
              $urandom_range(0,3) == 0, $urandom_range(0,1), $urandom_range(0,1));
        5: go(DP_MSU, $urandom_range(0,1), $urandom, $urandom, $urandom_range(0,1), 1);
        6, 7, 8: go(DP_CMOV, $urandom_range(0,1), 0, 0, 1, 1, $urandom_range(0,1), $urandom_range(0,1), i,
                    0, 0, 0, $urandom_range(0,3) != 0);
        default: go(DP_CLR, $urandom_range(0,1), 0);
      endcase
    end
    issue = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL results missing"); end
    checks++;
    if (n_take == 0 || n_take == n_cmov || n_sat == 0) begin
      failures++; $display("FAIL coverage take=%0d cmov=%0d sat=%0d", n_take, n_cmov, n_sat);
    end
    $display("cmov=%0d taken=%0d saturations=%0d", n_cmov, n_take, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
