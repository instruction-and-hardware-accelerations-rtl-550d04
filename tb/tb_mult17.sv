// tb_mult17: self-checking test of the multiplier branch.
// Random operand pairs in all modes (signed/unsigned, fractional/integer,
// squared) are issued back to back, one per cycle; each product is compared
// with a reference computed in 64-bit integers, and must appear exactly two
// cycles after it was issued. Includes the -32768 * -32768 fractional case.
module tb_mult17;
  import g72x_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid, x_uns, y_uns, sq, frac, out_valid;
  logic signed [DW-1:0] x, y;
  logic signed [AW-1:0] p;
  int checks = 0, failures = 0;

  mult17 dut (.*);

  function automatic longint ref_prod(logic signed [15:0] a, logic signed [15:0] b,
                                      bit au, bit bu, bit s, bit f);
    longint xa, yb, r;
    xa = au ? longint'({16'b0, a}) : longint'(a);
    yb = s ? xa : (bu ? longint'({16'b0, b}) : longint'(b));
    r  = xa * yb;
    if (f) begin
      if (!au && a == -16'sd32768 && yb == -32768) r = 64'sh7fffffff;
      else r = r * 2;
    end
    return r;
  endfunction

  longint exp_q[$];
  int     lat_q[$];
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // compare outputs on each edge (before new values settle)
  always @(negedge clk) if (rst_n && out_valid) begin
    longint e; int t;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected product"); end
    else begin
      e = exp_q.pop_front(); t = lat_q.pop_front();
      if (longint'(p) != e) begin
        failures++; $display("FAIL product got %0d exp %0d", p, e);
      end
      checks++;
      if (cyc - t != 2) begin failures++; $display("FAIL latency %0d at %0t t=%0d cyc=%0d", cyc - t, $time, t, cyc); end
    end
  end

  task automatic issue(logic signed [15:0] a, logic signed [15:0] b, bit au, bit bu, bit s, bit f);
    x = a; y = b; x_uns = au; y_uns = bu; sq = s; frac = f; in_valid = 1;
    @(posedge clk);
    exp_q.push_back(ref_prod(a, b, au, bu, s, f));
    lat_q.push_back(cyc);  // value before this edge increments it
    #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; x = 0; y = 0; x_uns = 0; y_uns = 0; sq = 0; frac = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    issue(-16'sd32768, -16'sd32768, 0, 0, 0, 1);
    issue(-16'sd32768, -16'sd32768, 0, 0, 0, 0);
    issue(16'sd32767, 16'sd32767, 0, 0, 0, 1);
    issue(-16'sd1, -16'sd1, 1, 1, 0, 0);        // 65535 * 65535
    issue(-16'sd1, 16'sd3, 1, 0, 0, 0);
    issue(16'sd1234, 16'sd0, 0, 0, 1, 1);       // squared
    for (int i = 0; i < 400; i++)
      issue($urandom, $urandom, $urandom_range(0,1), $urandom_range(0,1),
            $urandom_range(0,3) == 0, $urandom_range(0,1));
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing products"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
