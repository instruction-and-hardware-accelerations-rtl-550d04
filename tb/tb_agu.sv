// tb_agu: self-checking test of the address generator. Random sequences of
// segment loads and the four adder input combinations are applied; a model
// of the segment and address registers predicts the address after every
// edge, including the one-cycle delay from control to address.
module tb_agu;
  localparam int unsigned AW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          seg_we, a_sel, b_sel, addr_we;
  logic [AW-1:0] seg_in, step, offset, seg, addr;
  int checks = 0, failures = 0;

  agu #(.AW(AW)) dut (.*);

  logic [AW-1:0] mseg = 0, maddr = 0;
  int nmode[4] = '{0, 0, 0, 0};

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seg_we = 0; a_sel = 0; b_sel = 0; addr_we = 0; seg_in = 0; step = 0; offset = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: base 100 + offset 7, then step 2 three times
    @(negedge clk); seg_we = 1; seg_in = 100;
    @(negedge clk); seg_we = 0; a_sel = 0; b_sel = 0; offset = 7; addr_we = 1;
    @(negedge clk); a_sel = 1; b_sel = 1; step = 2;
    checks++; if (addr != 107) begin failures++; $display("FAIL seg+ofs %0d", addr); end
    @(negedge clk);
    checks++; if (addr != 109) begin failures++; $display("FAIL step %0d", addr); end
    @(negedge clk); addr_we = 0;
    checks++; if (addr != 111) begin failures++; $display("FAIL step2 %0d", addr); end
    @(negedge clk);
    checks++; if (addr != 111) begin failures++; $display("FAIL hold %0d", addr); end
    mseg = seg; maddr = addr;
    for (int i = 0; i < 2000; i++) begin
      logic [AW-1:0] a, b;
      @(negedge clk);
      seg_we = $urandom_range(0, 3) == 0; seg_in = $urandom;
      a_sel = $urandom; b_sel = $urandom; addr_we = $urandom_range(0, 4) != 0;
      step = $urandom_range(0, 8); offset = $urandom;
      a = a_sel ? step : mseg;
      b = b_sel ? maddr : offset;
      if (addr_we) begin maddr = a + b; nmode[{a_sel, b_sel}]++; end
      if (seg_we) mseg = seg_in;
      @(posedge clk); #1;
      checks++;
      if (addr != maddr || seg != mseg) begin
        failures++; $display("FAIL addr %0d exp %0d seg %0d exp %0d", addr, maddr, seg, mseg);
      end
    end
    checks++;
    if (nmode[0] == 0 || nmode[1] == 0 || nmode[2] == 0 || nmode[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
