// tb_sram_1r1w: writes random words, reads them back with the one-cycle read
// latency, checks read-before-write on a same-address collision and that
// rdata holds while re is low.
module tb_sram_1r1w;
  localparam int unsigned WIDTH = 16, DEPTH = 64, AB = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             re, we;
  logic [AB-1:0]    raddr, waddr;
  logic [WIDTH-1:0] rdata, wdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  sram_1r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AB'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      logic [WIDTH-1:0] e;
      @(negedge clk);
      re = 1; raddr = $urandom; e = model[raddr];
      we = $urandom_range(0, 1); waddr = $urandom_range(0, 1) ? raddr : AB'($urandom); wdata = $urandom;
      @(negedge clk);
      if (we) model[waddr] = wdata;
      re = 0; we = 0;
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL read %h exp %h", rdata, e); end
      @(negedge clk);
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
