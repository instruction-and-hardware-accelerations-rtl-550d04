// tb_loop_counter: runs the pulse-search loop l = 58, 56, ..., 0 (step 2)
// and checks the sequence of counts, that `last` marks only the final
// iteration, that exactly 30 iterations happen, and that `done` follows.
// Also runs a loop with step 3 from 10 (10, 7, 4, 1) and checks the index
// register written by `store`.
module tb_loop_counter;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load, dec, store, last, done;
  logic [W-1:0] init, step, store_val, count, stored_idx;
  int checks = 0, failures = 0;

  loop_counter #(.W(W)) dut (.*);

  task automatic run_loop(int start, int stp, int n_exp);
    int n, e;
    @(negedge clk); load = 1; init = W'(start); step = W'(stp);
    @(negedge clk); load = 0;
    n = 0; e = start;
    while (!done && n < 100) begin
      checks++;
      if (count != W'(e) || last != (e < stp)) begin
        failures++; $display("FAIL count %0d exp %0d last %0b", count, e, last);
      end
      // store the index on every third iteration
      store = (n % 3 == 0); store_val = count;
      dec = 1;
      @(negedge clk);
      if (n % 3 == 0) begin
        checks++;
        if (stored_idx != W'(e)) begin failures++; $display("FAIL stored %0d", stored_idx); end
      end
      store = 0; dec = 0;
      n++; e -= stp;
    end
    checks++;
    if (n != n_exp) begin failures++; $display("FAIL iterations %0d exp %0d", n, n_exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; dec = 0; store = 0; init = 0; step = 0; store_val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_loop(58, 2, 30);
    run_loop(10, 3, 4);
    // dec after done keeps the counter still
    @(negedge clk); dec = 1;
    @(negedge clk); dec = 0;
    checks++;
    if (!done || count != 1) begin failures++; $display("FAIL after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
