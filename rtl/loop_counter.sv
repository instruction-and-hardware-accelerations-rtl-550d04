// loop_counter: hardware loop counter that counts down with a variable step
// size, and holds the loop index captured by a conditional move.
//
// `load` sets the counter to `init` and the step register to `step`. Each
// `dec` subtracts the step. `last` is high while the current count is the
// final iteration, that is while count < step, so a loop over
// l = init, init-step, ..., 0 ends after the iteration with count 0 (the
// document's pulse search walks l = 58, 56, ..., 0 with step 2). `done`
// rises after the final decrement and stays high until the next load.
// A pulse on `store` writes `store_val` (the loop index that travelled with a
// conditional-move instruction) into the index register `stored_idx`, which
// plays the role of the register-file entry that receives the position of
// the new maximum.
//
// Timing: all updates happen at the rising clock edge; `count`, `last` and
// `done` are valid in the cycle after. Reset clears everything.
//
// The decrementing direction and the step size of two are the document's;
// the interface, the last/done flags and the index register are this design's
// choices.
module loop_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] init,
  input  logic [W-1:0] step,
  input  logic         dec,
  input  logic         store,
  input  logic [W-1:0] store_val,
  output logic [W-1:0] count,
  output logic         last,
  output logic         done,
  output logic [W-1:0] stored_idx
);

  logic [W-1:0] step_r;

  assign last = (count < step_r) && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      step_r     <= '0;
      done       <= 1'b1;
      stored_idx <= '0;
    end else begin
      if (load) begin
        count  <= init;
        step_r <= step;
        done   <= 1'b0;
      end else if (dec && !done) begin
        if (last) done  <= 1'b1;
        else      count <= count - step_r;
      end
      if (store) stored_idx <= store_val;
    end
  end

endmodule
