// divider: iterative fractional division, one quotient bit per clock.
//
// Computes the 16-bit fractional (Q15) quotient num / den for 0 <= num <= den
// by restoring division: 15 times, the quotient and the partial remainder are
// shifted left by one and the divisor is subtracted when the remainder is not
// smaller than it, which sets the new quotient bit. Two forms are supported:
//   long_mode = 0 (DIV_S): 16-bit num (low half of `num`) by 16-bit den.
//   long_mode = 1 (DIV_32): 32-bit num by den placed in the high half of a
//                 32-bit divisor (den * 65536), i.e. a 32 by 16 bit division.
// num == divisor gives 0x7fff, num == 0 gives 0, as the fixed-point reference
// operator does. Operands outside 0 <= num <= divisor, or den <= 0, are
// outside the operator's domain; the unit then returns 0x7fff for num greater
// than the divisor and 0 for den <= 0, and raises `err`.
//
// Timing: `start` is sampled at a rising edge while the unit is idle; the
// quotient is then produced by 15 iteration edges and `done` is high for one
// cycle, together with the final `quot`, after the 15th of them. `busy` is
// high from the edge after `start` until `done`. A start while busy is
// ignored.
//
// That division is done in hardware at about one clock per quotient bit is
// the document's; the restoring algorithm, the handling of out-of-domain
// operands and the handshake are this design's choices.
module divider
  import g72x_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          long_mode,
  input  logic [LW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quot,
  output logic          err
);

  localparam int unsigned NBITS = DW - 1;   // quotient bits (Q15)

  logic [LW-1:0] rem;      // partial remainder
  logic [LW-1:0] dvs;      // divisor
  logic [3:0]    cnt;
  logic [LW-1:0] num_eff, dvs_eff;

  always_comb begin
    num_eff = long_mode ? num : {{DW{1'b0}}, num[DW-1:0]};
    dvs_eff = long_mode ? {den, {DW{1'b0}}} : {{DW{1'b0}}, den};
  end

  logic [LW:0] rem_sh;
  assign rem_sh = {rem, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dvs  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
      err  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          err <= 1'b0;
          if ($signed(den) <= 0) begin
            quot <= '0;
            err  <= 1'b1;
            done <= 1'b1;
          end else if ($signed(num_eff) < 0 || num_eff > dvs_eff) begin
            quot <= 16'h7fff;
            err  <= 1'b1;
            done <= 1'b1;
          end else begin
            rem  <= num_eff;
            dvs  <= dvs_eff;
            quot <= '0;
            cnt  <= 4'(NBITS);
            busy <= 1'b1;
          end
        end
      end else begin
        // one quotient bit per clock
        if (rem_sh >= {1'b0, dvs}) begin
          rem  <= LW'(rem_sh - {1'b0, dvs});
          quot <= {quot[DW-2:0], 1'b1};
        end else begin
          rem  <= rem_sh[LW-1:0];
          quot <= {quot[DW-2:0], 1'b0};
        end
        cnt <= cnt - 4'd1;
        if (cnt == 4'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
