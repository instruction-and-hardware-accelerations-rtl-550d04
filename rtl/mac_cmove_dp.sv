// mac_cmove_dp: multiply-accumulate datapath with the single-cycle 32-bit
// conditional move with loop index.
//
// Two 38-bit accumulator registers, ACR1 and ACR2, are updated by one shared
// 38-bit adder (ACC) followed by an optional saturation to 32 bits. The adder
// takes the product from the multiplier branch (mult17) for MUL/MAC/MSU, or
// the pair (candidate, ACR2) for the conditional move. For DP_CMOV, a 32-bit
// adder (FA) first forms |ACR1| when abs_en is set (two's complement negate
// selected by the sign bit, with |0x80000000| saturated to 0x7fffffff); the
// ACC adder then subtracts to compare the candidate with ACR2, and the sign
// bit of the difference decides, without a branch, whether the candidate is
// written to the destination register and, when the instruction's idx_st bit
// is set, whether idx_we is raised so that the loop counter value carried with
// the instruction (idx_out) is stored. With idx_st clear the same instruction
// is a plain 32-bit conditional move (with or without absolute value).
// With ge = 1 the move happens on '>=' (a decrementing loop counter then
// keeps the lowest index among equal values, as an incrementing loop with
// '>' does); with ge = 0 it happens on '>'. When abs_en is set and the
// destination is ACR2, ACR1 also receives |ACR1|, as the reference code's
// "Acc0 = L_abs(Acc0)" does.
//
// Interface: one dp_ctrl_t instruction per cycle with `issue`; x is the data
// memory word (multiplier x operand, or load data for DP_LDH/DP_LDL), y the
// coefficient word, idx_in the loop counter value. Timing: every instruction
// takes effect at the third clock edge after it is issued (edge k+2 for an
// issue sampled at edge k), in issue order, so there are no hazards between
// datapath instructions; throughput is one instruction, including the
// conditional move, per cycle. idx_we/idx_out are valid in the cycle after
// that edge. Reset clears both accumulators.
//
// The registers ACR1/ACR2, the 32-bit FA for the absolute value, the 38-bit
// ACC with saturation, the comparison by the MSB of the result and the
// control signal for storing the loop index follow the document's block
// diagram and text. The instruction set, the load operations and the
// three-stage timing are this design's choices.
module mac_cmove_dp
  import g72x_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 issue,
  input  dp_ctrl_t             ctrl,
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] y,
  input  logic        [DW-1:0] idx_in,
  output logic signed [AW-1:0] acr1,
  output logic signed [AW-1:0] acr2,
  output logic                 idx_we,
  output logic        [DW-1:0] idx_out
);

  // ---------------------------------------------------------------- multiplier
  logic                 uses_mul;
  logic                 p_valid;
  logic signed [AW-1:0] p;

  assign uses_mul = issue && (ctrl.op inside {DP_MUL, DP_MAC, DP_MSU});

  mult17 u_mult (
    .clk, .rst_n,
    .in_valid (uses_mul),
    .x, .y,
    .x_uns    (ctrl.x_uns),
    .y_uns    (ctrl.y_uns),
    .sq       (ctrl.sq),
    .frac     (ctrl.frac),
    .out_valid(p_valid),
    .p
  );

  // ------------------------------------------------- control / data pipeline
  dp_ctrl_t             c1, c2;
  logic                 v1, v2;
  logic signed [DW-1:0] d1, d2;
  logic        [DW-1:0] i1, i2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= DP_CTRL_NOP; c2 <= DP_CTRL_NOP;
      v1 <= 1'b0; v2 <= 1'b0;
      d1 <= '0; d2 <= '0; i1 <= '0; i2 <= '0;
    end else begin
      v1 <= issue;
      c1 <= issue ? ctrl : DP_CTRL_NOP;
      d1 <= x;
      i1 <= idx_in;
      v2 <= v1;
      c2 <= c1;
      d2 <= d1;
      i2 <= i1;
    end
  end

  // ------------------------------------------------ 32-bit FA: |ACR1|
  logic        [LW-1:0] acr1_lo;
  logic        [LW-1:0] fa_in;
  logic        [LW:0]   fa_sum;
  logic signed [AW-1:0] cand;     // candidate for the conditional move

  always_comb begin
    acr1_lo = acr1[LW-1:0];
    // sign bit selects the inverted operand, and is the carry in
    fa_in   = acr1_lo[LW-1] ? ~acr1_lo : acr1_lo;
    fa_sum  = {1'b0, fa_in} + (LW+1)'(acr1_lo[LW-1]);
    if (!c2.abs_en)
      cand = acr1;
    else if (fa_sum[LW-1])             // only |0x80000000| leaves the range
      cand = AW'(MAX_32);
    else
      cand = AW'($signed(fa_sum[LW-1:0]));
  end

  // ------------------------------------------------ ACC adder + saturation
  logic signed [AW-1:0] dst_val;
  logic signed [AW-1:0] acc_a, acc_b;
  logic                 acc_sub;
  logic signed [AW:0]   acc_sum;
  logic                 take;

  assign dst_val = c2.dst ? acr2 : acr1;

  always_comb begin
    acc_a   = dst_val;
    acc_b   = p;
    acc_sub = 1'b0;
    unique case (c2.op)
      DP_MSU:  acc_sub = 1'b1;
      DP_MUL:  acc_a = '0;
      DP_CMOV: begin
        // '>=': cand - ACR2 not negative; '>': ACR2 - cand negative
        acc_sub = 1'b1;
        acc_a   = c2.ge ? cand : acr2;
        acc_b   = c2.ge ? acr2 : cand;
      end
      default: ;
    endcase
    acc_sum = {acc_a[AW-1], acc_a} + (acc_sub ? {~acc_b[AW-1], ~acc_b} : {acc_b[AW-1], acc_b})
              + (AW+1)'(acc_sub);
    take    = c2.ge ? ~acc_sum[AW] : acc_sum[AW];
  end

  logic signed [AW-1:0] acc_res;
  assign acc_res = c2.sat ? sat32(acc_sum[AW-1:0]) : acc_sum[AW-1:0];

  // ------------------------------------------------ register write
  logic signed [AW-1:0] acr1_n, acr2_n;
  logic                 idx_we_n;

  always_comb begin
    acr1_n   = acr1;
    acr2_n   = acr2;
    idx_we_n = 1'b0;
    if (v2) begin
      unique case (c2.op)
        DP_NOP: ;
        DP_LDH: if (c2.dst) acr2_n = AW'(d2) <<< 16; else acr1_n = AW'(d2) <<< 16;
        DP_LDL: if (c2.dst) acr2_n = {acr2[AW-1:DW], d2}; else acr1_n = {acr1[AW-1:DW], d2};
        DP_MUL, DP_MAC, DP_MSU:
          if (c2.dst) acr2_n = acc_res; else acr1_n = acc_res;
        DP_CMOV: begin
          idx_we_n = take & c2.idx_st;
          if (c2.dst) begin
            if (take) acr2_n = cand;
            acr1_n = cand;
          end else begin
            acr1_n = take ? cand : acr2;
          end
        end
        DP_CLR: if (c2.dst) acr2_n = '0; else acr1_n = '0;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acr1    <= '0;
      acr2    <= '0;
      idx_we  <= 1'b0;
      idx_out <= '0;
    end else begin
      acr1    <= acr1_n;
      acr2    <= acr2_n;
      idx_we  <= idx_we_n;
      idx_out <= i2;
    end
  end

  // The product must arrive exactly when its instruction executes.
  property p_product_aligned;
    @(posedge clk) disable iff (!rst_n)
      (v2 && (c2.op inside {DP_MUL, DP_MAC, DP_MSU})) |-> p_valid;
  endproperty
  a_product_aligned: assert property (p_product_aligned);

endmodule
