// tb_g72x_accel_top: end-to-end run of the G.723.1 6.3 kbit/s fixed-codebook
// pulse-position search loop on the accelerator, at the default sizes.
//
// The testbench acts as the instruction sequencer of a DSP core. For each
// search it loads ImrCorr (at IMR), WrkBlk (32-bit words, high half first, at
// WRK) and the pulse amplitude (coefficient memory) and REG (the previous
// pulse position), then walks the loop counter from 58 down to 0 in steps of
// 2. Positions marked occupied are skipped. For the others it loads WrkBlk[l]
// into ACR1, fetches ImrCorr[|l - REG|] through segment + offset addressing,
// performs the multiply-subtract, stores WrkBlk[l] back and issues the
// absolute-value conditional move with '>=' that keeps the maximum in ACR2
// and the position in the loop counter's index register.
//
// The results are compared with a reference model of the original C loop
// (incrementing l, strict '>', 16/32-bit saturating arithmetic): the updated
// WrkBlk table, the maximum and the chosen position. Searches cover a tie of
// two maxima (which the '>=' rule must resolve like the C loop), accumulator
// saturation, offsets with l above and below REG, and occupied positions.
// The max/amax unit, the divider, the normalizer and an integer-mode
// autocorrelation (x = y) product are each exercised once through the top.
// Every mechanism is counted and must occur at least once.
module tb_g72x_accel_top;
  import g72x_pkg::*;

  localparam int DM_DEPTH = 1024, CM_DEPTH = 1024;
  localparam int IMR = 'h100, WRK = 'h200, PAMP_ADDR = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 dp_issue;
  dp_ctrl_t             dp_ctrl;
  logic signed [AW-1:0] acr1, acr2;
  logic                 idx_we;
  logic                 seg_we, agu_a_sel, agu_b_sel, agu_addr_we, ofs_sel, ref_we;
  logic [DW-1:0]        seg_in, agu_step, ofs_in, ref_in, agu_addr, offset;
  logic                 lc_load, lc_dec, lc_last, lc_done;
  logic [DW-1:0]        lc_init, lc_step, lc_count, stored_idx;
  logic                 dm_re, dm_rsel_ext, dm_we_ext, st_en, st_hi;
  logic [9:0]           dm_raddr_ext, dm_waddr_ext;
  logic [DW-1:0]        dm_rdata, dm_wdata_ext;
  logic                 cm_re, cm_we;
  logic [9:0]           cm_raddr, cm_waddr;
  logic [DW-1:0]        cm_rdata, cm_wdata;
  logic signed [DW-1:0] mx_a, mx_b, mx_result;
  logic                 mx_abs, mx_upd;
  logic                 div_start, div_long, div_busy, div_done, div_err;
  logic [LW-1:0]        div_num, norm_in;
  logic [DW-1:0]        div_den, div_quot;
  logic                 norm_long;
  logic [4:0]           norm_out;

  g72x_accel_top dut (.*);

  int checks = 0, failures = 0;
  int n_skip = 0, n_take = 0, n_tie = 0, n_sat = 0, n_neg_ofs = 0, n_pos_ofs = 0, n_abs_neg = 0;
  int n_max = 0, n_div = 0, n_norm = 0, n_sq = 0;

  // ------------------------------------------------ search data and model
  logic signed [15:0] imr [60];
  logic signed [31:0] wrk [60];
  logic [59:0]        occ;
  logic signed [15:0] pamp;
  int                 ploc_prev;

  function automatic logic signed [31:0] l_sat(longint v);
    if (v > 64'sd2147483647) return 32'sh7fffffff;
    if (v < -64'sd2147483648) return 32'sh80000000;
    return 32'(v);
  endfunction

  // C loop: returns Acc1 and Ploc[j]; updates wrk_m in place
  task automatic ref_search(inout logic signed [31:0] wrk_m [60], output longint acc1, output int ploc);
    longint acc0, pr;
    acc1 = 0; ploc = 0;
    for (int l = 0; l < 60; l += 2) begin
      int k;
      if (occ[l]) continue;
      k = (l > ploc_prev) ? l - ploc_prev : ploc_prev - l;
      pr = longint'(pamp) * longint'(imr[k]);
      if (pamp == -16'sd32768 && imr[k] == -16'sd32768) pr = 64'sh7fffffff; else pr = pr * 2;
      if (l_sat(longint'(wrk_m[l]) - pr) != longint'(wrk_m[l]) - pr) n_sat++;
      acc0 = l_sat(longint'(wrk_m[l]) - pr);
      wrk_m[l] = 32'(acc0);
      if (acc0 < 0) n_abs_neg++;
      acc0 = (acc0 < 0) ? longint'(l_sat(-acc0)) : acc0;
      if (acc0 > acc1) begin acc1 = acc0; ploc = l; end
      else if (acc0 == acc1 && acc1 != 0) n_tie++;
    end
  endtask

  // ------------------------------------------------ one-cycle control helper
  task automatic idle_ctrl();
    dp_issue = 0; dp_ctrl = DP_CTRL_NOP;
    seg_we = 0; seg_in = 0; agu_step = 0; agu_a_sel = 0; agu_b_sel = 0; agu_addr_we = 0;
    ofs_sel = 0; ofs_in = 0; ref_we = 0; ref_in = 0;
    lc_load = 0; lc_init = 0; lc_step = 0; lc_dec = 0;
    dm_re = 0; dm_rsel_ext = 0; dm_raddr_ext = 0; dm_we_ext = 0; dm_waddr_ext = 0; dm_wdata_ext = 0;
    st_en = 0; st_hi = 0; cm_re = 0; cm_raddr = 0; cm_we = 0; cm_waddr = 0; cm_wdata = 0;
    div_start = 0;
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
    idle_ctrl();
  endtask

  function automatic dp_ctrl_t dpc(dp_op_e op, bit dst, bit abs_en = 0, bit ge = 0);
    dp_ctrl_t c;
    c = '{op: op, dst: dst, frac: 1'b1, sq: 1'b0, x_uns: 1'b0, y_uns: 1'b0, sat: 1'b1,
          abs_en: abs_en, ge: ge, idx_st: 1'b1};
    return c;
  endfunction

  task automatic host_write(int a, logic [15:0] d);
    dm_we_ext = 1; dm_waddr_ext = 10'(a); dm_wdata_ext = d;
    tick();
  endtask

  // ------------------------------------------------ one search on the accelerator
  task automatic hw_search(output int cycles);
    int t0;
    // preload
    for (int i = 0; i < 60; i++) host_write(IMR + i, imr[i]);
    for (int i = 0; i < 60; i++) begin
      host_write(WRK + 2*i, wrk[i][31:16]);
      host_write(WRK + 2*i + 1, wrk[i][15:0]);
    end
    cm_we = 1; cm_waddr = PAMP_ADDR; cm_wdata = pamp;
    ref_we = 1; ref_in = 16'(ploc_prev);
    seg_we = 1; seg_in = IMR;
    lc_load = 1; lc_init = 58; lc_step = 2;
    dp_issue = 1; dp_ctrl = dpc(DP_CLR, 1);       // Acc1 = 0
    tick();
    cm_re = 1; cm_raddr = PAMP_ADDR;
    tick();
    t0 = cyc_cnt;
    while (!lc_done) begin
      int l;
      l = int'(lc_count);
      if (occ[l]) begin
        n_skip++;
        lc_dec = 1; tick();
        continue;
      end
      if (l < ploc_prev) n_neg_ofs++; else n_pos_ofs++;
      // c0: address of WrkBlk[l] high half
      agu_a_sel = 1; agu_step = WRK; agu_b_sel = 0; ofs_sel = 1; ofs_in = 16'(2*l); agu_addr_we = 1;
      tick();
      // c1: read high half, step to low half
      dm_re = 1; agu_a_sel = 1; agu_b_sel = 1; agu_step = 1; agu_addr_we = 1;
      tick();
      // c2: ACR1 <= high half; read low half
      dp_issue = 1; dp_ctrl = dpc(DP_LDH, 0); dm_re = 1;
      tick();
      // c3: ACR1 low half; address IMR + |l - REG|
      dp_issue = 1; dp_ctrl = dpc(DP_LDL, 0);
      agu_a_sel = 0; agu_b_sel = 0; ofs_sel = 0; agu_addr_we = 1;
      checks++;
      if (int'(offset) != ((l > ploc_prev) ? l - ploc_prev : ploc_prev - l)) begin
        failures++; $display("FAIL offset %0d for l=%0d", offset, l);
      end
      tick();
      // c4: read ImrCorr
      dm_re = 1;
      tick();
      // c5: ACR1 <= ACR1 - Pamp * ImrCorr; address back to WrkBlk[l]
      dp_issue = 1; dp_ctrl = dpc(DP_MSU, 0);
      agu_a_sel = 1; agu_step = WRK; agu_b_sel = 0; ofs_sel = 1; ofs_in = 16'(2*l); agu_addr_we = 1;
      tick();
      tick();
      tick();
      // c8: store high half, step to low half
      st_en = 1; st_hi = 1; agu_a_sel = 1; agu_b_sel = 1; agu_step = 1; agu_addr_we = 1;
      tick();
      // c9: store low half; conditional move with index; next loop count
      st_en = 1; st_hi = 0;
      dp_issue = 1; dp_ctrl = dpc(DP_CMOV, 1, 1, 1);
      lc_dec = 1;
      tick();
    end
    repeat (4) tick();
    cycles = cyc_cnt - t0;
  endtask

  always @(posedge clk) if (rst_n && idx_we) n_take++;
  int cyc_cnt = 0;
  always @(posedge clk) cyc_cnt <= cyc_cnt + 1;

  task automatic check_search(string name);
    logic signed [31:0] wrk_m [60];
    longint acc1;
    int ploc, cyc;
    wrk_m = wrk;
    ref_search(wrk_m, acc1, ploc);
    hw_search(cyc);
    $display("%s: %0d cycles, max %0d at %0d", name, cyc, acr2, stored_idx);
    checks++;
    if (longint'(acr2) != acc1) begin failures++; $display("FAIL max %0d exp %0d", acr2, acc1); end
    checks++;
    if (int'(stored_idx) != ploc) begin failures++; $display("FAIL ploc %0d exp %0d", stored_idx, ploc); end
    for (int l = 0; l < 60; l += 2) begin
      logic [15:0] hi, lo;
      dm_re = 1; dm_rsel_ext = 1; dm_raddr_ext = 10'(WRK + 2*l); tick();
      hi = dm_rdata;
      dm_re = 1; dm_rsel_ext = 1; dm_raddr_ext = 10'(WRK + 2*l + 1); tick();
      lo = dm_rdata;
      checks++;
      if ({hi, lo} != wrk_m[l]) begin
        failures++; $display("FAIL WrkBlk[%0d] %h exp %h", l, {hi, lo}, wrk_m[l]);
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_ctrl();
    mx_a = 0; mx_b = 0; mx_abs = 0; div_long = 0; div_num = 0; div_den = 0;
    norm_in = 0; norm_long = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tick();

    // search 1: a tie between l = 10 and l = 40 (both at distance 15 from REG)
    for (int i = 0; i < 60; i++) begin
      imr[i] = 16'($urandom_range(0, 2000)) - 16'sd1000;
      wrk[i] = 32'($urandom_range(0, 200000)) - 32'sd100000;
      occ[i] = 0;
    end
    imr[15] = 0; wrk[10] = 32'sd5000000; wrk[40] = -32'sd5000000;
    occ[20] = 1; occ[56] = 1;
    pamp = 16'sd1200; ploc_prev = 25;
    check_search("search 1 (tie)");

    // search 2: saturation, larger values
    for (int i = 0; i < 60; i++) begin
      imr[i] = 16'($urandom);
      wrk[i] = 32'($urandom);
      occ[i] = ($urandom_range(0, 4) == 0);
    end
    wrk[30] = 32'sh7fff0000; imr[23] = 16'sh7fff;        // |30 - 7| = 23
    occ[30] = 0;
    pamp = -16'sd32768; ploc_prev = 7;
    check_search("search 2 (saturation)");

    // search 3: random
    for (int i = 0; i < 60; i++) begin
      imr[i] = 16'($urandom);
      wrk[i] = 32'($urandom) >>> 4;
      occ[i] = ($urandom_range(0, 6) == 0);
    end
    pamp = 16'($urandom); ploc_prev = 52;
    check_search("search 3 (random)");

    // the other execution units, once each through the top
    mx_a = -16'sd900; mx_b = 16'sd500; mx_abs = 1; #1;
    checks++; if (mx_result != 900 || !mx_upd) begin failures++; $display("FAIL amax"); end
    n_max++;
    div_start = 1; div_long = 0; div_num = 32'd1; div_den = 16'd3;
    begin
      int c;
      c = 0;
      tick();
      while (!div_done && c < 40) begin tick(); c++; end
      checks++; if (div_quot != 16'h2aaa || c != 15) begin failures++; $display("FAIL div %h %0d", div_quot, c); end
    end
    n_div++;
    norm_in = 32'h0000_0100; norm_long = 1; #1;
    checks++; if (norm_out != 22) begin failures++; $display("FAIL norm %0d", norm_out); end
    n_norm++;

    // integer-mode autocorrelation product through the data memory: ACR1 = x * x
    host_write(3, 16'hff38);                      // -200
    dm_re = 1; dm_rsel_ext = 1; dm_raddr_ext = 3; tick();
    dp_issue = 1;
    dp_ctrl = '{op: DP_MUL, dst: 1'b0, frac: 1'b0, sq: 1'b1, x_uns: 1'b0, y_uns: 1'b0, sat: 1'b1,
                abs_en: 1'b0, ge: 1'b0, idx_st: 1'b0};
    tick();
    repeat (3) tick();
    checks++; if (acr1 != 40000) begin failures++; $display("FAIL integer square %0d", acr1); end
    n_sq++;

    $display("mechanisms: skip=%0d take=%0d tie=%0d sat=%0d neg_ofs=%0d pos_ofs=%0d abs_neg=%0d max=%0d div=%0d norm=%0d int_sq=%0d",
             n_skip, n_take, n_tie, n_sat, n_neg_ofs, n_pos_ofs, n_abs_neg, n_max, n_div, n_norm, n_sq);
    checks++; if (n_skip == 0)    begin failures++; $display("FAIL no skip"); end
    checks++; if (n_take == 0)    begin failures++; $display("FAIL no move taken"); end
    checks++; if (n_tie == 0)     begin failures++; $display("FAIL no tie"); end
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_neg_ofs == 0) begin failures++; $display("FAIL no l < REG"); end
    checks++; if (n_pos_ofs == 0) begin failures++; $display("FAIL no l >= REG"); end
    checks++; if (n_abs_neg == 0) begin failures++; $display("FAIL no negative Acc0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
