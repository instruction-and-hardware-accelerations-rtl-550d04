// g72x_accel_top: acceleration datapath for the fixed-codebook pulse search
// and the other hot spots of G.723.1 / G.729 speech encoders.
//
// The top joins the units that a DSP core would drive from its instruction
// decoder; here that decoder is outside, and every unit is controlled by the
// ports below, one operation per unit per cycle:
//   * the MAC datapath (mac_cmove_dp) with the 17x17 multiplier, the two
//     38-bit accumulator registers and the one-cycle 32-bit conditional move
//     with loop index. Its x operand and its load data come from the data
//     memory read port, its y operand from the coefficient memory read port,
//     and its loop index from the loop counter.
//   * the address generator (agu). Its offset input is either the
//     offset_calc result |loop counter - REG| (ofs_sel = 0) or the ofs_in
//     port (ofs_sel = 1). Its address is the data memory address for reads
//     and for stores from the accumulator.
//   * REG, the register that holds the loop-invariant previous pulse
//     position, loaded by ref_we.
//   * the loop counter, which also keeps the index register written when a
//     conditional move takes its candidate (the datapath's idx_we).
//   * the data and coefficient memories. The data memory is read at the AGU
//     address (or at dm_raddr_ext when dm_rsel_ext is set) and written either
//     by the host port dm_we_ext or by a store of the saturated ACR1 half
//     (st_en, st_hi) at the AGU address. The coefficient memory has a plain
//     address port.
//   * the 16-bit max/amax unit, the divider and the normalizer, as separate
//     execution units with their own operand ports.
//
// Timing: memories return data one cycle after the read edge, datapath
// instructions take effect at the third edge after issue (see
// mac_cmove_dp); the caller schedules operations accordingly. A host write
// and an accumulator store in the same cycle are not allowed (assertion).
//
// Which units exist and how the datapath, address generator, offset
// calculation and loop counter connect follows the document; the control
// ports, the store path and the memory addressing are this design's choices.
module g72x_accel_top
  import g72x_pkg::*;
#(
  parameter int unsigned DM_DEPTH = 1024,
  parameter int unsigned CM_DEPTH = 1024,
  localparam int unsigned DAB     = $clog2(DM_DEPTH),
  localparam int unsigned CAB     = $clog2(CM_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // MAC / conditional-move datapath
  input  logic                 dp_issue,
  input  dp_ctrl_t             dp_ctrl,
  output logic signed [AW-1:0] acr1,
  output logic signed [AW-1:0] acr2,
  output logic                 idx_we,
  // address generator and offset
  input  logic                 seg_we,
  input  logic [DW-1:0]        seg_in,
  input  logic [DW-1:0]        agu_step,
  input  logic                 agu_a_sel,
  input  logic                 agu_b_sel,
  input  logic                 agu_addr_we,
  input  logic                 ofs_sel,
  input  logic [DW-1:0]        ofs_in,
  input  logic                 ref_we,
  input  logic [DW-1:0]        ref_in,
  output logic [DW-1:0]        agu_addr,
  output logic [DW-1:0]        offset,
  // loop counter
  input  logic                 lc_load,
  input  logic [DW-1:0]        lc_init,
  input  logic [DW-1:0]        lc_step,
  input  logic                 lc_dec,
  output logic [DW-1:0]        lc_count,
  output logic                 lc_last,
  output logic                 lc_done,
  output logic [DW-1:0]        stored_idx,
  // data memory
  input  logic                 dm_re,
  input  logic                 dm_rsel_ext,
  input  logic [DAB-1:0]       dm_raddr_ext,
  output logic [DW-1:0]        dm_rdata,
  input  logic                 dm_we_ext,
  input  logic [DAB-1:0]       dm_waddr_ext,
  input  logic [DW-1:0]        dm_wdata_ext,
  input  logic                 st_en,
  input  logic                 st_hi,
  // coefficient memory
  input  logic                 cm_re,
  input  logic [CAB-1:0]       cm_raddr,
  output logic [DW-1:0]        cm_rdata,
  input  logic                 cm_we,
  input  logic [CAB-1:0]       cm_waddr,
  input  logic [DW-1:0]        cm_wdata,
  // max / amax
  input  logic signed [DW-1:0] mx_a,
  input  logic signed [DW-1:0] mx_b,
  input  logic                 mx_abs,
  output logic signed [DW-1:0] mx_result,
  output logic                 mx_upd,
  // divider
  input  logic                 div_start,
  input  logic                 div_long,
  input  logic [LW-1:0]        div_num,
  input  logic [DW-1:0]        div_den,
  output logic                 div_busy,
  output logic                 div_done,
  output logic [DW-1:0]        div_quot,
  output logic                 div_err,
  // normalizer
  input  logic [LW-1:0]        norm_in,
  input  logic                 norm_long,
  output logic [4:0]           norm_out
);

  // ------------------------------------------------------------ REG
  logic [DW-1:0] ref_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ref_r <= '0;
    else if (ref_we) ref_r <= ref_in;
  end

  // ------------------------------------------------------------ loop counter
  logic [DW-1:0] dp_idx;

  loop_counter #(.W(DW)) u_lc (
    .clk, .rst_n,
    .load      (lc_load),
    .init      (lc_init),
    .step      (lc_step),
    .dec       (lc_dec),
    .store     (idx_we),
    .store_val (dp_idx),
    .count     (lc_count),
    .last      (lc_last),
    .done      (lc_done),
    .stored_idx(stored_idx)
  );

  // ------------------------------------------------------------ offset + AGU
  offset_calc #(.W(DW)) u_ofs (
    .loop_count(lc_count),
    .ref_val   (ref_r),
    .offset    (offset)
  );

  agu #(.AW(DW)) u_agu (
    .clk, .rst_n,
    .seg_we,
    .seg_in,
    .step    (agu_step),
    .offset  (ofs_sel ? ofs_in : offset),
    .a_sel   (agu_a_sel),
    .b_sel   (agu_b_sel),
    .addr_we (agu_addr_we),
    .seg     (),
    .addr    (agu_addr)
  );

  // ------------------------------------------------------------ memories
  logic [DW-1:0]        acr1_half;
  logic signed [AW-1:0] acr1_sat;
  logic                 dm_we;
  logic [DAB-1:0]       dm_waddr;
  logic [DW-1:0]        dm_wdata;

  always_comb begin
    acr1_sat  = sat32(acr1);
    acr1_half = st_hi ? acr1_sat[LW-1:DW] : acr1_sat[DW-1:0];
    dm_we     = dm_we_ext | st_en;
    dm_waddr  = dm_we_ext ? dm_waddr_ext : agu_addr[DAB-1:0];
    dm_wdata  = dm_we_ext ? dm_wdata_ext : acr1_half;
  end

  sram_1r1w #(.WIDTH(DW), .DEPTH(DM_DEPTH)) u_dmem (
    .clk,
    .re    (dm_re),
    .raddr (dm_rsel_ext ? dm_raddr_ext : agu_addr[DAB-1:0]),
    .rdata (dm_rdata),
    .we    (dm_we),
    .waddr (dm_waddr),
    .wdata (dm_wdata)
  );

  sram_1r1w #(.WIDTH(DW), .DEPTH(CM_DEPTH)) u_cmem (
    .clk,
    .re    (cm_re),
    .raddr (cm_raddr),
    .rdata (cm_rdata),
    .we    (cm_we),
    .waddr (cm_waddr),
    .wdata (cm_wdata)
  );

  // ------------------------------------------------------------ MAC datapath
  mac_cmove_dp u_dp (
    .clk, .rst_n,
    .issue   (dp_issue),
    .ctrl    (dp_ctrl),
    .x       (dm_rdata),
    .y       (cm_rdata),
    .idx_in  (lc_count),
    .acr1,
    .acr2,
    .idx_we,
    .idx_out (dp_idx)
  );

  // ------------------------------------------------------------ other units
  max16 u_max (
    .a     (mx_a),
    .b     (mx_b),
    .abs_en(mx_abs),
    .result(mx_result),
    .upd   (mx_upd)
  );

  divider u_div (
    .clk, .rst_n,
    .start    (div_start),
    .long_mode(div_long),
    .num      (div_num),
    .den      (div_den),
    .busy     (div_busy),
    .done     (div_done),
    .quot     (div_quot),
    .err      (div_err)
  );

  normalizer u_norm (
    .v        (norm_in),
    .long_mode(norm_long),
    .norm     (norm_out)
  );

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(dm_we_ext && st_en));

endmodule
