// plf_top: the two PLF accelerator systems side by side, each with its own
// clock, reset and ports:
//   f1_*   the decoupled access/execute accelerator of the AWS F1 card
//          (plf_f1_accel: 512-bit execution unit, four memory channels),
//   z_*    the programmable-logic part of the ZCU102 design
//          (plf_zynq_system: two 128-bit PLF cores with stream and register
//          ports toward the DMA engines and processors).
// Both compute the same function: the parent ancestral probability vector of
// Felsenstein's pruning step under the Gamma model with four rate
// categories, plus the per-site numerical scaling. Placing the two systems
// in one top is only a packaging choice: they share no hardware.
module plf_top
  import plf_pkg::*;
#(
  parameter int F1_LANES   = 8,
  parameter int F1_FIFO    = 32,
  parameter int Z_NCORES   = 2,
  parameter int Z_LANES    = 2
) (
  // ---------------- F1 accelerator ----------------
  input  logic                                f1_clk,
  input  logic                                f1_rst_n,
  input  logic                                f1_start,
  input  logic [31:0]                         f1_n_sites,
  input  logic [63:0]                         f1_addr_lvec,
  input  logic [63:0]                         f1_addr_rvec,
  input  logic [63:0]                         f1_addr_pvec,
  input  logic [63:0]                         f1_addr_lmat,
  input  logic [63:0]                         f1_addr_rmat,
  input  logic [63:0]                         f1_addr_ev,
  input  logic [63:0]                         f1_addr_wgt,
  output logic                                f1_busy,
  output logic                                f1_done_pulse,
  output logic [31:0]                         f1_scale_count,
  output logic                                f1_c0_rq_valid,
  input  logic                                f1_c0_rq_ready,
  output logic [63:0]                         f1_c0_rq_addr,
  input  logic                                f1_c0_rs_valid,
  input  logic [F1_LANES*64-1:0]              f1_c0_rs_data,
  output logic                                f1_c1_rq_valid,
  input  logic                                f1_c1_rq_ready,
  output logic [63:0]                         f1_c1_rq_addr,
  input  logic                                f1_c1_rs_valid,
  input  logic [F1_LANES*64-1:0]              f1_c1_rs_data,
  output logic                                f1_c2_wr_valid,
  input  logic                                f1_c2_wr_ready,
  output logic [63:0]                         f1_c2_wr_addr,
  output logic [F1_LANES*64-1:0]              f1_c2_wr_data,
  output logic                                f1_c3_rq_valid,
  input  logic                                f1_c3_rq_ready,
  output logic [63:0]                         f1_c3_rq_addr,
  input  logic                                f1_c3_rs_valid,
  input  logic [63:0]                         f1_c3_rs_data,
  // ---------------- ZCU102 PL subsystem ----------------
  input  logic                                z_clk,
  input  logic                                z_rst_n,
  input  logic [Z_NCORES-1:0]                 z_reg_we,
  input  logic [Z_NCORES-1:0][7:0]            z_reg_addr,
  input  logic [Z_NCORES-1:0][63:0]           z_reg_wdata,
  output logic [Z_NCORES-1:0][63:0]           z_reg_rdata,
  input  logic [Z_NCORES-1:0]                 z_l_tvalid,
  output logic [Z_NCORES-1:0]                 z_l_tready,
  input  logic [Z_NCORES-1:0][Z_LANES*64-1:0] z_l_tdata,
  input  logic [Z_NCORES-1:0]                 z_r_tvalid,
  output logic [Z_NCORES-1:0]                 z_r_tready,
  input  logic [Z_NCORES-1:0][Z_LANES*64-1:0] z_r_tdata,
  output logic [Z_NCORES-1:0]                 z_p_tvalid,
  input  logic [Z_NCORES-1:0]                 z_p_tready,
  output logic [Z_NCORES-1:0][Z_LANES*64-1:0] z_p_tdata,
  output logic [Z_NCORES-1:0]                 z_p_tlast,
  output logic [Z_NCORES-1:0]                 z_busy
);

  plf_f1_accel #(.LANES(F1_LANES), .FIFO_DEPTH(F1_FIFO), .ADDR_W(64)) u_f1 (
    .clk(f1_clk), .rst_n(f1_rst_n), .start(f1_start), .n_sites(f1_n_sites),
    .addr_lvec(f1_addr_lvec), .addr_rvec(f1_addr_rvec), .addr_pvec(f1_addr_pvec),
    .addr_lmat(f1_addr_lmat), .addr_rmat(f1_addr_rmat), .addr_ev(f1_addr_ev), .addr_wgt(f1_addr_wgt),
    .busy(f1_busy), .done_pulse(f1_done_pulse), .scale_count(f1_scale_count),
    .c0_rq_valid(f1_c0_rq_valid), .c0_rq_ready(f1_c0_rq_ready), .c0_rq_addr(f1_c0_rq_addr),
    .c0_rs_valid(f1_c0_rs_valid), .c0_rs_data(f1_c0_rs_data),
    .c1_rq_valid(f1_c1_rq_valid), .c1_rq_ready(f1_c1_rq_ready), .c1_rq_addr(f1_c1_rq_addr),
    .c1_rs_valid(f1_c1_rs_valid), .c1_rs_data(f1_c1_rs_data),
    .c2_wr_valid(f1_c2_wr_valid), .c2_wr_ready(f1_c2_wr_ready), .c2_wr_addr(f1_c2_wr_addr),
    .c2_wr_data(f1_c2_wr_data),
    .c3_rq_valid(f1_c3_rq_valid), .c3_rq_ready(f1_c3_rq_ready), .c3_rq_addr(f1_c3_rq_addr),
    .c3_rs_valid(f1_c3_rs_valid), .c3_rs_data(f1_c3_rs_data));

  plf_zynq_system #(.NCORES(Z_NCORES), .LANES(Z_LANES)) u_zynq (
    .clk(z_clk), .rst_n(z_rst_n),
    .reg_we(z_reg_we), .reg_addr(z_reg_addr), .reg_wdata(z_reg_wdata), .reg_rdata(z_reg_rdata),
    .l_tvalid(z_l_tvalid), .l_tready(z_l_tready), .l_tdata(z_l_tdata),
    .r_tvalid(z_r_tvalid), .r_tready(z_r_tready), .r_tdata(z_r_tdata),
    .p_tvalid(z_p_tvalid), .p_tready(z_p_tready), .p_tdata(z_p_tdata), .p_tlast(z_p_tlast),
    .busy(z_busy));

endmodule
