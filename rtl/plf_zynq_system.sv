// plf_zynq_system: programmable-logic side of the ZCU102 design, two
// independent PLF cores (NCORES = 2). Two cores are used because together
// they saturate the PS-PL port bandwidth at 250 MHz. Each core has its own
// register port (driven by the processors over a memory-mapped port) and its
// own three streams, which connect to DMA engines reading and writing the
// processor's DDR memory. The DMA engines and the processing system are not
// part of this module; their sides of the streams are the ports here.
// The core count follows the architecture.
module plf_zynq_system
  import plf_pkg::*;
#(
  parameter int NCORES = 2,
  parameter int LANES  = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NCORES-1:0]                  reg_we,
  input  logic [NCORES-1:0][7:0]             reg_addr,
  input  logic [NCORES-1:0][63:0]            reg_wdata,
  output logic [NCORES-1:0][63:0]            reg_rdata,
  input  logic [NCORES-1:0]                  l_tvalid,
  output logic [NCORES-1:0]                  l_tready,
  input  logic [NCORES-1:0][LANES*64-1:0]    l_tdata,
  input  logic [NCORES-1:0]                  r_tvalid,
  output logic [NCORES-1:0]                  r_tready,
  input  logic [NCORES-1:0][LANES*64-1:0]    r_tdata,
  output logic [NCORES-1:0]                  p_tvalid,
  input  logic [NCORES-1:0]                  p_tready,
  output logic [NCORES-1:0][LANES*64-1:0]    p_tdata,
  output logic [NCORES-1:0]                  p_tlast,
  output logic [NCORES-1:0]                  busy
);

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    plf_zynq_core #(.LANES(LANES)) u_core (
      .clk, .rst_n,
      .reg_we(reg_we[c]), .reg_addr(reg_addr[c]), .reg_wdata(reg_wdata[c]), .reg_rdata(reg_rdata[c]),
      .l_tvalid(l_tvalid[c]), .l_tready(l_tready[c]), .l_tdata(l_tdata[c]),
      .r_tvalid(r_tvalid[c]), .r_tready(r_tready[c]), .r_tdata(r_tdata[c]),
      .p_tvalid(p_tvalid[c]), .p_tready(p_tready[c]), .p_tdata(p_tdata[c]), .p_tlast(p_tlast[c]),
      .busy(busy[c]));
  end

endmodule
