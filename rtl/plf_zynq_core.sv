// plf_zynq_core: one PLF core of the ZCU102 system. The execution unit runs
// with 128-bit streams (LANES = 2, one parent site every eight cycles), fed
// by two stream inputs (left and right child vectors, from two DMA engines)
// and producing one stream output (parent vector, to a third DMA channel).
// A memory-mapped register port loads the left and right transition matrices
// and the inverted eigenvector before streaming starts.
// Register map (64-bit registers, index = reg_addr):
//   0..63    left matrices  P_L[k][u][s] at k*16+u*4+s   (write)
//   64..127  right matrices P_R[k][u][s]                 (write)
//   128..143 inverted eigenvector EV[j][l] at j*4+l      (write)
//   144      site count of the next run (sets TLAST)     (write/read)
//   145      write: clear the scaling counter; read: scaling counter
// Reads of 0..143 return the register file. The ZCU102 data path has no
// weight stream, so every site counts with weight 1: the scaling counter is
// the number of scaled sites. The parent stream marks the last beat of the
// run with p_tlast. All streams use AXI4-Stream style tvalid/tready.
// Two input streams, one output stream, a memory-mapped matrix interface and
// 128-bit width follow the architecture; the register map, weight 1 per site
// and TLAST are this design's choice.
module plf_zynq_core
  import plf_pkg::*;
#(
  parameter int LANES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // memory-mapped register port
  input  logic                  reg_we,
  input  logic [7:0]            reg_addr,
  input  logic [63:0]           reg_wdata,
  output logic [63:0]           reg_rdata,
  // left / right child streams
  input  logic                  l_tvalid,
  output logic                  l_tready,
  input  logic [LANES*64-1:0]   l_tdata,
  input  logic                  r_tvalid,
  output logic                  r_tready,
  input  logic [LANES*64-1:0]   r_tdata,
  // parent stream
  output logic                  p_tvalid,
  input  logic                  p_tready,
  output logic [LANES*64-1:0]   p_tdata,
  output logic                  p_tlast,
  output logic                  busy
);

  localparam int NREG = MAT_DBL * 2 + EV_DBL;   // 144
  localparam int OBEATS = SITE_DBL / LANES;

  f64_t [NREG-1:0]   rf;
  logic [31:0]       n_sites, scale_count, beat_cnt;
  logic              clear;
  f64_t [LANES-1:0]  l_data, r_data, p_data;

  always_ff @(posedge clk)
    if (reg_we && reg_addr < 8'(NREG)) rf[reg_addr] <= reg_wdata;

  always_ff @(posedge clk) begin
    if (!rst_n)                                 n_sites <= '0;
    else if (reg_we && reg_addr == 8'(NREG))    n_sites <= reg_wdata[31:0];
  end

  assign clear = reg_we && (reg_addr == 8'(NREG + 1));

  always_comb begin
    if (reg_addr < 8'(NREG))              reg_rdata = rf[reg_addr];
    else if (reg_addr == 8'(NREG))        reg_rdata = {32'd0, n_sites};
    else if (reg_addr == 8'(NREG + 1))    reg_rdata = {32'd0, scale_count};
    else                                  reg_rdata = '0;
  end

  assign l_data  = l_tdata;
  assign r_data  = r_tdata;
  assign p_tdata = p_data;

  plf_core #(.LANES(LANES)) u_core (
    .clk, .rst_n, .clear,
    .pl(rf[MAT_DBL-1:0]), .pr(rf[2*MAT_DBL-1:MAT_DBL]), .ev(rf[NREG-1:2*MAT_DBL]),
    .l_valid(l_tvalid), .l_ready(l_tready), .l_data,
    .r_valid(r_tvalid), .r_ready(r_tready), .r_data,
    .w_valid(1'b1), .w_ready(), .w_data(32'd1),
    .p_valid(p_tvalid), .p_ready(p_tready), .p_data,
    .scale_count, .busy);

  // TLAST after n_sites * OBEATS parent beats
  always_ff @(posedge clk) begin
    if (!rst_n || clear) beat_cnt <= '0;
    else if (p_tvalid && p_tready)
      beat_cnt <= p_tlast ? '0 : beat_cnt + 1;
  end
  assign p_tlast = (beat_cnt == n_sites * 32'(OBEATS) - 1);

endmodule
