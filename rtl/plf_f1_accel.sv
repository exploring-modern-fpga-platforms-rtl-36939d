// plf_f1_accel: the PLF accelerator of the AWS F1 card, organised as a
// decoupled access/execute dataflow pipeline. Seven access units move data
// between the card's DDR4 channels and one wide execution unit (plf_core with
// LANES = 8, i.e. 512-bit streams, one parent site every two cycles):
//   channel 0 (512-bit read)  : left child vector  -> FIFO AU -> EX
//   channel 1 (512-bit read)  : right child vector -> FIFO AU -> EX
//   channel 2 (512-bit write) : EX -> FIFO AU -> parent vector
//   channel 3 (64-bit read)   : left matrix, right matrix and eigenvector
//                               register-file AUs and the weight FIFO AU,
//                               merged by a round-robin arbiter.
// An invocation (start pulse with the argument ports held) prefetches the
// matrices, then streams n_sites sites; done_pulse marks its end and
// scale_count holds the summed weights of the sites that were scaled.
// Memory channel protocol (a simplified in-order read channel): a read
// request is rq_valid/rq_ready with a byte address; read data returns in
// request order as rs_valid/rs_data and must be accepted. Writes carry
// address and data together under wr_valid/wr_ready.
// Weights are one 64-bit word per site with the weight in the low 32 bits.
// The seven access units, the channel assignment and the 512-bit execution
// unit follow the architecture; the channel protocol, the weight layout and
// the FIFO depths are this design's choice.
module plf_f1_accel
  import plf_pkg::*;
#(
  parameter int LANES      = 8,
  parameter int FIFO_DEPTH = 32,
  parameter int ADDR_W     = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // control and kernel arguments
  input  logic                    start,
  input  logic [31:0]             n_sites,
  input  logic [ADDR_W-1:0]       addr_lvec,
  input  logic [ADDR_W-1:0]       addr_rvec,
  input  logic [ADDR_W-1:0]       addr_pvec,
  input  logic [ADDR_W-1:0]       addr_lmat,
  input  logic [ADDR_W-1:0]       addr_rmat,
  input  logic [ADDR_W-1:0]       addr_ev,
  input  logic [ADDR_W-1:0]       addr_wgt,
  output logic                    busy,
  output logic                    done_pulse,
  output logic [31:0]             scale_count,
  // channel 0: left vector read
  output logic                    c0_rq_valid,
  input  logic                    c0_rq_ready,
  output logic [ADDR_W-1:0]       c0_rq_addr,
  input  logic                    c0_rs_valid,
  input  logic [LANES*64-1:0]     c0_rs_data,
  // channel 1: right vector read
  output logic                    c1_rq_valid,
  input  logic                    c1_rq_ready,
  output logic [ADDR_W-1:0]       c1_rq_addr,
  input  logic                    c1_rs_valid,
  input  logic [LANES*64-1:0]     c1_rs_data,
  // channel 2: parent vector write
  output logic                    c2_wr_valid,
  input  logic                    c2_wr_ready,
  output logic [ADDR_W-1:0]       c2_wr_addr,
  output logic [LANES*64-1:0]     c2_wr_data,
  // channel 3: matrices and weights read (64-bit)
  output logic                    c3_rq_valid,
  input  logic                    c3_rq_ready,
  output logic [ADDR_W-1:0]       c3_rq_addr,
  input  logic                    c3_rs_valid,
  input  logic [63:0]             c3_rs_data
);

  localparam int DW = LANES * 64;

  logic [31:0] n_beats;
  assign n_beats = n_sites * 32'(SITE_DBL / LANES);

  logic start_mat, start_stream, clear_scale;
  logic lmat_done, rmat_done, ev_done, wgt_done, lv_done, rv_done, out_done;

  plf_f1_ctrl u_ctrl (
    .clk, .rst_n, .start, .mat_done(lmat_done && rmat_done && ev_done),
    .out_done, .start_mat, .start_stream, .clear_scale, .busy, .done_pulse);

  // ---------------- shared 64-bit channel ----------------
  logic [3:0]             a_rq_valid, a_rq_ready, a_rs_valid;
  logic [3:0][ADDR_W-1:0] a_rq_addr;
  logic [63:0]            a_rs_data;

  mem_arbiter #(.NREQ(4), .DATA_W(64), .ADDR_W(ADDR_W), .MAX_OUT(FIFO_DEPTH)) u_arb (
    .clk, .rst_n, .rq_valid(a_rq_valid), .rq_ready(a_rq_ready), .rq_addr(a_rq_addr),
    .rs_valid(a_rs_valid), .rs_data(a_rs_data),
    .m_rq_valid(c3_rq_valid), .m_rq_ready(c3_rq_ready), .m_rq_addr(c3_rq_addr),
    .m_rs_valid(c3_rs_valid), .m_rs_data(c3_rs_data));

  f64_t [MAT_DBL-1:0] pl, pr;
  f64_t [EV_DBL-1:0]  ev;

  au_regfile_rd #(.NWORDS(MAT_DBL), .ADDR_W(ADDR_W)) u_au_lmat (
    .clk, .rst_n, .start(start_mat), .base_addr(addr_lmat), .done(lmat_done),
    .rq_valid(a_rq_valid[0]), .rq_ready(a_rq_ready[0]), .rq_addr(a_rq_addr[0]),
    .rs_valid(a_rs_valid[0]), .rs_data(a_rs_data), .regs(pl));

  au_regfile_rd #(.NWORDS(MAT_DBL), .ADDR_W(ADDR_W)) u_au_rmat (
    .clk, .rst_n, .start(start_mat), .base_addr(addr_rmat), .done(rmat_done),
    .rq_valid(a_rq_valid[1]), .rq_ready(a_rq_ready[1]), .rq_addr(a_rq_addr[1]),
    .rs_valid(a_rs_valid[1]), .rs_data(a_rs_data), .regs(pr));

  au_regfile_rd #(.NWORDS(EV_DBL), .ADDR_W(ADDR_W)) u_au_ev (
    .clk, .rst_n, .start(start_mat), .base_addr(addr_ev), .done(ev_done),
    .rq_valid(a_rq_valid[2]), .rq_ready(a_rq_ready[2]), .rq_addr(a_rq_addr[2]),
    .rs_valid(a_rs_valid[2]), .rs_data(a_rs_data), .regs(ev));

  logic        w_valid, w_ready;
  logic [63:0] w_word;

  au_stream_rd #(.DATA_W(64), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(ADDR_W)) u_au_wgt (
    .clk, .rst_n, .start(start_stream), .base_addr(addr_wgt), .n_words(n_sites), .done(wgt_done),
    .rq_valid(a_rq_valid[3]), .rq_ready(a_rq_ready[3]), .rq_addr(a_rq_addr[3]),
    .rs_valid(a_rs_valid[3]), .rs_data(a_rs_data),
    .o_valid(w_valid), .o_ready(w_ready), .o_data(w_word));

  // ---------------- child vector streams ----------------
  logic          l_valid, l_ready, r_valid, r_ready, p_valid, p_ready;
  logic [DW-1:0] l_word, r_word, p_word;

  au_stream_rd #(.DATA_W(DW), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(ADDR_W)) u_au_lvec (
    .clk, .rst_n, .start(start_stream), .base_addr(addr_lvec), .n_words(n_beats), .done(lv_done),
    .rq_valid(c0_rq_valid), .rq_ready(c0_rq_ready), .rq_addr(c0_rq_addr),
    .rs_valid(c0_rs_valid), .rs_data(c0_rs_data),
    .o_valid(l_valid), .o_ready(l_ready), .o_data(l_word));

  au_stream_rd #(.DATA_W(DW), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(ADDR_W)) u_au_rvec (
    .clk, .rst_n, .start(start_stream), .base_addr(addr_rvec), .n_words(n_beats), .done(rv_done),
    .rq_valid(c1_rq_valid), .rq_ready(c1_rq_ready), .rq_addr(c1_rq_addr),
    .rs_valid(c1_rs_valid), .rs_data(c1_rs_data),
    .o_valid(r_valid), .o_ready(r_ready), .o_data(r_word));

  // ---------------- execution unit ----------------
  f64_t [LANES-1:0] l_data, r_data, p_data;
  assign l_data = l_word;
  assign r_data = r_word;
  assign p_word = p_data;

  logic ex_busy;

  plf_core #(.LANES(LANES)) u_ex (
    .clk, .rst_n, .clear(clear_scale), .pl, .pr, .ev,
    .l_valid, .l_ready, .l_data, .r_valid, .r_ready, .r_data,
    .w_valid, .w_ready, .w_data(w_word[31:0]),
    .p_valid, .p_ready, .p_data, .scale_count, .busy(ex_busy));

  // ---------------- parent vector write ----------------
  au_stream_wr #(.DATA_W(DW), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(ADDR_W)) u_au_out (
    .clk, .rst_n, .start(start_stream), .base_addr(addr_pvec), .n_words(n_beats), .done(out_done),
    .i_valid(p_valid), .i_ready(p_ready), .i_data(p_word),
    .wr_valid(c2_wr_valid), .wr_ready(c2_wr_ready), .wr_addr(c2_wr_addr), .wr_data(c2_wr_data));

  // all input streams are exhausted when the last parent word is written
  assert property (@(posedge clk) disable iff (!rst_n)
                   done_pulse |-> (lv_done && rv_done && wgt_done && !ex_busy));

endmodule
