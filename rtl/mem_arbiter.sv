// mem_arbiter: shares one read channel among NREQ access units. Requests are
// granted round-robin, one per cycle; the index of each granted requester is
// pushed into an ordering FIFO, and since the channel answers in request
// order, each returning word is delivered to the requester at the head of
// that FIFO. At most MAX_OUT requests are outstanding at a time.
// In the F1 accelerator it merges the left-matrix, right-matrix, eigenvector
// and weight access units onto the 64-bit memory channel. The sharing of one
// channel by these four units follows the architecture; round-robin order
// and the response-routing FIFO are this design's choice.
module mem_arbiter #(
  parameter int NREQ    = 4,
  parameter int DATA_W  = 64,
  parameter int ADDR_W  = 64,
  parameter int MAX_OUT = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NREQ-1:0]              rq_valid,
  output logic [NREQ-1:0]              rq_ready,
  input  logic [NREQ-1:0][ADDR_W-1:0]  rq_addr,
  output logic [NREQ-1:0]              rs_valid,
  output logic [DATA_W-1:0]            rs_data,
  output logic                         m_rq_valid,
  input  logic                         m_rq_ready,
  output logic [ADDR_W-1:0]            m_rq_addr,
  input  logic                         m_rs_valid,
  input  logic [DATA_W-1:0]            m_rs_data
);

  localparam int IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0] last, gnt;
  logic          any, ord_ready, ord_valid;
  logic [IW-1:0] head;

  always_comb begin
    any = 1'b0;
    gnt = last;
    for (int i = 1; i <= NREQ; i++) begin
      logic [IW-1:0] c;
      c = IW'((int'(last) + i) % NREQ);
      if (!any && rq_valid[c]) begin
        any = 1'b1;
        gnt = c;
      end
    end
  end

  assign m_rq_valid = any && ord_ready;
  assign m_rq_addr  = rq_addr[gnt];
  always_comb begin
    rq_ready = '0;
    rq_ready[gnt] = m_rq_valid && m_rq_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                         last <= IW'(NREQ - 1);
    else if (m_rq_valid && m_rq_ready)  last <= gnt;
  end

  sync_fifo #(.WIDTH(IW), .DEPTH(MAX_OUT)) u_order (
    .clk, .rst_n, .in_valid(m_rq_valid && m_rq_ready), .in_ready(ord_ready), .in_data(gnt),
    .out_valid(ord_valid), .out_ready(m_rs_valid), .out_data(head), .count());

  always_comb begin
    rs_valid = '0;
    rs_valid[head] = m_rs_valid;
  end
  assign rs_data = m_rs_data;

  assert property (@(posedge clk) disable iff (!rst_n) m_rs_valid |-> ord_valid);

endmodule
