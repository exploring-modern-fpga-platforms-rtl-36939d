// au_stream_rd: FIFO-based read access unit of the decoupled access/execute
// accelerator. After start it walks n_words consecutive words from base_addr
// (byte address, step DATA_W/8), issuing one read request per word on a
// memory channel, and forwards the returned words through a FIFO as a
// ready/valid stream to the execution side.
// The memory channel returns read data in request order and has no ready:
// the unit issues a request only while the FIFO has room for every word still
// in flight (credit rule outstanding + occupancy < FIFO_DEPTH), so a response
// can always be stored.
// Timing: one request per cycle when the channel accepts it; done rises when
// all words have been received and stays high until the next start.
// FIFO-based stream access follows the architecture; the simplified memory
// channel, the credit rule and the FIFO depth are this design's choice.
module au_stream_rd #(
  parameter int DATA_W     = 512,
  parameter int FIFO_DEPTH = 32,
  parameter int ADDR_W     = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [31:0]       n_words,
  output logic              done,
  // memory channel
  output logic              rq_valid,
  input  logic              rq_ready,
  output logic [ADDR_W-1:0] rq_addr,
  input  logic              rs_valid,
  input  logic [DATA_W-1:0] rs_data,
  // stream toward the execution unit
  output logic              o_valid,
  input  logic              o_ready,
  output logic [DATA_W-1:0] o_data
);

  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  logic [31:0]       issued, received;
  logic [CW-1:0]     outstanding, occ;
  logic              active, issue, fifo_in_ready;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid(rs_valid), .in_ready(fifo_in_ready), .in_data(rs_data),
    .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data), .count(occ));

  assign rq_valid = active && (issued != n_words) &&
                    ((32'(outstanding) + 32'(occ)) < 32'(FIFO_DEPTH));
  assign issue    = rq_valid && rq_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active      <= 1'b0;
      done        <= 1'b0;
      issued      <= '0;
      received    <= '0;
      outstanding <= '0;
      rq_addr     <= '0;
    end else if (start) begin
      active      <= 1'b1;
      done        <= 1'b0;
      issued      <= '0;
      received    <= '0;
      outstanding <= '0;
      rq_addr     <= base_addr;
    end else begin
      if (issue) begin
        issued  <= issued + 1;
        rq_addr <= rq_addr + ADDR_W'(DATA_W / 8);
      end
      if (rs_valid) received <= received + 1;
      outstanding <= outstanding + CW'(issue) - CW'(rs_valid);
      if (active && received + 32'(rs_valid) == n_words) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  // a response always finds room in the FIFO thanks to the credit rule
  assert property (@(posedge clk) disable iff (!rst_n) rs_valid |-> fifo_in_ready);

endmodule
