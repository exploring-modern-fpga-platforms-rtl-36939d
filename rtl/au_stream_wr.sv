// au_stream_wr: FIFO-based write access unit. It accepts the parent vector
// stream from the execution unit into a FIFO and writes each word to
// consecutive addresses from base_addr (step DATA_W/8) on a memory write
// channel (valid/ready with address and data together). done rises once
// n_words writes have been accepted by the channel and stays high until the
// next start. Words arriving before start are held in the FIFO.
// The FIFO-based output unit follows the architecture; the write channel
// format and FIFO depth are this design's choice.
module au_stream_wr #(
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
  input  logic              i_valid,
  output logic              i_ready,
  input  logic [DATA_W-1:0] i_data,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);

  logic [31:0] written;
  logic        active, f_valid, f_ready;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid(i_valid), .in_ready(i_ready), .in_data(i_data),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(wr_data), .count());

  assign wr_valid = active && f_valid && (written != n_words);
  assign f_ready  = wr_valid && wr_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      done    <= 1'b0;
      written <= '0;
      wr_addr <= '0;
    end else if (start) begin
      active  <= 1'b1;
      done    <= 1'b0;
      written <= '0;
      wr_addr <= base_addr;
    end else if (active) begin
      if (f_ready) begin
        written <= written + 1;
        wr_addr <= wr_addr + ADDR_W'(DATA_W / 8);
      end
      if (written + 32'(f_ready) == n_words) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
