// au_regfile_rd: prefetch access unit without FIFO. After start it reads
// NWORDS consecutive 64-bit words from base_addr into a register file
// (regs[i] = word at base_addr + 8*i) and raises done when the last word has
// arrived. Used for the left and right transition matrices (64 doubles) and
// the inverted eigenvector (16 doubles), which stay in the register files for
// the streaming phase.
// The memory channel returns data in request order without a ready signal;
// the responses are written straight into the register file, so no credit
// limit is needed. Prefetching into register files without a FIFO follows the
// architecture; the request/response channel is a simplified stand-in.
module au_regfile_rd
  import plf_pkg::*;
#(
  parameter int NWORDS = 64,
  parameter int ADDR_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  output logic              done,
  output logic              rq_valid,
  input  logic              rq_ready,
  output logic [ADDR_W-1:0] rq_addr,
  input  logic              rs_valid,
  input  f64_t              rs_data,
  output f64_t [NWORDS-1:0] regs
);

  localparam int IW = $clog2(NWORDS + 1);

  logic [IW-1:0] issued, received;
  logic          active;

  assign rq_valid = active && (issued != IW'(NWORDS));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= 1'b0;
      done     <= 1'b0;
      issued   <= '0;
      received <= '0;
      rq_addr  <= '0;
    end else if (start) begin
      active   <= 1'b1;
      done     <= 1'b0;
      issued   <= '0;
      received <= '0;
      rq_addr  <= base_addr;
    end else begin
      if (rq_valid && rq_ready) begin
        issued  <= issued + 1'b1;
        rq_addr <= rq_addr + ADDR_W'(8);
      end
      if (rs_valid && active) begin
        received <= received + 1'b1;
        if (received == IW'(NWORDS - 1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (rs_valid && active && received < IW'(NWORDS))
      regs[received] <= rs_data;

endmodule
