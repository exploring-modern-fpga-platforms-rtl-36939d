// sync_fifo: single-clock FIFO used by the stream access units.
// A circular buffer of DEPTH entries with read and write pointers and an
// occupancy counter. push/pop use ready/valid handshakes; the head entry is
// presented on out_data whenever out_valid is high (first-word fall-through).
// Reset (synchronous, active low) empties the FIFO; the storage itself is
// not reset. DEPTH must be a power of two.
// The stream access units of the architecture are FIFO-based; the depth and
// the fall-through style are this design's choice.
module sync_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  initial assert ((1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");

  assign in_ready  = (count != (AW + 1)'(DEPTH));
  assign out_valid = (count != '0);
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk)
    if (do_push) mem[wp] <= in_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW + 1)'(do_push) - (AW + 1)'(do_pop);
    end
  end

endmodule
