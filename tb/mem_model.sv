// mem_model: behavioural model of one memory channel of the accelerator card
// (a DDR4 bank behind its controller), for simulation only. Storage is a
// sparse array of DATA_W-bit words indexed by byte address. Read requests are
// accepted with a random ready (high READY_PCT percent of the time), answered in order after LAT cycles with
// rs_valid/rs_data; writes are accepted with a random ready and stored.
// reads/writes count the accepted transfers.
module mem_model #(
  parameter int DATA_W = 512,
  parameter int LAT    = 8,
  parameter int READY_PCT = 80
) (
  input  logic              clk,
  input  logic              rq_valid,
  output logic              rq_ready,
  input  logic [63:0]       rq_addr,
  output logic              rs_valid,
  output logic [DATA_W-1:0] rs_data,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [63:0]       wr_addr,
  input  logic [DATA_W-1:0] wr_data
);
  logic [DATA_W-1:0] store [logic [63:0]];
  logic [LAT-1:0]              pv = '0;
  logic [LAT-1:0][DATA_W-1:0]  pd;
  int reads = 0, writes = 0, rq_stalls = 0;

  initial begin rq_ready = 0; wr_ready = 0; end

  always @(posedge clk) begin
    logic [DATA_W-1:0] d;
    if (rq_valid && !rq_ready) rq_stalls++;
    d = '0;
    if (rq_valid && rq_ready) begin
      reads++;
      if (store.exists(rq_addr)) d = store[rq_addr];
    end
    pv <= {pv[LAT-2:0], rq_valid && rq_ready};
    pd <= {pd[LAT-2:0], d};
    if (wr_valid && wr_ready) begin
      store[wr_addr] = wr_data;
      writes++;
    end
    rq_ready <= ($urandom_range(99) < READY_PCT);
    wr_ready <= ($urandom_range(99) < READY_PCT);
  end

  assign rs_valid = pv[LAT-1];
  assign rs_data  = pd[LAT-1];
endmodule
