// plf_f1_ctrl: invocation sequencer of the F1 accelerator. An invocation has
// two steps: first the left-matrix, right-matrix and eigenvector access units
// prefetch their register files; when all three report done, the vector,
// weight and output access units are started and the execution unit streams
// the sites. The invocation ends when the output access unit has written the
// whole parent vector.
// Interface: start (one-cycle pulse, ignored while busy); start_mat and
// start_stream are one-cycle pulses to the access units; clear_scale zeroes
// the execution unit's scaling counter at the start of an invocation;
// done_pulse marks the end; busy is high from start to done.
// The two-phase order follows the architecture; the pulse handshake and the
// 'armed' guard against stale done flags are this design's choice.
module plf_f1_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic mat_done,
  input  logic out_done,
  output logic start_mat,
  output logic start_stream,
  output logic clear_scale,
  output logic busy,
  output logic done_pulse
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STREAM} state_t;
  state_t state;
  logic   armed;   // the access units' done flags are from this invocation

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      start_mat    <= 1'b0;
      start_stream <= 1'b0;
      clear_scale  <= 1'b0;
      done_pulse   <= 1'b0;
      armed        <= 1'b0;
    end else begin
      start_mat    <= 1'b0;
      start_stream <= 1'b0;
      clear_scale  <= 1'b0;
      done_pulse   <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            state       <= S_LOAD;
            start_mat   <= 1'b1;
            clear_scale <= 1'b1;
            armed       <= 1'b0;
          end
        S_LOAD: begin
          armed <= 1'b1;
          if (armed && mat_done) begin
            state        <= S_STREAM;
            start_stream <= 1'b1;
            armed        <= 1'b0;
          end
        end
        S_STREAM: begin
          armed <= 1'b1;
          if (armed && out_done) begin
            state      <= S_IDLE;
            done_pulse <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
