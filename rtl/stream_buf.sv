// stream_buf: the one-sample register R between a FWFT FIFO and the merger.
//
// The FIFO delivers two samples per word (F0 older, F1 newer), but the merger
// may consume one or two samples of a stream per clock. When it consumes one,
// the unused newer sample is kept in R and the FIFO word is popped, so the
// merger always sees the two oldest samples of the stream:
//   R empty: seen = (F0, F1)        R full: seen = (R, F0)
// The stream counts as presenting two samples exactly when the FIFO has a head
// word (R alone is not enough). Update rules, take = samples consumed:
//   take 1, R empty : F1 -> R, pop        take 1, R full : R emptied, no pop
//   take 2, R empty : pop                 take 2, R full : F1 -> R, pop
// All of this, R fed from F1 and a selector in front of the merger, follows the
// source design; the reset (R empty) is this design's choice.
//
// seen_valid is the FIFO's valid flag passed straight through: the stream
// shows two samples whenever the FIFO has a word, whether or not R is full.
//
// Timing: seen/seen_valid are combinational from the FIFO head and R; take is
// applied at the next clock edge, and fifo_pop is combinational from take.
module stream_buf
  import merge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pair_t      fifo_data,
  input  logic       fifo_valid,
  output logic       fifo_pop,
  output pair_t      seen,
  output logic       seen_valid,
  input  logic [1:0] take
);

  sample_t r;
  logic    r_valid;
  logic    r_valid_next;

  assign seen_valid = fifo_valid;
  assign seen[0]    = r_valid ? r            : fifo_data[0];
  assign seen[1]    = r_valid ? fifo_data[0] : fifo_data[1];

  always_comb begin
    fifo_pop     = 1'b0;
    r_valid_next = r_valid;
    unique case (take)
      2'd1: begin
        fifo_pop     = !r_valid;
        r_valid_next = !r_valid;
      end
      2'd2: fifo_pop = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (fifo_pop && r_valid_next) r <= fifo_data[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) r_valid <= 1'b0;
    else        r_valid <= r_valid_next;
  end

  a_take_needs_data: assert property (@(posedge clk) disable iff (!rst_n)
      (take != 2'd0) |-> seen_valid)
    else $error("stream_buf: take without two samples");
  a_take_range: assert property (@(posedge clk) disable iff (!rst_n) take != 2'd3)
    else $error("stream_buf: take of three");

endmodule
