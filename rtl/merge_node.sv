// merge_node: complete two-input merger unit.
//
// Each input stream of two-sample words is buffered in its own block-memory
// FWFT FIFO (pair_fifo); a one-sample register (stream_buf) after each FIFO
// lets the merger consume one or two samples of a stream per clock, and the
// merger (merger) emits the two oldest samples of the four it sees. This
// FIFO -> register -> merger arrangement follows the source design; the FIFO
// depth is this design's choice.
//
// Interface: a_*/b_* accept two-sample words (element 0 older) with
// valid/ready; out_* give the merged stream, two samples per clock, with
// valid/ready. Latency: a word written into empty FIFOs at clock edge t
// makes out_valid rise at edge t+2 (FIFO output register, then merger output
// register).
// The unit waits while either FIFO is empty, so the last samples of a stream
// leave only once a later-timestamped sample arrives on the other input.
module merge_node
  import merge_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t a_data,
  input  logic  a_valid,
  output logic  a_ready,
  input  pair_t b_data,
  input  logic  b_valid,
  output logic  b_ready,
  output pair_t out_data,
  output logic  out_valid,
  input  logic  out_ready
);

  pair_t      fa_data, fb_data, sa, sb;
  logic       fa_valid, fb_valid, fa_pop, fb_pop, sa_valid, sb_valid;
  logic [1:0] a_take, b_take;

  pair_fifo #(.DEPTH(DEPTH)) u_fifo_a (
    .clk, .rst_n, .in_data(a_data), .in_valid(a_valid), .in_ready(a_ready),
    .out_data(fa_data), .out_valid(fa_valid), .pop(fa_pop));

  pair_fifo #(.DEPTH(DEPTH)) u_fifo_b (
    .clk, .rst_n, .in_data(b_data), .in_valid(b_valid), .in_ready(b_ready),
    .out_data(fb_data), .out_valid(fb_valid), .pop(fb_pop));

  stream_buf u_buf_a (
    .clk, .rst_n, .fifo_data(fa_data), .fifo_valid(fa_valid), .fifo_pop(fa_pop),
    .seen(sa), .seen_valid(sa_valid), .take(a_take));

  stream_buf u_buf_b (
    .clk, .rst_n, .fifo_data(fb_data), .fifo_valid(fb_valid), .fifo_pop(fb_pop),
    .seen(sb), .seen_valid(sb_valid), .take(b_take));

  merger u_merger (
    .clk, .rst_n,
    .a(sa), .a_valid(sa_valid), .a_take,
    .b(sb), .b_valid(sb_valid), .b_take,
    .out_data, .out_valid, .out_ready, .sel(), .fire());

endmodule
