// merge_tree: concentrator of S sorted streams into one sorted stream.
//
// Merging many streams in one unit needs many comparisons per clock, so the
// streams are merged in a binary tree of two-input merger units (merge_node),
// each moving two samples per clock. The FIFOs between tree levels are the
// input FIFOs of the next level's units. With f_clk the clock the output
// bandwidth is 2 * f_clk samples/s; the sum of the input rates must stay
// below it.
//
// Streams are numbered as a heap: stream 1 is the output, unit k (1..S-1)
// merges streams 2k and 2k+1 into stream k, and input i is stream S+i. The
// binary tree and S = 4 (two levels) follow the source design; the heap
// numbering, the FIFO depth and the handshakes are this design's choices.
//
// Interface: in_data[i] is a two-sample word of input stream i (element 0 the
// older sample, every stream non-decreasing in timestamp), taken when
// in_valid[i] && in_ready[i]. out_data/out_valid/out_ready give the merged
// stream, two samples per clock. Latency through an empty tree: a word
// written into the leaf FIFOs at clock edge t reaches out_valid at edge
// t + 2 + 3 * (log2(S) - 1), since each further level adds its FIFO write. The tree waits while any input is empty: to flush the last
// samples, sources append samples with a larger timestamp.
module merge_tree
  import merge_pkg::*;
#(
  parameter int unsigned S     = 4,    // number of input streams, power of two >= 2
  parameter int unsigned DEPTH = 512   // words per input FIFO of every unit
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pair_t        in_data  [S],
  input  logic [S-1:0] in_valid,
  output logic [S-1:0] in_ready,
  output pair_t        out_data,
  output logic         out_valid,
  input  logic         out_ready
);

  // Heap-numbered streams 1 .. 2S-1.
  pair_t          st_data  [1:2*S-1];
  logic [2*S-1:1] st_valid;
  logic [2*S-1:1] st_ready;

  for (genvar i = 0; i < S; i++) begin : g_in
    assign st_data[S+i]  = in_data[i];
    assign st_valid[S+i] = in_valid[i];
    assign in_ready[i]   = st_ready[S+i];
  end

  for (genvar k = 1; k < S; k++) begin : g_node
    merge_node #(.DEPTH(DEPTH)) u_node (
      .clk, .rst_n,
      .a_data (st_data[2*k]),   .a_valid(st_valid[2*k]),   .a_ready(st_ready[2*k]),
      .b_data (st_data[2*k+1]), .b_valid(st_valid[2*k+1]), .b_ready(st_ready[2*k+1]),
      .out_data(st_data[k]), .out_valid(st_valid[k]), .out_ready(st_ready[k]));
  end

  assign out_data    = st_data[1];
  assign out_valid   = st_valid[1];
  assign st_ready[1] = out_ready;

  initial begin
    if ((S & (S - 1)) != 0 || S < 2)
      $error("merge_tree: S must be a power of two >= 2");
  end

endmodule
