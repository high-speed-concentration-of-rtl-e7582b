// merger: two-input merger producing two samples per clock.
//
// Each input stream is sorted, and presents its two oldest samples (X0 <= X1).
// The merger waits until both streams present two samples, so that a sample
// still to arrive on an empty stream can never be older than one already sent.
// It then takes the two oldest of the four with two comparisons instead of the
// three of a generic search, using the fact that each pair is ordered:
//   AF1 <= BF0  -> both samples of A are the oldest      (SEL_A2)
//   BF1 <= AF0  -> both samples of B are the oldest      (SEL_B2)
//   otherwise   -> one from each; AF0 <= BF0 decides which goes first
// The comparisons and the decision follow the source design; the order of the
// tests (A first on equal timestamps) and the output register with valid/ready
// back-pressure are this design's choices.
//
// Timing: a_take/b_take/fire are combinational in the clock where both inputs
// are valid and the output register is free (empty or being read); the
// selected pair appears on out_data one clock later. Throughput is one pair,
// two samples, per clock.
module merger
  import merge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pair_t      a,
  input  logic       a_valid,
  output logic [1:0] a_take,
  input  pair_t      b,
  input  logic       b_valid,
  output logic [1:0] b_take,
  output pair_t      out_data,
  output logic       out_valid,
  input  logic       out_ready,
  output sel_e       sel,
  output logic       fire
);

  pair_t chosen;

  always_comb begin
    if (a[1].ts <= b[0].ts)      sel = SEL_A2;
    else if (b[1].ts <= a[0].ts) sel = SEL_B2;
    else if (a[0].ts <= b[0].ts) sel = SEL_AB;
    else                         sel = SEL_BA;
  end

  always_comb begin
    unique case (sel)
      SEL_A2:  chosen = a;
      SEL_B2:  chosen = b;
      SEL_AB:  chosen = '{b[0], a[0]};
      default: chosen = '{a[0], b[0]};
    endcase
  end

  assign fire   = a_valid && b_valid && (!out_valid || out_ready);
  assign a_take = !fire ? 2'd0 : (sel == SEL_A2) ? 2'd2 : (sel == SEL_B2) ? 2'd0 : 2'd1;
  assign b_take = !fire ? 2'd0 : (sel == SEL_B2) ? 2'd2 : (sel == SEL_A2) ? 2'd0 : 2'd1;

  always_ff @(posedge clk) begin
    if (fire) out_data <= chosen;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         out_valid <= 1'b0;
    else if (fire)      out_valid <= 1'b1;
    else if (out_ready) out_valid <= 1'b0;
  end

  a_out_ordered: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid |-> (out_data[0].ts <= out_data[1].ts))
    else $error("merger: output pair out of order");
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("merger: output changed while stalled");

endmodule
