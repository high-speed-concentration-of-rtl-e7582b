// pair_fifo: first-word-fall-through FIFO of two-sample words, written as a
// block-memory array.
//
// Each merger input is buffered in block memory that is read and written one
// fixed-size word per clock; the word is two samples, as the two-samples-per-
// clock merger needs. The memory is read synchronously (as block RAM is) into
// an output register, which is refilled in the same clock the head word is
// popped, so a word can leave every clock. Total capacity is DEPTH words in the
// array plus one in the output register.
//
// Interface: write with in_valid/in_ready (a word is taken when both are high);
// out_data/out_valid show the head word, pop removes it (only while out_valid).
// A word written at clock edge t is visible on out_data after edge t+1 when the
// FIFO was empty. Reset is synchronous and active low and empties the FIFO.
//
// The block-memory FWFT FIFO itself follows the source design; the depth, the
// handshake and the reset are this design's choices.
module pair_fifo
  import merge_pkg::*;
#(
  parameter int unsigned DEPTH = 512   // words in the memory array, power of two
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output pair_t out_data,
  output logic  out_valid,
  input  logic  pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pair_t         mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic [AW:0]   used;
  logic          fetch;
  logic          push;

  assign used     = wptr - rptr;
  assign in_ready = (used != (AW+1)'(DEPTH));
  assign push     = in_valid && in_ready;
  // Refill the output register whenever it is empty or being emptied.
  assign fetch    = (used != '0) && (!out_valid || pop);

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (fetch) out_data <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (push)  wptr <= wptr + 1'b1;
      if (fetch) begin
        rptr      <= rptr + 1'b1;
        out_valid <= 1'b1;
      end else if (pop) begin
        out_valid <= 1'b0;
      end
    end
  end

  initial begin
    if ((DEPTH & (DEPTH - 1)) != 0 || DEPTH < 2)
      $error("pair_fifo: DEPTH must be a power of two >= 2");
  end

  a_pop_when_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid)
    else $error("pair_fifo: pop while empty");

endmodule
