// tb_pair_fifo: self-checking testbench of the two-sample FWFT FIFO.
//
// A queue model follows every accepted write and every pop. Checked: the
// head word and its valid flag against the model, the full flag (capacity is
// DEPTH words in memory plus one in the output register), reset emptiness,
// and that a word can be written and read every clock once data is flowing.
module tb_pair_fifo;
  import merge_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  pair_t in_data;
  logic  in_valid;
  logic  in_ready;
  pair_t out_data;
  logic  out_valid;
  logic  pop;

  int checks = 0;
  int failures = 0;
  pair_t q[$];
  int unsigned wcount = 0;

  pair_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic pair_t word(input int unsigned n);
    pair_t p;
    p[0] = sample_t'({16'(2*n), 16'hA000 + 16'(n)});
    p[1] = sample_t'({16'(2*n + 1), 16'hB000 + 16'(n)});
    return p;
  endfunction

  // One clock: check outputs, apply the given inputs, update the model.
  task automatic cycle(input bit wr, input bit rd);
    bit accepted;
    @(negedge clk);
    if (q.size() == 0) check(!out_valid, "empty FIFO shows no word");
    if (out_valid) check(out_data == q[0], "head word matches model");
    check(in_ready == ((q.size() - (out_valid ? 1 : 0)) < DEPTH), "ready while the memory has room");
    if (q.size() == DEPTH + 1) check(!in_ready, "full at DEPTH+1 words");
    in_valid = wr;
    in_data  = word(wcount);
    pop      = rd && out_valid;
    accepted = in_valid && in_ready;
    @(posedge clk);
    #1;
    if (pop) void'(q.pop_front());
    if (accepted) begin
      q.push_back(in_data);
      wcount++;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, t0;
    in_valid = 0; pop = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!out_valid && in_ready, "reset state empty");

    // Fill to capacity without reading.
    repeat (DEPTH + 4) cycle(1'b1, 1'b0);
    check(q.size() == DEPTH + 1, "capacity DEPTH+1");
    check(!in_ready, "full flag");
    // Drain completely.
    repeat (DEPTH + 4) cycle(1'b0, 1'b1);
    check(q.size() == 0, "drained");

    // Streaming: one word in and one out per clock after the first two.
    cycle(1'b1, 1'b1);
    cycle(1'b1, 1'b1);
    n0 = int'(wcount) - q.size();
    t0 = 0;
    repeat (50) begin cycle(1'b1, 1'b1); t0++; end
    check((int'(wcount) - q.size()) - n0 == 50, "one word per clock when streaming");
    repeat (6) cycle(1'b0, 1'b1);

    // Random traffic.
    repeat (5000) cycle(($urandom % 4) != 0, ($urandom % 3) != 0);
    repeat (DEPTH + 4) cycle(1'b0, 1'b1);
    check(q.size() == 0, "drained after random traffic");

    // Reset in the middle of data empties the FIFO.
    repeat (4) cycle(1'b1, 1'b0);
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    q.delete();
    rst_n = 1'b1;
    @(negedge clk);
    check(!out_valid, "reset empties");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
