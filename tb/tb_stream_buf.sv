// tb_stream_buf: self-checking testbench of the one-sample register stage.
//
// The testbench plays the FWFT FIFO itself: a queue of two-sample words whose
// head is shown on fifo_data and removed on fifo_pop. A second, flat queue
// holds every sample of the stream not yet consumed. Each clock the two
// samples shown to the merger must be the two oldest of that flat queue, the
// stream must count as valid exactly when the FIFO has a word, and the FIFO
// must be popped only when its word has been used up (flat queue length is
// always 2 x words or 2 x words + 1, the extra one held in R).
module tb_stream_buf;
  import merge_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  pair_t      fifo_data;
  logic       fifo_valid;
  logic       fifo_pop;
  pair_t      seen;
  logic       seen_valid;
  logic [1:0] take;

  int checks = 0;
  int failures = 0;
  pair_t   words[$];
  sample_t sq[$];
  int unsigned n = 0;
  int takes1 = 0, takes2 = 0, rfull_seen = 0;

  stream_buf dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Present the head of the modelled FIFO (called after every change).
  function automatic void show();
    fifo_valid = words.size() != 0;
    fifo_data  = fifo_valid ? words[0] : '0;
  endfunction

  task automatic cycle(input bit arrive, input int want);
    int extra;
    bit popped;
    @(negedge clk);
    extra = sq.size() - 2 * words.size();
    check(extra == 0 || extra == 1, "at most one sample held in R");
    if (extra == 1 && words.size() != 0) rfull_seen++;
    check(seen_valid == (words.size() != 0), "valid exactly when the FIFO has a word");
    if (seen_valid) begin
      check(seen[0] == sq[0], "seen[0] is the oldest sample");
      check(seen[1] == sq[1], "seen[1] is the second oldest sample");
    end
    take = seen_valid ? 2'(want) : 2'd0;
    #1;
    if (take == 2'd1) check(fifo_pop == (extra == 0), "pop on take 1 only with R empty");
    if (take == 2'd2) check(fifo_pop, "pop on take 2");
    if (take == 2'd0) check(!fifo_pop, "no pop without take");
    popped = fifo_pop;
    @(posedge clk);
    #1;
    if (take == 2'd1) takes1++;
    if (take == 2'd2) takes2++;
    repeat (int'(take)) void'(sq.pop_front());
    if (popped) void'(words.pop_front());
    if (arrive) begin
      pair_t p;
      p[0] = sample_t'({16'(2 * n), 16'(n)});
      p[1] = sample_t'({16'(2 * n + 1), 16'(n) ^ 16'h8000});
      words.push_back(p);
      sq.push_back(p[0]);
      sq.push_back(p[1]);
      n++;
    end
    show();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    take = 2'd0;
    show();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // The example's sequence on one stream: take 1, then 2 with R full,
    // then 1 with R full, then 2 with R empty.
    cycle(1'b1, 0);
    cycle(1'b1, 1);
    cycle(1'b1, 2);
    cycle(1'b0, 1);
    cycle(1'b0, 2);
    repeat (5000) cycle(($urandom % 3) != 0, $urandom % 3);
    check(takes1 > 100 && takes2 > 100 && rfull_seen > 100, "both take sizes and a full R exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
