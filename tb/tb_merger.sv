// tb_merger: self-checking testbench of the two-input, two-sample merger.
//
// Random ordered pairs are offered on both inputs with random valid flags and
// random output back-pressure. For every clock the merger fires, the
// testbench checks, from the four samples alone, that the chosen samples are
// the oldest ones of each stream (a_take from A, b_take from B), that no
// sample left behind is older than one chosen, and that the pair registered on
// the output is exactly those samples in time order. It also checks that the
// merger waits while either stream is invalid, holds its output while the
// sink stalls, and takes the decisions of the worked example in the source
// material: (A0,A2)/(B0,B1) -> one each, (A2,A3)/(B1,B1) -> two from B,
// (A2,A3)/(B2,B99) -> one each A first, (A3,A3)/(B99,B99) -> two from A.
module tb_merger;
  import merge_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  pair_t      a, b;
  logic       a_valid, b_valid;
  logic [1:0] a_take, b_take;
  pair_t      out_data;
  logic       out_valid;
  logic       out_ready;
  sel_e       sel;
  logic       fire;

  int checks = 0;
  int failures = 0;
  int n_sel[4] = '{0, 0, 0, 0};
  int n_wait = 0, n_stall = 0;

  merger dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sample_t smp(input int unsigned ts, input logic [15:0] tag);
    return sample_t'({16'(ts), tag});
  endfunction

  // One clock with the given inputs; checks the decision and the next output.
  task automatic cycle(input pair_t pa, input bit va, input pair_t pb, input bit vb,
                       input bit rdy);
    pair_t   expect_out;
    sample_t pick[$];
    sample_t rest[$];
    bit      held, fired;
    pair_t   old_out;
    @(negedge clk);
    a = pa; b = pb; a_valid = va; b_valid = vb; out_ready = rdy;
    #1;
    held    = out_valid && !out_ready;
    old_out = out_data;
    fired   = fire;
    check(fire == (va && vb && !held), "fires exactly when both valid and output free");
    if (!(va && vb)) n_wait++;
    if (held) n_stall++;
    if (fire) begin
      check(a_take + b_take == 2'd2, "two samples taken");
      for (int i = 0; i < 2; i++) begin
        if (i < int'(a_take)) pick.push_back(pa[i]); else rest.push_back(pa[i]);
        if (i < int'(b_take)) pick.push_back(pb[i]); else rest.push_back(pb[i]);
      end
      foreach (pick[i]) foreach (rest[j])
        check(pick[i].ts <= rest[j].ts, "no older sample left behind");
      if (pick.size() == 2) begin
        if (pick[0].ts <= pick[1].ts) expect_out = '{pick[1], pick[0]};
        else                          expect_out = '{pick[0], pick[1]};
      end
      n_sel[int'(sel)]++;
    end else begin
      check(a_take == 2'd0 && b_take == 2'd0, "nothing taken while waiting");
    end
    @(posedge clk);
    #1;
    if (fired) begin
      check(out_valid, "output valid after firing");
      check(out_data == expect_out, "output pair is the chosen samples in order");
    end else if (held) begin
      check(out_valid && out_data == old_out, "output held while stalled");
    end
  endtask

  function automatic pair_t rnd_pair(input int unsigned base, input logic [15:0] tag);
    int unsigned t0 = base + $urandom % 8;
    int unsigned t1 = t0 + $urandom % 4;
    pair_t p;
    p[0] = smp(t0, tag);
    p[1] = smp(t1, tag + 16'd1);
    return p;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pair_t ea, eb;
    a = '0; b = '0; a_valid = 0; b_valid = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(!out_valid, "reset leaves the output empty");

    // The worked example, with tags 'hA0../'hB0.. marking stream and index.
    ea = '{smp(2, 16'hA002), smp(0, 16'hA000)};
    eb = '{smp(1, 16'hB001), smp(0, 16'hB000)};
    cycle(ea, 1, eb, 1, 1);
    check(out_data == '{smp(0, 16'hB000), smp(0, 16'hA000)}, "example: A0 B0");
    ea = '{smp(3, 16'hA003), smp(2, 16'hA002)};
    eb = '{smp(1, 16'hB011), smp(1, 16'hB001)};
    cycle(ea, 1, eb, 1, 1);
    check(out_data == eb, "example: B1 B1");
    ea = '{smp(3, 16'hA003), smp(2, 16'hA002)};
    eb = '{smp(99, 16'hB099), smp(2, 16'hB002)};
    cycle(ea, 1, eb, 1, 1);
    check(out_data == '{smp(2, 16'hB002), smp(2, 16'hA002)}, "example: A2 B2");
    ea = '{smp(3, 16'hA013), smp(3, 16'hA003)};
    eb = '{smp(99, 16'hB199), smp(99, 16'hB099)};
    cycle(ea, 1, eb, 1, 1);
    check(out_data == ea, "example: A3 A3");

    // Random pairs around a common base so all four selections occur.
    repeat (4000) begin
      int unsigned base;
      base = $urandom % 1000;
      cycle(rnd_pair(base, 16'hA000), ($urandom % 5) != 0,
            rnd_pair(base, 16'hB000), ($urandom % 5) != 0,
            ($urandom % 4) != 0);
    end
    // Throughput: both streams valid and the sink ready every clock.
    begin
      int f0;
      f0 = n_sel[0] + n_sel[1] + n_sel[2] + n_sel[3];
      repeat (100) cycle(rnd_pair(10, 16'hA000), 1, rnd_pair(10, 16'hB000), 1, 1);
      check(n_sel[0] + n_sel[1] + n_sel[2] + n_sel[3] - f0 == 100, "one pair per clock");
    end
    foreach (n_sel[i]) check(n_sel[i] > 50, "every selection exercised");
    check(n_wait > 100 && n_stall > 100, "waiting and output stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
