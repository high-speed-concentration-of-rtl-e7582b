// tb_merge_node: self-checking testbench of the two-input merger unit.
//
// 1. The worked example of the source material: A = A0 A2 | A3 A3 | A99 A99,
//    B = B0 B1 | B1 B2 | B99 B99, written as two-sample words. The output must
//    be A0 B0 B1 B1 A2 B2 A3 A3 A99 A99, after which the unit waits for more
//    data on A (B99 B99 stays buffered).
// 2. Latency: a word pair written into an empty unit appears on the output two
//    clock edges after the edge that wrote it.
// 3. Throughput: with both FIFOs preloaded and the sink ready, one pair (two
//    samples) leaves every clock.
// 4. Random sorted streams with random gaps and sink stalls, FIFOs small
//    enough to fill: every output sample must continue the non-decreasing
//    timestamp order, each stream's samples must come out in their own order,
//    and every sample must arrive once terminator samples flush the unit.
module tb_merge_node;
  import merge_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned NW    = 1500;   // random words per stream
  localparam logic [15:0] TERM  = 16'hFFFF;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  pair_t a_data, b_data, out_data;
  logic  a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;

  int checks = 0;
  int failures = 0;

  merge_node #(.DEPTH(DEPTH)) dut (.*);

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

  // Output collector: every sample leaving the unit, oldest first.
  sample_t got[$];
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_data[0]);
      got.push_back(out_data[1]);
    end
  end

  // Event counters for the mechanisms of the unit.
  int n_sel[4] = '{0, 0, 0, 0};
  int n_wait = 0, n_stall = 0, n_full = 0, n_rheld = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_merger.fire) n_sel[int'(dut.u_merger.sel)]++;
      if (!(dut.sa_valid && dut.sb_valid)) n_wait++;
      if (out_valid && !out_ready) n_stall++;
      if ((a_valid && !a_ready) || (b_valid && !b_ready)) n_full++;
      if (dut.u_buf_a.r_valid || dut.u_buf_b.r_valid) n_rheld++;
    end
  end

  pair_t qa[$], qb[$];

  // Sources: present queue heads with random gaps.
  task automatic drive(input int gap_pct, input int stall_pct, input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      a_valid   = qa.size() != 0 && ($urandom % 100) >= gap_pct;
      b_valid   = qb.size() != 0 && ($urandom % 100) >= gap_pct;
      a_data    = qa.size() != 0 ? qa[0] : '0;
      b_data    = qb.size() != 0 ? qb[0] : '0;
      out_ready = ($urandom % 100) >= stall_pct;
      @(posedge clk);
      if (a_valid && a_ready) void'(qa.pop_front());
      if (b_valid && b_ready) void'(qb.pop_front());
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    a_valid = 0; b_valid = 0; out_ready = 1;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    got.delete();
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_data = '0; b_data = '0;
    a_valid = 0; b_valid = 0; out_ready = 1;
    do_reset();

    // 1. Worked example.
    qa = '{'{smp(2, 16'hA1), smp(0, 16'hA0)}, '{smp(3, 16'hA3), smp(3, 16'hA2)},
           '{smp(99, 16'hA5), smp(99, 16'hA4)}};
    qb = '{'{smp(1, 16'hB1), smp(0, 16'hB0)}, '{smp(2, 16'hB3), smp(1, 16'hB2)},
           '{smp(99, 16'hB5), smp(99, 16'hB4)}};
    drive(0, 0, 20);
    begin
      sample_t ex[$];
      ex = '{smp(0, 16'hA0), smp(0, 16'hB0), smp(1, 16'hB1), smp(1, 16'hB2),
             smp(2, 16'hA1), smp(2, 16'hB3), smp(3, 16'hA2), smp(3, 16'hA3),
             smp(99, 16'hA4), smp(99, 16'hA5)};
      check(got.size() == ex.size(), "example: ten samples out, B99 B99 waits");
      foreach (ex[i]) if (i < got.size()) check(got[i] == ex[i], "example output order");
    end

    // 2. Latency through the empty unit.
    do_reset();
    @(negedge clk);
    a_valid = 1; b_valid = 1;
    a_data = '{smp(5, 16'h1), smp(4, 16'h0)};
    b_data = '{smp(7, 16'h3), smp(6, 16'h2)};
    @(posedge clk);           // words written at this edge
    @(negedge clk);
    a_valid = 0; b_valid = 0;
    check(!out_valid, "latency: not after 1 edge");
    @(posedge clk); #1;
    check(!out_valid, "latency: not after 1 edge");
    @(posedge clk); #1;
    check(out_valid, "latency: output 2 edges after the write");
    check(out_data == '{smp(5, 16'h1), smp(4, 16'h0)}, "latency: oldest pair");

    // 3. Throughput with preloaded FIFOs.
    do_reset();
    for (int i = 0; i < 12; i++) begin
      qa.push_back('{smp(4*i+1, 16'(2*i+1)), smp(4*i, 16'(2*i))});
      qb.push_back('{smp(4*i+3, 16'(2*i+1)), smp(4*i+2, 16'(2*i))});
    end
    @(negedge clk);
    out_ready = 0;
    repeat (12) begin
      @(negedge clk);
      a_valid = 1; b_valid = 1; a_data = qa.pop_front(); b_data = qb.pop_front();
      out_ready = 0;
      @(posedge clk);
    end
    @(negedge clk);
    a_valid = 0; b_valid = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    out_ready = 1;
    got.delete();
    repeat (10) @(posedge clk);
    #1;
    check(got.size() == 20, "throughput: ten pairs in ten clocks");
    foreach (got[i]) if (i > 0) check(got[i].ts >= got[i-1].ts, "throughput: order");

    // 4. Random streams with gaps, stalls and full FIFOs.
    do_reset();
    begin
      int unsigned ta = 0, tb_ = 0;
      for (int i = 0; i < NW; i++) begin
        pair_t p;
        ta += $urandom % 6;  p[0] = smp(ta, 16'(2*i));
        ta += $urandom % 6;  p[1] = smp(ta, 16'(2*i+1));
        qa.push_back(p);
        tb_ += $urandom % 6; p[0] = smp(tb_, 16'h8000 | 16'(2*i));
        tb_ += $urandom % 6; p[1] = smp(tb_, 16'h8000 | 16'(2*i+1));
        qb.push_back(p);
      end
      for (int i = 0; i < 4; i++) begin
        qa.push_back('{smp(TERM, 16'h7FFF), smp(TERM, 16'h7FFF)});
        qb.push_back('{smp(TERM, 16'hFFFF), smp(TERM, 16'hFFFF)});
      end
    end
    drive(85, 0, NW / 2);
    drive(30, 40, 3 * NW);
    drive(0, 0, 2 * NW);
    begin
      int na = 0, nb = 0, nreal = 0;
      for (int i = 0; i < got.size(); i++) begin
        if (i > 0) check(got[i].ts >= got[i-1].ts, "random: non-decreasing timestamps");
        if (got[i].ts != TERM) begin
          nreal++;
          if (got[i].adc[15]) begin
            check(got[i].adc == (16'h8000 | 16'(nb)), "random: B order kept");
            nb++;
          end else begin
            check(got[i].adc == 16'(na), "random: A order kept");
            na++;
          end
        end
      end
      check(nreal == 4 * NW, "random: every sample delivered");
    end

    foreach (n_sel[i]) check(n_sel[i] > 20, "every selection exercised");
    check(n_wait > 50, "waiting for an empty stream exercised");
    check(n_stall > 50, "output stall exercised");
    check(n_full > 50, "input FIFO full exercised");
    check(n_rheld > 50, "sample held in R exercised");
    $display("events: A2=%0d B2=%0d AB=%0d BA=%0d wait=%0d stall=%0d full=%0d rheld=%0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_wait, n_stall, n_full, n_rheld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
