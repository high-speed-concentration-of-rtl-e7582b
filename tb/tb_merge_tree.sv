// tb_merge_tree: end-to-end testbench of the concentrator at its default size
// (4 input streams, two tree levels, 512-word FIFOs).
//
// Four sorted streams with random timestamp steps (including equal
// timestamps, within and across streams) are fed through phases that make
// each mechanism of the design happen:
//   sparse   - inputs mostly idle: units wait for an empty stream;
//   congested- the sink stalls most clocks: output back-pressure propagates up
//              the tree until the leaf FIFOs fill and refuse input;
//   burst    - after the congestion the sink is released: the root must
//              deliver one pair (two samples) every clock;
//   random   - random gaps and stalls; then terminator samples (largest
//              timestamp) flush the last data.
// The output is checked against a reference built independently: all input
// samples sorted by timestamp. Every output timestamp must equal the
// reference at its position, each stream's samples must keep their order,
// and every sample must be delivered. The latency through the empty tree
// (two edges in the leaf unit, three more for the root unit) is checked first. Counts of every mechanism are
// printed; one that never happened counts as a failure.
module tb_merge_tree;
  import merge_pkg::*;

  localparam int unsigned S    = 4;
  localparam int unsigned NW   = 3000;      // words per stream
  localparam logic [15:0] TERM = 16'hFFFF;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  pair_t        in_data [S];
  logic [S-1:0] in_valid;
  logic [S-1:0] in_ready;
  pair_t        out_data;
  logic         out_valid;
  logic         out_ready;

  int checks = 0;
  int failures = 0;

  merge_tree dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sample_t smp(input int unsigned ts, input int unsigned s, input int unsigned idx);
    return sample_t'({16'(ts), 2'(s), 14'(idx)});
  endfunction

  sample_t got[$];
  int      fires_burst = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_data[0]);
      got.push_back(out_data[1]);
    end
  end

  // Mechanism counters, over all merger units.
  int n_sel[4] = '{0, 0, 0, 0};
  int n_wait = 0, n_stall = 0, n_full = 0, n_rheld = 0, n_inner_bp = 0;
  for (genvar k = 1; k < S; k++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (dut.g_node[k].u_node.u_merger.fire) n_sel[int'(dut.g_node[k].u_node.u_merger.sel)]++;
        if (!(dut.g_node[k].u_node.sa_valid && dut.g_node[k].u_node.sb_valid)) n_wait++;
        if (dut.g_node[k].u_node.u_buf_a.r_valid || dut.g_node[k].u_node.u_buf_b.r_valid) n_rheld++;
        if (k > 1 && dut.g_node[k].u_node.out_valid && !dut.g_node[k].u_node.out_ready) n_inner_bp++;
      end
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && !out_ready) n_stall++;
      if ((in_valid & ~in_ready) != '0) n_full++;
    end
  end

  pair_t   q [S][$];
  sample_t ref_q[$];

  task automatic drive(input int gap_pct, input int stall_pct, input int cycles);
    logic [S-1:0] acc;
    repeat (cycles) begin
      @(negedge clk);
      for (int s = 0; s < S; s++) begin
        in_valid[s] = q[s].size() != 0 && ($urandom % 100) >= gap_pct;
        in_data[s]  = q[s].size() != 0 ? q[s][0] : '0;
      end
      out_ready = ($urandom % 100) >= stall_pct;
      #1;
      acc = in_valid & in_ready;
      @(posedge clk);
      for (int s = 0; s < S; s++) if (acc[s]) void'(q[s].pop_front());
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0; out_ready = 1'b1;
    for (int s = 0; s < S; s++) in_data[s] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Latency through the empty tree: one word on every input.
    @(negedge clk);
    for (int s = 0; s < S; s++) in_data[s] = '{smp(2*s+1, s, 1), smp(2*s, s, 0)};
    in_valid = '1;
    @(posedge clk);
    @(negedge clk);
    in_valid = '0;
    repeat (4) begin
      @(posedge clk); #1;
      check(!out_valid, "latency: no output before 5 edges");
    end
    @(posedge clk); #1;
    check(out_valid && out_data == '{smp(1, 0, 1), smp(0, 0, 0)}, "latency: 5 edges for two levels");

    // Reset, then build the random streams and the sorted reference.
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    got.delete();
    for (int s = 0; s < S; s++) begin
      int unsigned t;
      t = $urandom % 8;
      for (int i = 0; i < NW; i++) begin
        pair_t p;
        p[0] = smp(t, s, 2*i);   ref_q.push_back(p[0]); t += $urandom % 4;
        p[1] = smp(t, s, 2*i+1); ref_q.push_back(p[1]); t += $urandom % 4;
        q[s].push_back(p);
      end
      for (int i = 0; i < 8; i++) q[s].push_back('{smp(TERM, s, 0), smp(TERM, s, 0)});
    end
    ref_q.sort() with (item.ts);

    drive(90, 0, 400);         // sparse
    drive(0, 95, 2500);        // congested
    begin                      // burst: sink released
      int n0;
      @(negedge clk);
      in_valid = '0;
      out_ready = 1'b1;
      n0 = got.size();
      repeat (300) @(posedge clk);
      #1;
      fires_burst = (got.size() - n0) / 2;
      check(fires_burst == 300, "burst: one pair per clock at the root");
    end
    drive(30, 30, 6 * NW);     // random
    drive(0, 0, 2 * NW);       // flush

    begin
      int unsigned nxt[S];
      int nreal = 0;
      foreach (nxt[s]) nxt[s] = 0;
      foreach (got[i]) begin
        if (got[i].ts == TERM) continue;
        if (nreal < ref_q.size()) check(got[i].ts == ref_q[nreal].ts, "timestamp equals sorted reference");
        check(got[i].adc[13:0] == 14'(nxt[got[i].adc[15:14]]), "stream order kept");
        nxt[got[i].adc[15:14]]++;
        nreal++;
      end
      for (int i = 1; i < got.size(); i++) check(got[i].ts >= got[i-1].ts, "non-decreasing output");
      check(nreal == ref_q.size(), "every sample delivered");
    end

    $display("events: A2=%0d B2=%0d AB=%0d BA=%0d wait=%0d out_stall=%0d inner_backpressure=%0d in_full=%0d r_held=%0d burst_pairs=%0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_wait, n_stall, n_inner_bp, n_full, n_rheld, fires_burst);
    foreach (n_sel[i]) check(n_sel[i] > 0, "every selection happened");
    check(n_wait > 0, "waiting for an empty stream happened");
    check(n_stall > 0, "output stall happened");
    check(n_inner_bp > 0, "back-pressure between levels happened");
    check(n_full > 0, "input FIFO full happened");
    check(n_rheld > 0, "sample held in R happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
