// tb_vfi_system: the whole eight-island system at its default parameters
// (T_SAMPLE = 5000, software-radio operating points, 2 us required period),
// each island clocked by its own oscillator model that follows the island's
// chosen frequency.  The system first runs output-rate constrained, then is
// switched to input-rate constrained.  Checks: items reach the sink complete
// and in order, no join ever sees mismatched items, the sink meets its
// required period in the output-constrained phase, the source issues at
// its required period in the input-constrained phase, and every mechanism
// happens at least once: producer stalls, consumer stalls, full and empty
// FIFOs, level increases and decreases, the feedback loop carrying items,
// and the mode switch.  It prints each island's final level and the
// estimated dynamic power (sum of f*V^2 over time) against running every
// island at its fastest level.
module tb_vfi_system;
  import vfi_pkg::*;

  localparam int unsigned N = 8, E = 9, REQ_NS = 2000;

  logic        clk [N];
  logic        arst_n = 0, run = 0, adapt_en = 1, sink_constrained = 1;
  level_t      level [N];
  logic [15:0] freq_mhz [N], volt_mv [N];
  logic        level_up [N], level_down [N], item_done [N], join_err [N];
  logic [15:0] item_data [N];
  logic        prod_stall [E], cons_stall [E], edge_full [E], edge_empty [E];

  int checks = 0, failures = 0;

  vfi_system dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_clk
    island_clock_model #(.PHASE_PS(n * 1237)) u_osc (.freq_mhz(freq_mhz[n]), .clk(clk[n]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog, in time: the islands may run at any of their frequencies.
  initial begin
    #(30ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  longint n_pstall = 0, n_cstall = 0, n_full = 0, n_empty = 0;
  int     n_up = 0, n_down = 0, sink_items = 0, src_items = 0, loop_items = 0;
  int     bad_order = 0;
  realtime t_sink_last = 0, t_src_last = 0;
  realtime sink_iv_max = 0, src_iv_sum = 0;
  int      src_iv_n = 0;
  bit      measure_sink = 0, measure_src = 0;

  for (genvar e = 0; e < E; e++) begin : g_edge_mon
    always @(posedge clk[dut.EDGE_SRC[e]]) begin
      if (prod_stall[e]) n_pstall++;
      if (edge_full[e])  n_full++;
    end
    always @(posedge clk[dut.EDGE_DST[e]]) begin
      if (cons_stall[e]) n_cstall++;
      if (edge_empty[e]) n_empty++;
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_node_mon
    always @(posedge clk[n]) begin
      if (level_up[n])   n_up++;
      if (level_down[n]) n_down++;
      check(!join_err[n], $sformatf("join error at node %0d", n));
    end
  end

  // Node 6 closes the loop 4 -> 5 -> 6 -> 4.
  always @(posedge clk[6]) if (item_done[6]) loop_items++;

  always @(posedge clk[7]) if (item_done[7]) begin
    if (item_data[7] != 16'(sink_items)) bad_order++;
    if (measure_sink && t_sink_last > 0 && $realtime - t_sink_last > sink_iv_max)
      sink_iv_max = $realtime - t_sink_last;
    t_sink_last = $realtime;
    sink_items++;
  end

  always @(posedge clk[0]) if (item_done[0]) begin
    if (measure_src && t_src_last > 0) begin
      src_iv_sum += $realtime - t_src_last;
      src_iv_n++;
    end
    t_src_last = $realtime;
    src_items++;
  end

  // ---------------- power estimate ----------------
  real energy = 0.0, energy_max = 0.0;
  always #(100ns) if (arst_n) begin
    for (int n = 0; n < N; n++) begin
      energy     += real'(freq_mhz[n]) * (real'(volt_mv[n]) / 1000.0) ** 2;
      energy_max += real'(SDR_FREQ_MHZ[NUM_LEVELS-1]) *
                    (real'(SDR_VOLT_MV[NUM_LEVELS-1]) / 1000.0) ** 2;
    end
  end

  initial begin
    int sink_phase1, ups1, downs1;
    #(200ns);
    arst_n = 1;
    #(200ns);
    run = 1;
    // Output-rate constrained: let the levels settle, then measure the sink.
    #(3ms);
    measure_sink = 1;
    #(2ms);
    measure_sink = 0;
    check(sink_iv_max > 0 && sink_iv_max <= REQ_NS * 1ns,
          $sformatf("sink period %0t, required %0d ns", sink_iv_max, REQ_NS));
    $display("output-constrained levels: %0d %0d %0d %0d %0d %0d %0d %0d",
             level[0], level[1], level[2], level[3], level[4], level[5], level[6], level[7]);
    sink_phase1 = sink_items;
    ups1 = n_up; downs1 = n_down;
    // Switch to input-rate constrained.
    sink_constrained = 0;
    #(4ms);
    measure_src = 1;
    #(2ms);
    measure_src = 0;
    $display("input-constrained levels:  %0d %0d %0d %0d %0d %0d %0d %0d",
             level[0], level[1], level[2], level[3], level[4], level[5], level[6], level[7]);
    check(src_iv_n > 0 && src_iv_sum / src_iv_n <= REQ_NS * 1ns,
          $sformatf("source period %0t, required %0d ns", src_iv_n ? src_iv_sum / src_iv_n : 0, REQ_NS));
    check(sink_items > sink_phase1 + 100, "items flow after the mode switch");
    // Drain.
    run = 0;
    #(200us);
    check(bad_order == 0, $sformatf("%0d items out of order at the sink", bad_order));
    check(sink_items == src_items,
          $sformatf("sink received %0d of %0d items", sink_items, src_items));
    // Mechanisms.
    check(n_pstall > 0, $sformatf("producer stall cycles: %0d", n_pstall));
    check(n_cstall > 0, $sformatf("consumer stall cycles: %0d", n_cstall));
    check(n_full > 0,   $sformatf("FIFO full cycles: %0d", n_full));
    check(n_empty > 0,  $sformatf("FIFO empty cycles: %0d", n_empty));
    check(ups1 > 0 || n_up > 0, $sformatf("level increases: %0d", n_up));
    check(downs1 > 0, $sformatf("level decreases (output-constrained): %0d", downs1));
    check(n_down > downs1 || n_up > ups1, "levels changed after the mode switch");
    check(loop_items > 100, $sformatf("items around the feedback loop: %0d", loop_items));
    $display("events: pstall=%0d cstall=%0d full=%0d empty=%0d up=%0d down=%0d loop=%0d items=%0d",
             n_pstall, n_cstall, n_full, n_empty, n_up, n_down, loop_items, sink_items);
    $display("estimated dynamic power: %0.1f%% of all islands at the fastest level",
             100.0 * energy / energy_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
