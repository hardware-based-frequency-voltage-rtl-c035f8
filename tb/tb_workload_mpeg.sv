// tb_workload_mpeg: the MPEG-2 encoder task graph, output-rate constrained,
// with every cycle count and the required period scaled down by ten to keep
// the simulation short (the 5000-cycle sampling window is kept).
//
//   Source -> ME -> Pred -> DCT -> VLC -> Sink
//                            |  ^
//                            v  |
//                            IDCT
//
// Cycles per macroblock / 10: ME 10128, Pred 1672, DCT 37006, VLC 4322,
// IDCT 35126, Sink 319; the source's own cost is not known and is set to 100.
// Six operating points 54..133 MHz at 0.65..1.6 V.  Required rate 3.5
// frames/s of 99 macroblocks, a period of 2.886 ms per macroblock, scaled to
// 288.6 us.  The IDCT result returns to the DCT input; the loop is started
// with two macroblocks in flight (the loop DCT + IDCT needs 5.4 ms per item
// at 133 MHz, so one item in flight could not meet the rate).  Every island
// starts at the fastest level.  After the levels settle, the testbench checks
// that the sink delivers the required rate on average, that macroblocks
// arrive complete and in order and that levels were lowered.  It prints each
// island's level and the estimated dynamic power (sum of f*V^2 over time)
// against all islands at 133 MHz / 1.6 V.
module tb_workload_mpeg;
  import vfi_pkg::*;

  // nodes: 0 Source, 1 ME, 2 Pred, 3 DCT, 4 VLC, 5 IDCT, 6 Sink
  localparam int unsigned N = 7, E = 7;
  localparam int unsigned REQ_NS = 288_600;
  localparam int unsigned ESRC [E] = '{0, 1, 2, 3, 3, 5, 4};
  localparam int unsigned EDST [E] = '{1, 2, 3, 4, 5, 3, 6};
  localparam logic        EPRI [E] = '{0, 0, 0, 0, 0, 1, 0};
  localparam int unsigned WORK [N] = '{100, 10128, 1672, 37006, 4322, 35126, 319};

  logic        clk [N];
  logic        arst_n = 0, run = 0, adapt_en = 1, sink_constrained = 1;
  level_t      level [N];
  logic [15:0] freq_mhz [N], volt_mv [N];
  logic        level_up [N], level_down [N], item_done [N], join_err [N];
  logic [15:0] item_data [N];
  logic        prod_stall [E], cons_stall [E], edge_full [E], edge_empty [E];

  int checks = 0, failures = 0;

  vfi_system #(
    .N_NODES(N), .N_EDGES(E), .EDGE_SRC(ESRC), .EDGE_DST(EDST), .EDGE_PRIMED(EPRI),
    .WORK_CYCLES(WORK), .REQ_PERIOD_NS(REQ_NS), .PRIME_ITEMS(2),
    .FREQ_MHZ(MPEG_FREQ_MHZ), .VOLT_MV(MPEG_VOLT_MV)
  ) dut (.*);

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

  initial begin
    #(200ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int      sink_items = 0, src_items = 0, bad_order = 0, n_down = 0, n_up = 0;
  int      measured = 0;
  realtime t_last = 0, iv_max = 0;
  bit      measure = 0;

  always @(posedge clk[N-1]) if (item_done[N-1]) begin
    if (item_data[N-1] != 16'(sink_items)) bad_order++;
    if (measure && $realtime - t_last > iv_max) iv_max = $realtime - t_last;
    if (measure) measured++;
    t_last = $realtime;
    sink_items++;
  end
  always @(posedge clk[0]) if (item_done[0]) src_items++;
  for (genvar n = 0; n < N; n++) begin : g_mon
    always @(posedge clk[n]) begin
      if (level_down[n]) n_down++;
      if (level_up[n])   n_up++;
    end
  end

  real energy = 0.0, energy_max = 0.0;
  bit  meter = 0;
  always #(1us) if (meter) begin
    for (int n = 0; n < N; n++) begin
      energy     += real'(freq_mhz[n]) * (real'(volt_mv[n]) / 1000.0) ** 2;
      energy_max += real'(MPEG_FREQ_MHZ[NUM_LEVELS-1]) *
                    (real'(MPEG_VOLT_MV[NUM_LEVELS-1]) / 1000.0) ** 2;
    end
  end

  initial begin
    #(1us);
    arst_n = 1;
    #(1us);
    run = 1;
    #(30ms);                 // settle: the FIFOs first fill at full speed
    measure = 1;
    meter   = 1;
    #(23088us);              // 80 required periods
    measure = 0;
    meter   = 0;
    $display("MPEG levels (Source ME Pred DCT VLC IDCT Sink): %0d %0d %0d %0d %0d %0d %0d",
             level[0], level[1], level[2], level[3], level[4], level[5], level[6]);
    $display("MPEG sink: %0d macroblocks in 80 periods, longest interval %0.1f us", measured, iv_max / 1us);
    $display("MPEG estimated dynamic power: %0.1f%% of all islands at 133 MHz / 1.6 V",
             100.0 * energy / energy_max);
    check(measured >= 80, $sformatf("sink rate: %0d macroblocks in 80 periods", measured));
    check(n_down > 0, "levels were lowered");
    check(energy < 0.9 * energy_max, "power below 90% of the fastest setting");
    run = 0;
    #(1ms);
    while (sink_items != src_items) #(1ms);   // drain (bounded by the watchdog)
    check(bad_order == 0 && sink_items == src_items,
          $sformatf("sink got %0d of %0d macroblocks, %0d out of order", sink_items, src_items, bad_order));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
