// tb_workload_sdr: the software-defined-radio pipeline at its real sizes,
// input-rate constrained: the source generates samples at a fixed rate and
// the downstream islands scale on their consumer ports.
//
//   SRC -> LPF1 -> LPF2 -> DEMOD -> EQ -> SINK
//
// Cycles per packet: LPF 61494 split over two pipelined instances (30747
// each), DEMOD 33086, equalizer 463193 shared by ten instances (modelled as
// one island of 46319 cycles), SINK 32736.  The source's own cost is not
// known; it is set to 40000 cycles so that the source itself paces the
// samples (one per 0.89 ms at 45 MHz), and its rate monitor holds it near
// the 1 ms period.  Six operating points 23..60 MHz at
// 1.3..3.3 V, a 5000-cycle sampling window and a required sample rate of
// 1 kHz (1 ms period).  Every island starts at 60 MHz.  After the levels
// settle, the testbench checks that the sink delivers at least one sample
// per millisecond on average over 40 ms, that items arrive complete and in
// order and that levels were lowered.  It prints each island's level, the
// longest gap between samples and the estimated dynamic power (sum of f*V^2
// over time) against all islands at 60 MHz / 3.3 V.
module tb_workload_sdr;
  import vfi_pkg::*;

  localparam int unsigned N = 6, E = 5;
  localparam int unsigned REQ_NS = 1_000_000;
  localparam int unsigned ESRC [E] = '{0, 1, 2, 3, 4};
  localparam int unsigned EDST [E] = '{1, 2, 3, 4, 5};
  localparam logic        EPRI [E] = '{0, 0, 0, 0, 0};
  localparam int unsigned WORK [N] = '{40000, 30747, 30747, 33086, 46319, 32736};

  logic        clk [N];
  logic        arst_n = 0, run = 0, adapt_en = 1, sink_constrained = 0;
  level_t      level [N];
  logic [15:0] freq_mhz [N], volt_mv [N];
  logic        level_up [N], level_down [N], item_done [N], join_err [N];
  logic [15:0] item_data [N];
  logic        prod_stall [E], cons_stall [E], edge_full [E], edge_empty [E];

  int checks = 0, failures = 0;

  vfi_system #(
    .N_NODES(N), .N_EDGES(E), .EDGE_SRC(ESRC), .EDGE_DST(EDST), .EDGE_PRIMED(EPRI),
    .WORK_CYCLES(WORK), .REQ_PERIOD_NS(REQ_NS),
    .FREQ_MHZ(SDR_FREQ_MHZ), .VOLT_MV(SDR_VOLT_MV)
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
    #(400ms);
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
      energy_max += real'(SDR_FREQ_MHZ[NUM_LEVELS-1]) *
                    (real'(SDR_VOLT_MV[NUM_LEVELS-1]) / 1000.0) ** 2;
    end
  end

  initial begin
    #(1us);
    arst_n = 1;
    #(1us);
    run = 1;
    #(60ms);                 // settle: the FIFOs first fill at full speed
    measure = 1;
    meter   = 1;
    #(40ms);
    measure = 0;
    meter   = 0;
    $display("SDR levels (SRC LPF1 LPF2 DEMOD EQ SINK): %0d %0d %0d %0d %0d %0d",
             level[0], level[1], level[2], level[3], level[4], level[5]);
    $display("SDR sink: %0d samples in 40 ms, longest interval %0.3f ms", measured, iv_max / 1ms);
    $display("SDR estimated dynamic power: %0.1f%% of all islands at 60 MHz / 3.3 V",
             100.0 * energy / energy_max);
    check(measured >= 40, $sformatf("sink rate: %0d samples in 40 ms, 40 required", measured));
    check(n_down > 0, "levels were lowered");
    check(energy < 0.9 * energy_max, "power below 90% of the fastest setting");
    run = 0;
    #(1ms);
    while (sink_items != src_items) #(1ms);   // drain (bounded by the watchdog)
    check(bad_order == 0 && sink_items == src_items,
          $sformatf("sink got %0d of %0d samples, %0d out of order", sink_items, src_items, bad_order));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
