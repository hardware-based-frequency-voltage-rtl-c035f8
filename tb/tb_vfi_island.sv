// tb_vfi_island: two islands, a middle node (one input, one output) and a
// sink (one input), with their FIFO links replaced by testbench models that
// count the islands' stall cycles per window and deliver random far-side
// counts.  In both constraint modes every level decision of the middle node
// is checked against a reference built from the counts of the port the mode
// enables (producer port when sink-constrained, consumer port when
// source-constrained); the other port's counts are random and must not
// matter.  The sink, fed without gaps, must settle at the slowest level that
// still meets its required item period.  adapt_en low must freeze levels.
module tb_vfi_island;
  import vfi_pkg::*;

  localparam int unsigned W = 16, T = 400, CNT_W = $clog2(T + 1), WORK = 9;
  localparam int unsigned REQ_NS = 400;  // sink: 11 cycles / 0.4 us = 27.5 MHz -> 31 MHz

  logic clk = 0, rst_n = 0, adapt_en = 1, sink_constrained = 1, run = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200 * T) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- middle node ----------------
  logic m_in_empty [1], m_in_read [1], m_in_stall [1], m_in_sf_valid [1];
  logic [W-1:0] m_in_data [1];
  logic [CNT_W-1:0] m_in_se [1], m_in_sf [1];
  logic m_out_full [1], m_out_write [1], m_out_stall [1], m_out_se_valid [1];
  logic [W-1:0] m_out_data, m_item_data;
  logic [CNT_W-1:0] m_out_sf [1], m_out_se [1];
  logic m_tsample, m_up, m_down, m_done, m_jerr;
  level_t m_level;
  logic [15:0] m_freq, m_volt;

  vfi_island #(.N_IN(1), .N_OUT(1), .WIDTH(W), .WORK_CYCLES(WORK), .T_SAMPLE(T),
               .REQ_PERIOD_NS(REQ_NS)) u_mid (
    .clk, .rst_n, .run, .adapt_en, .sink_constrained,
    .in_empty(m_in_empty), .in_data(m_in_data), .in_read(m_in_read), .in_stall(m_in_stall),
    .in_se(m_in_se), .in_sf(m_in_sf), .in_sf_valid(m_in_sf_valid),
    .out_full(m_out_full), .out_write(m_out_write), .out_data(m_out_data),
    .out_stall(m_out_stall), .out_sf(m_out_sf), .out_se(m_out_se), .out_se_valid(m_out_se_valid),
    .tsample(m_tsample), .level(m_level), .freq_mhz(m_freq), .volt_mv(m_volt),
    .level_up(m_up), .level_down(m_down), .item_done(m_done), .item_data(m_item_data),
    .join_err(m_jerr));

  // ---------------- sink ----------------
  logic k_in_empty [1], k_in_read [1], k_in_stall [1], k_in_sf_valid [1];
  logic [W-1:0] k_in_data [1];
  logic [CNT_W-1:0] k_in_se [1], k_in_sf [1];
  logic k_out_full [1], k_out_write [1], k_out_stall [1], k_out_se_valid [1];
  logic [W-1:0] k_out_data, k_item_data;
  logic [CNT_W-1:0] k_out_sf [1], k_out_se [1];
  logic k_tsample, k_up, k_down, k_done, k_jerr;
  level_t k_level;
  logic [15:0] k_freq, k_volt;

  assign k_in_empty[0] = 1'b0;
  assign k_in_data[0] = '0;
  assign k_in_se[0] = '0;
  assign k_in_sf[0] = '0;
  assign k_in_sf_valid[0] = 1'b0;
  assign k_out_full[0] = 1'b0;
  assign k_out_sf[0] = '0;
  assign k_out_se[0] = '0;
  assign k_out_se_valid[0] = 1'b0;

  vfi_island #(.N_IN(1), .N_OUT(0), .WIDTH(W), .WORK_CYCLES(WORK), .T_SAMPLE(T),
               .REQ_PERIOD_NS(REQ_NS)) u_sink (
    .clk, .rst_n, .run, .adapt_en, .sink_constrained(1'b1),
    .in_empty(k_in_empty), .in_data(k_in_data), .in_read(k_in_read), .in_stall(k_in_stall),
    .in_se(k_in_se), .in_sf(k_in_sf), .in_sf_valid(k_in_sf_valid),
    .out_full(k_out_full), .out_write(k_out_write), .out_data(k_out_data),
    .out_stall(k_out_stall), .out_sf(k_out_sf), .out_se(k_out_se), .out_se_valid(k_out_se_valid),
    .tsample(k_tsample), .level(k_level), .freq_mhz(k_freq), .volt_mv(k_volt),
    .level_up(k_up), .level_down(k_down), .item_done(k_done), .item_data(k_item_data),
    .join_err(k_jerr));

  // ---------------- reference ----------------
  function automatic int ref_pick(input real f);
    for (int l = 0; l < NUM_LEVELS; l++)
      if (real'(SDR_FREQ_MHZ[l]) >= f - 1e-6) return l;
    return NUM_LEVELS - 1;
  endfunction

  function automatic int ref_port(input int own, input int other, input int lvl);
    real f, d;
    f = real'(SDR_FREQ_MHZ[lvl]);
    d = (own > other) ? own - other : other - own;
    if (d > T) d = T;
    if (own > other) return ref_pick(f * (1.0 - d / T));
    if (other > own) return (d >= T) ? NUM_LEVELS - 1 : ref_pick(f / (1.0 - d / T));
    return ref_pick(f);
  endfunction

  // ---------------- link models for the middle node ----------------
  int in_pct = 50, out_pct = 50;
  int win_in_stall = 0, win_out_stall = 0;
  int far_out_se = 0, far_in_sf = 0;   // far-side values of this window
  int pulse_cyc = 0, cyc = 0;
  int up_n = 0, down_n = 0;

  always @(negedge clk) begin
    cyc++;
    m_in_empty[0]      = ($urandom_range(0, 99) < in_pct);
    m_in_data[0]       = '0;
    m_out_full[0]      = ($urandom_range(0, 99) < out_pct);
    m_out_se_valid[0]  = (cyc == pulse_cyc);
    m_in_sf_valid[0]   = (cyc == pulse_cyc);
    m_out_se[0]        = CNT_W'(far_out_se);
    m_in_sf[0]         = CNT_W'(far_in_sf);
  end

  // Own counts as the stall monitors would hold them.
  always @(posedge clk) if (rst_n) begin
    if (m_tsample) begin
      m_out_sf[0]  <= CNT_W'(win_out_stall + m_out_stall[0]);
      m_in_se[0]   <= CNT_W'(win_in_stall + m_in_stall[0]);
      win_out_stall = 0;
      win_in_stall  = 0;
    end else begin
      win_out_stall += m_out_stall[0];
      win_in_stall  += m_in_stall[0];
    end
  end

  task automatic run_windows(input int n, input bit mode_sink, input bit adapt);
    for (int w = 0; w < n; w++) begin
      int cur, exp_lvl;
      far_out_se = ($urandom_range(0, 2) == 0) ? $urandom_range(0, T) : $urandom_range(0, T / 20);
      far_in_sf  = ($urandom_range(0, 2) == 0) ? $urandom_range(0, T) : $urandom_range(0, T / 20);
      in_pct     = $urandom_range(0, 90);
      out_pct    = $urandom_range(0, 90);
      pulse_cyc  = cyc + $urandom_range(2, T / 2);
      do @(posedge clk); while (!m_tsample);
      @(negedge clk);   // decision cycle; own counts now valid
      cur = int'(m_level);
      if (mode_sink) exp_lvl = ref_port(int'(m_out_sf[0]), far_out_se, cur);
      else           exp_lvl = ref_port(int'(m_in_se[0]),  far_in_sf,  cur);
      if (!adapt) exp_lvl = cur;
      @(negedge clk);
      check(int'(m_level) == exp_lvl,
            $sformatf("mode %0d window %0d: level %0d expected %0d", mode_sink, w, m_level, exp_lvl));
      if (exp_lvl > cur) up_n++;
      if (exp_lvl < cur) down_n++;
    end
  endtask

  initial begin
    m_out_sf[0] = '0;
    m_in_se[0]  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);   // configuration synchronizers
    run_windows(40, 1'b1, 1'b1);
    sink_constrained = 0;
    repeat (2) begin               // let the mode cross into the island
      do @(posedge clk); while (!m_tsample);
    end
    run_windows(40, 1'b0, 1'b1);
    adapt_en = 0;
    repeat (3) @(negedge clk);
    run_windows(5, 1'b0, 1'b0);
    check(up_n > 3 && down_n > 3, $sformatf("level changes: %0d up %0d down", up_n, down_n));
    // The sink ran without input gaps: period WORK+2 cycles (read, work,
    // back to read), so it needs 11 cycles per 0.4 us = 27.5 MHz -> 31 MHz.
    check(k_level == level_t'(ref_pick(real'(WORK + 2) * 1000.0 / REQ_NS)),
          $sformatf("sink level %0d", k_level));
    check(k_freq == 16'(SDR_FREQ_MHZ[k_level]) && k_volt == 16'(SDR_VOLT_MV[k_level]),
          "sink frequency/voltage outputs");
    check(!m_jerr && !k_jerr, "no join errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
