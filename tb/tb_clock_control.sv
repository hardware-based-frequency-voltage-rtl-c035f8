// tb_clock_control: drives the clock control of an island with two producer
// ports, one consumer port and the rate port.  For every sampling window it
// picks random port states, own and far-side stall counts (far-side counts
// delivered at a random time in the window, or not at all) and a random
// observed item period, and checks the level chosen after the window against
// a reference computed in floating point: S = 1 - |Se - Sf| / T_SAMPLE,
// f_curr*S or f_curr/S per port, period/T_req for the rate port, rounded up
// to the next available frequency, fastest request wins.  Also checks the
// window length, the hold when adapt_en is low or no port is enabled, the
// level_up/level_down pulses and the frequency/voltage outputs.
module tb_clock_control;
  import vfi_pkg::*;

  localparam int unsigned T      = 200;
  localparam int unsigned CNT_W  = $clog2(T + 1);
  localparam int unsigned RATE_W = 16;
  localparam int unsigned REQ_NS = 1000;
  localparam int unsigned NP = 2, NC = 1;

  logic clk = 0, rst_n = 0, adapt_en = 1, tsample;
  port_state_e      prod_state [NP];
  logic [CNT_W-1:0] prod_sf [NP], prod_se [NP];
  logic             prod_se_valid [NP];
  port_state_e      cons_state [NC];
  logic [CNT_W-1:0] cons_se [NC], cons_sf [NC];
  logic             cons_sf_valid [NC];
  logic             rate_en = 0;
  logic [RATE_W-1:0] rate_period = '0;
  level_t           level;
  logic [15:0]      freq_mhz, volt_mv;
  logic             level_up, level_down;

  int checks = 0, failures = 0;
  int ups = 0, downs = 0, holds = 0;

  clock_control #(.N_PROD(NP), .N_CONS(NC), .T_SAMPLE(T), .RATE_W(RATE_W),
                  .REQ_PERIOD_NS(REQ_NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400 * T) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Far-side values delivered in the current window (0 if none).
  int far_p [NP], far_c [NC];
  int pulse_at_p [NP], pulse_at_c [NC];
  int cyc = 0;

  always @(negedge clk) begin
    cyc++;
    for (int p = 0; p < NP; p++) prod_se_valid[p] = (cyc == pulse_at_p[p]);
    for (int c = 0; c < NC; c++) cons_sf_valid[c] = (cyc == pulse_at_c[c]);
  end

  int last_ts = -1;
  always @(posedge clk) if (rst_n && tsample) begin
    if (last_ts >= 0) check(cyc - last_ts == T, $sformatf("window %0d cycles", cyc - last_ts));
    last_ts = cyc;
  end

  function automatic int rnd_cnt();
    case ($urandom_range(0, 4))
      0: return 0;
      1: return T;
      2: return $urandom_range(0, 20);
      default: return $urandom_range(0, T);
    endcase
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin
      prod_state[p] = PORT_FIXED; prod_sf[p] = '0; prod_se[p] = '0;
      prod_se_valid[p] = 0; pulse_at_p[p] = -1;
    end
    cons_state[0] = PORT_FIXED; cons_se[0] = '0; cons_sf[0] = '0;
    cons_sf_valid[0] = 0; pulse_at_c[0] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(level == level_t'(NUM_LEVELS - 1), "reset level is the fastest");
    for (int w = 0; w < 300; w++) begin
      int exp_lvl, cur, any;
      // New stimulus, right after the previous decision.
      for (int p = 0; p < NP; p++) begin
        prod_state[p] = port_state_e'($urandom_range(0, 1));
        prod_sf[p]    = CNT_W'(rnd_cnt());
        far_p[p]      = ($urandom_range(0, 3) != 0) ? rnd_cnt() : 0;
        prod_se[p]    = CNT_W'(far_p[p]);
        pulse_at_p[p] = (far_p[p] != 0 || $urandom_range(0, 1)) ?
                        cyc + $urandom_range(1, T - 10) : -1;
        if (pulse_at_p[p] < 0) far_p[p] = 0;
      end
      cons_state[0] = port_state_e'($urandom_range(0, 1));
      cons_se[0]    = CNT_W'(rnd_cnt());
      far_c[0]      = ($urandom_range(0, 3) != 0) ? rnd_cnt() : 0;
      cons_sf[0]    = CNT_W'(far_c[0]);
      pulse_at_c[0] = cyc + $urandom_range(1, T - 10);
      rate_en       = ($urandom_range(0, 3) == 0);
      rate_period   = RATE_W'($urandom_range(0, 80));
      adapt_en      = ($urandom_range(0, 9) != 0);
      // Wait for the window to close; the decision follows one cycle later.
      do @(posedge clk); while (!tsample);
      @(negedge clk);
      cur = int'(level);
      exp_lvl = 0; any = 0;
      for (int p = 0; p < NP; p++) if (prod_state[p] == PORT_DVFS_EN) begin
        any = 1;
        exp_lvl = (ref_port(int'(prod_sf[p]), far_p[p], cur) > exp_lvl) ?
                  ref_port(int'(prod_sf[p]), far_p[p], cur) : exp_lvl;
      end
      if (cons_state[0] == PORT_DVFS_EN) begin
        any = 1;
        if (ref_port(int'(cons_se[0]), far_c[0], cur) > exp_lvl)
          exp_lvl = ref_port(int'(cons_se[0]), far_c[0], cur);
      end
      if (rate_en && rate_period != 0) begin
        any = 1;
        if (ref_pick(real'(rate_period) * 1000.0 / REQ_NS) > exp_lvl)
          exp_lvl = ref_pick(real'(rate_period) * 1000.0 / REQ_NS);
      end
      if (!any || !adapt_en) exp_lvl = cur;
      @(negedge clk);
      check(int'(level) == exp_lvl,
            $sformatf("window %0d: level %0d expected %0d (from %0d)", w, level, exp_lvl, cur));
      check(level_up == (exp_lvl > cur) && level_down == (exp_lvl < cur), "up/down pulse");
      check(freq_mhz == 16'(SDR_FREQ_MHZ[level]) && volt_mv == 16'(SDR_VOLT_MV[level]),
            "frequency/voltage outputs follow the level");
      if (exp_lvl > cur) ups++; else if (exp_lvl < cur) downs++; else holds++;
    end
    check(ups > 10 && downs > 10 && holds > 10,
          $sformatf("coverage: %0d up, %0d down, %0d hold", ups, downs, holds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
