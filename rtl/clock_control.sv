// clock_control: clock control logic of one voltage/frequency island.
//
// Every T_SAMPLE cycles of its own clock the block pulses tsample, which
// closes the sampling window of all stall monitors of its island.  On the
// next cycle it picks a new operating level for the island from the stall
// counts of the window:
//
//   * For every producer port in state dvfs_en_prod, own = S_f (cycles the
//     island stalled on a full FIFO) and other = S_e (cycles the consumer at
//     the far end stalled on an empty FIFO, received through a synchronizer).
//     For every consumer port in state dvfs_en_cons the roles are swapped:
//     own = S_e, other = S_f.
//   * With S = 1 - |S_e - S_f| / T_SAMPLE, a port whose own side stalled more
//     asks for f_curr * S (slow down) and a port whose far side stalled more
//     asks for f_curr / S (speed up).  Equal counts ask for f_curr.
//   * The rate port (the sink of an output-constrained system, or the source
//     of an input-constrained one) asks for P / T_req, where P is the
//     observed item period in cycles and T_req the required period.
//   * Each request is rounded up to the slowest available level that is not
//     slower than it, and the island takes the fastest of all its requests,
//     so that no enabled port loses throughput.  Ports in state fixed are
//     ignored.  When no port is enabled the level is held.
//
// A far-side count is used once: it is latched when its synchronizer
// delivers it and cleared by the decision that uses it; a window with no new
// far-side count treats it as zero.  After reset the island runs at its
// fastest level.  adapt_en low freezes the level (the source is idle).
//
// Interface: the _sf/_se count inputs of own ports are the registered stall
// monitor outputs, valid the cycle after tsample; far-side counts arrive with
// a one-cycle _valid strobe at any time.  level, freq_mhz and volt_mv change
// on the cycle after the decision; level_up / level_down pulse with them.
// Frequencies are in MHz, voltages in mV, required period REQ_PERIOD_NS in ns.
module clock_control import vfi_pkg::*; #(
  parameter int unsigned  N_PROD        = 1,
  parameter int unsigned  N_CONS        = 1,
  parameter int unsigned  T_SAMPLE      = T_SAMPLE_DEFAULT,
  parameter int unsigned  CNT_W         = $clog2(T_SAMPLE + 1),
  parameter int unsigned  RATE_W        = 24,
  parameter int unsigned  REQ_PERIOD_NS = 2000,
  parameter level_table_t FREQ_MHZ      = SDR_FREQ_MHZ,
  parameter level_table_t VOLT_MV       = SDR_VOLT_MV
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adapt_en,
  output logic              tsample,

  input  port_state_e       prod_state    [N_PROD],
  input  logic [CNT_W-1:0]  prod_sf       [N_PROD],
  input  logic [CNT_W-1:0]  prod_se       [N_PROD],
  input  logic              prod_se_valid [N_PROD],

  input  port_state_e       cons_state    [N_CONS],
  input  logic [CNT_W-1:0]  cons_se       [N_CONS],
  input  logic [CNT_W-1:0]  cons_sf       [N_CONS],
  input  logic              cons_sf_valid [N_CONS],

  input  logic              rate_en,
  input  logic [RATE_W-1:0] rate_period,

  output level_t            level,
  output logic [15:0]       freq_mhz,
  output logic [15:0]       volt_mv,
  output logic              level_up,
  output logic              level_down
);

  localparam int unsigned WIN_W = $clog2(T_SAMPLE);

  // ---------------- sampling window ----------------
  logic [WIN_W-1:0] win;
  logic             decide;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win    <= '0;
      decide <= 1'b0;
    end else begin
      win    <= tsample ? '0 : win + 1'b1;
      decide <= tsample;
    end
  end

  assign tsample = (win == WIN_W'(T_SAMPLE - 1));

  // ---------------- far-side counts, used once ----------------
  logic [CNT_W-1:0] prod_rem [N_PROD];
  logic             prod_new [N_PROD];
  logic [CNT_W-1:0] cons_rem [N_CONS];
  logic             cons_new [N_CONS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PROD; p++) begin
        prod_rem[p] <= '0;
        prod_new[p] <= 1'b0;
      end
      for (int c = 0; c < N_CONS; c++) begin
        cons_rem[c] <= '0;
        cons_new[c] <= 1'b0;
      end
    end else begin
      for (int p = 0; p < N_PROD; p++) begin
        if (prod_se_valid[p]) begin
          prod_rem[p] <= prod_se[p];
          prod_new[p] <= 1'b1;
        end else if (decide) begin
          prod_new[p] <= 1'b0;
        end
      end
      for (int c = 0; c < N_CONS; c++) begin
        if (cons_sf_valid[c]) begin
          cons_rem[c] <= cons_sf[c];
          cons_new[c] <= 1'b1;
        end else if (decide) begin
          cons_new[c] <= 1'b0;
        end
      end
    end
  end

  // ---------------- level requests ----------------
  // Level requested by one port from its own and far-side stall counts.
  function automatic level_t port_request(input logic [CNT_W-1:0] own,
                                          input logic [CNT_W-1:0] other,
                                          input int unsigned      f_curr);
    longint unsigned d, t;
    t = 64'(T_SAMPLE);
    d = (own > other) ? 64'(own - other) : 64'(other - own);
    if (d > t) d = t;
    if (own > other)      return pick_level(FREQ_MHZ, f_curr * (t - d), t); // f*S
    else if (other > own) return pick_level(FREQ_MHZ, f_curr * t, t - d);   // f/S
    else                  return pick_level(FREQ_MHZ, 64'(f_curr), 1);
  endfunction

  int unsigned f_curr;
  level_t      target;
  logic        any_req;

  assign f_curr = FREQ_MHZ[level];

  always_comb begin
    level_t req;
    req     = '0;
    target  = '0;
    any_req = 1'b0;
    for (int p = 0; p < N_PROD; p++) begin
      if (prod_state[p] == PORT_DVFS_EN) begin
        req     = port_request(prod_sf[p], prod_new[p] ? prod_rem[p] : '0, f_curr);
        any_req = 1'b1;
        if (req > target) target = req;
      end
    end
    for (int c = 0; c < N_CONS; c++) begin
      if (cons_state[c] == PORT_DVFS_EN) begin
        req     = port_request(cons_se[c], cons_new[c] ? cons_rem[c] : '0, f_curr);
        any_req = 1'b1;
        if (req > target) target = req;
      end
    end
    if (rate_en && rate_period != '0) begin
      req     = pick_level(FREQ_MHZ, 64'(rate_period) * 1000, 64'(REQ_PERIOD_NS));
      any_req = 1'b1;
      if (req > target) target = req;
    end
  end

  // ---------------- operating level ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level      <= level_t'(NUM_LEVELS - 1);
      level_up   <= 1'b0;
      level_down <= 1'b0;
    end else begin
      level_up   <= 1'b0;
      level_down <= 1'b0;
      if (decide && adapt_en && any_req) begin
        level      <= target;
        level_up   <= (target > level);
        level_down <= (target < level);
      end
    end
  end

  assign freq_mhz = 16'(FREQ_MHZ[level]);
  assign volt_mv  = 16'(VOLT_MV[level]);

endmodule
