// vfi_island: one voltage/frequency island, i.e. a processing element with
// its own clock and supply, together with the clock control that sets them.
//
// The island holds the PE model, the island's clock control and a rate
// monitor.  The FIFO links (with their stall monitors and synchronizers) sit
// between islands and are connected through the in_/out_ port arrays: for
// each input link the island drives read and the consumer stall and receives
// empty, data and the two stall counts; for each output link it drives write,
// data and the producer stall and receives full and the two counts.  tsample
// closes the windows of the stall monitors on this island's side of every
// link.
//
// The system-wide constraint mode sets the scaling state of every port.  In
// an output-rate-constrained system (sink_constrained high) every producer
// port is dvfs_en_prod, every consumer port is fixed, and the sink island
// (no outputs) is also steered by its rate monitor towards the required
// output period REQ_PERIOD_NS.  In an input-rate-constrained system every
// consumer port is dvfs_en_cons, every producer port is fixed, and the source
// island (no inputs) uses its rate monitor.  sink_constrained and adapt_en
// are static configuration inputs; they pass through two flops into the
// island clock domain.  rst_n must already be synchronous to clk.
//
// The clock itself comes from outside: level, freq_mhz and volt_mv tell the
// island's oscillator and supply which operating point to run at.
module vfi_island import vfi_pkg::*; #(
  parameter int unsigned  N_IN          = 1,
  parameter int unsigned  N_OUT         = 1,
  parameter int unsigned  WIDTH         = 16,
  parameter int unsigned  WORK_CYCLES   = 8,
  parameter logic [31:0]  PRIMED_IN     = '0,
  parameter int unsigned  PRIME_ITEMS   = 1,
  parameter int unsigned  T_SAMPLE      = T_SAMPLE_DEFAULT,
  parameter int unsigned  CNT_W         = $clog2(T_SAMPLE + 1),
  parameter int unsigned  RATE_W        = 24,
  parameter int unsigned  REQ_PERIOD_NS = 2000,
  parameter level_table_t FREQ_MHZ      = SDR_FREQ_MHZ,
  parameter level_table_t VOLT_MV       = SDR_VOLT_MV,
  localparam int unsigned NI            = (N_IN  > 0) ? N_IN  : 1,
  localparam int unsigned NO            = (N_OUT > 0) ? N_OUT : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             adapt_en,
  input  logic             sink_constrained,

  // input links (this island is their consumer)
  input  logic             in_empty    [NI],
  input  logic [WIDTH-1:0] in_data     [NI],
  output logic             in_read     [NI],
  output logic             in_stall    [NI],
  input  logic [CNT_W-1:0] in_se       [NI],
  input  logic [CNT_W-1:0] in_sf       [NI],
  input  logic             in_sf_valid [NI],

  // output links (this island is their producer)
  input  logic             out_full     [NO],
  output logic             out_write    [NO],
  output logic [WIDTH-1:0] out_data,
  output logic             out_stall    [NO],
  input  logic [CNT_W-1:0] out_sf       [NO],
  input  logic [CNT_W-1:0] out_se       [NO],
  input  logic             out_se_valid [NO],

  output logic             tsample,
  output level_t           level,
  output logic [15:0]      freq_mhz,
  output logic [15:0]      volt_mv,
  output logic             level_up,
  output logic             level_down,
  output logic             item_done,
  output logic [WIDTH-1:0] item_data,
  output logic             join_err
);

  // Static configuration into this clock domain.
  logic [1:0] mode_s, adapt_s, run_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_s  <= '0;
      adapt_s <= '0;
      run_s   <= '0;
    end else begin
      mode_s  <= {mode_s[0],  sink_constrained};
      adapt_s <= {adapt_s[0], adapt_en};
      run_s   <= {run_s[0],   run};
    end
  end

  logic sink_mode;
  assign sink_mode = mode_s[1];

  pe_model #(
    .N_IN(N_IN), .N_OUT(N_OUT), .WIDTH(WIDTH),
    .WORK_CYCLES(WORK_CYCLES), .PRIMED_IN(PRIMED_IN), .PRIME_ITEMS(PRIME_ITEMS)
  ) u_pe (
    .clk, .rst_n, .run(run_s[1]),
    .in_empty, .in_data, .in_read, .cons_stall(in_stall),
    .out_full, .out_write, .out_data, .prod_stall(out_stall),
    .item_done, .item_data, .join_err
  );

  // Scaling state of each port (algorithm step 2).
  port_state_e prod_state [NO];
  port_state_e cons_state [NI];
  always_comb begin
    for (int j = 0; j < NO; j++)
      prod_state[j] = (N_OUT > 0 && sink_mode) ? PORT_DVFS_EN : PORT_FIXED;
    for (int i = 0; i < NI; i++)
      cons_state[i] = (N_IN > 0 && !sink_mode) ? PORT_DVFS_EN : PORT_FIXED;
  end

  // The constrained end of the graph watches its own item rate.
  logic              rate_en;
  logic [RATE_W-1:0] rate_period;
  assign rate_en = sink_mode ? (N_OUT == 0) : (N_IN == 0);

  rate_monitor #(.CNT_W(RATE_W)) u_rate (
    .clk, .rst_n, .item(item_done), .period(rate_period)
  );

  clock_control #(
    .N_PROD(NO), .N_CONS(NI), .T_SAMPLE(T_SAMPLE), .CNT_W(CNT_W),
    .RATE_W(RATE_W), .REQ_PERIOD_NS(REQ_PERIOD_NS),
    .FREQ_MHZ(FREQ_MHZ), .VOLT_MV(VOLT_MV)
  ) u_ctrl (
    .clk, .rst_n, .adapt_en(adapt_s[1]), .tsample,
    .prod_state, .prod_sf(out_sf), .prod_se(out_se), .prod_se_valid(out_se_valid),
    .cons_state, .cons_se(in_se),  .cons_sf(in_sf),  .cons_sf_valid(in_sf_valid),
    .rate_en, .rate_period,
    .level, .freq_mhz, .volt_mv, .level_up, .level_down
  );

endmodule
