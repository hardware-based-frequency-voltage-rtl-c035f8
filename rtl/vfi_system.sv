// vfi_system: a complete VFI system, the example component graph of eight
// islands (source s, nodes 1..6, sink S) joined by nine FIFO links:
//
//   s->1, 1->2, 2->3, 3->S, 1->4, 4->5, 5->S, 5->6, 6->4
//
// Nodes 4, 5 and 6 form a feedback loop; the link 6->4 starts with
// PRIME_ITEMS items in flight (EDGE_PRIMED) so that the loop can run.  The
// graph is given by the edge-list parameters EDGE_SRC / EDGE_DST, so the
// same module builds other graphs: node n's k-th input is the k-th edge (in
// edge order) whose destination is n, and likewise for outputs.  Input 0 of
// a node carries the item the node forwards; a node with no inputs is a
// source, a node with no outputs is a sink.
//
// Every island gets its own clock clk[n] and sets its own operating level
// level[n] / freq_mhz[n] / volt_mv[n]; the oscillator and supply that turn
// this level into a clock frequency and voltage are outside this module.
// Every edge is a fifo_link whose producer half runs on the source island's
// clock and whose consumer half runs on the destination island's clock.
// arst_n is the asynchronous chip reset; each island releases it through its
// own reset synchronizer.  After reset every island runs at its fastest
// level; every T_SAMPLE island cycles each island re-selects its level from
// the stall counts of its links (and, at the constrained end, from its item
// rate), per the constraint mode sink_constrained.
//
// run lets the source issue items, adapt_en lets the islands change level,
// sink_constrained selects an output-rate (1) or input-rate (0) constrained
// system.  Per-node and per-edge status (item pulses, stalls, level changes,
// join errors) is brought out for observation; join_err of a source stays 0,
// as it has no inputs to compare.
module vfi_system import vfi_pkg::*; #(
  parameter int unsigned  N_NODES       = 8,
  parameter int unsigned  N_EDGES       = 9,
  parameter int unsigned  EDGE_SRC    [N_EDGES] = '{0, 1, 2, 3, 1, 4, 5, 5, 6},
  parameter int unsigned  EDGE_DST    [N_EDGES] = '{1, 2, 3, 7, 4, 5, 7, 6, 4},
  parameter logic         EDGE_PRIMED [N_EDGES] = '{0, 0, 0, 0, 0, 0, 0, 0, 1},
  parameter int unsigned  WORK_CYCLES [N_NODES] = '{20, 20, 10, 10, 8, 8, 4, 20},
  parameter int unsigned  PRIME_ITEMS   = 1,
  parameter int unsigned  WIDTH         = 16,
  parameter int unsigned  FIFO_DEPTH    = 8,
  parameter int unsigned  T_SAMPLE      = T_SAMPLE_DEFAULT,
  parameter int unsigned  REQ_PERIOD_NS = 2000,
  parameter level_table_t FREQ_MHZ      = SDR_FREQ_MHZ,
  parameter level_table_t VOLT_MV       = SDR_VOLT_MV,
  localparam int unsigned CNT_W         = $clog2(T_SAMPLE + 1)
) (
  input  logic             clk        [N_NODES],
  input  logic             arst_n,
  input  logic             run,
  input  logic             adapt_en,
  input  logic             sink_constrained,

  output level_t           level      [N_NODES],
  output logic [15:0]      freq_mhz   [N_NODES],
  output logic [15:0]      volt_mv    [N_NODES],
  output logic             level_up   [N_NODES],
  output logic             level_down [N_NODES],
  output logic             item_done  [N_NODES],
  output logic [WIDTH-1:0] item_data  [N_NODES],
  output logic             join_err   [N_NODES],
  output logic             prod_stall [N_EDGES],
  output logic             cons_stall [N_EDGES],
  output logic             edge_full  [N_EDGES],
  output logic             edge_empty [N_EDGES]
);

  // ---------------- graph helpers (elaboration time) ----------------
  function automatic int unsigned count_in(input int unsigned n);
    int unsigned c = 0;
    for (int e = 0; e < N_EDGES; e++) if (EDGE_DST[e] == n) c++;
    return c;
  endfunction

  function automatic int unsigned count_out(input int unsigned n);
    int unsigned c = 0;
    for (int e = 0; e < N_EDGES; e++) if (EDGE_SRC[e] == n) c++;
    return c;
  endfunction

  // Edge index of the k-th input (dir 0) or output (dir 1) of node n.
  function automatic int unsigned port_edge(input int unsigned n,
                                            input int unsigned k,
                                            input bit          dir);
    int unsigned c = 0;
    int unsigned r = 0;
    for (int e = 0; e < N_EDGES; e++) begin
      if ((dir ? EDGE_SRC[e] : EDGE_DST[e]) == n) begin
        if (c == k) r = e;
        c++;
      end
    end
    return r;
  endfunction

  function automatic logic [31:0] primed_mask(input int unsigned n);
    logic [31:0] m = '0;
    for (int k = 0; k < 32; k++)
      if (k < count_in(n)) m[k] = EDGE_PRIMED[port_edge(n, k, 1'b0)];
    return m;
  endfunction

  // ---------------- per-edge nets ----------------
  logic             rst_n [N_NODES];
  logic             tsample [N_NODES];

  logic             e_write [N_EDGES];
  logic [WIDTH-1:0] e_din   [N_EDGES];
  logic             e_read  [N_EDGES];
  logic [WIDTH-1:0] e_dout  [N_EDGES];
  logic [CNT_W-1:0] e_p_sf  [N_EDGES];
  logic [CNT_W-1:0] e_p_se  [N_EDGES];
  logic             e_p_se_valid [N_EDGES];
  logic [CNT_W-1:0] e_c_se  [N_EDGES];
  logic [CNT_W-1:0] e_c_sf  [N_EDGES];
  logic             e_c_sf_valid [N_EDGES];

  for (genvar n = 0; n < N_NODES; n++) begin : g_rst
    reset_sync u_rst (.clk(clk[n]), .arst_n, .rst_n(rst_n[n]));
  end

  for (genvar e = 0; e < N_EDGES; e++) begin : g_link
    fifo_link #(.WIDTH(WIDTH), .DEPTH(FIFO_DEPTH), .CNT_W(CNT_W)) u_link (
      .p_clk     (clk[EDGE_SRC[e]]),     .p_rst_n  (rst_n[EDGE_SRC[e]]),
      .p_write   (e_write[e]),           .p_din    (e_din[e]),
      .p_full    (edge_full[e]),         .p_stall  (prod_stall[e]),
      .p_tsample (tsample[EDGE_SRC[e]]),
      .p_sf      (e_p_sf[e]),            .p_se     (e_p_se[e]),
      .p_se_valid(e_p_se_valid[e]),
      .c_clk     (clk[EDGE_DST[e]]),     .c_rst_n  (rst_n[EDGE_DST[e]]),
      .c_read    (e_read[e]),            .c_dout   (e_dout[e]),
      .c_empty   (edge_empty[e]),        .c_stall  (cons_stall[e]),
      .c_tsample (tsample[EDGE_DST[e]]),
      .c_se      (e_c_se[e]),            .c_sf     (e_c_sf[e]),
      .c_sf_valid(e_c_sf_valid[e])
    );
  end

  // ---------------- islands ----------------
  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    localparam int unsigned NIN  = count_in(n);
    localparam int unsigned NOUT = count_out(n);
    localparam int unsigned NI   = (NIN  > 0) ? NIN  : 1;
    localparam int unsigned NO   = (NOUT > 0) ? NOUT : 1;

    logic             in_empty [NI], in_read [NI], in_stall [NI], in_sf_valid [NI];
    logic [WIDTH-1:0] in_data  [NI];
    logic [CNT_W-1:0] in_se    [NI], in_sf [NI];
    logic             out_full [NO], out_write [NO], out_stall [NO], out_se_valid [NO];
    logic [CNT_W-1:0] out_sf   [NO], out_se [NO];
    logic [WIDTH-1:0] out_data;

    for (genvar k = 0; k < NI; k++) begin : g_in
      if (k < NIN) begin : g_used
        localparam int unsigned E = port_edge(n, k, 1'b0);
        assign in_empty[k]    = edge_empty[E];
        assign in_data[k]     = e_dout[E];
        assign in_se[k]       = e_c_se[E];
        assign in_sf[k]       = e_c_sf[E];
        assign in_sf_valid[k] = e_c_sf_valid[E];
        assign e_read[E]      = in_read[k];
        assign cons_stall[E]  = in_stall[k];
      end else begin : g_none
        assign in_empty[k]    = 1'b1;
        assign in_data[k]     = '0;
        assign in_se[k]       = '0;
        assign in_sf[k]       = '0;
        assign in_sf_valid[k] = 1'b0;
      end
    end

    for (genvar k = 0; k < NO; k++) begin : g_out
      if (k < NOUT) begin : g_used
        localparam int unsigned E = port_edge(n, k, 1'b1);
        assign out_full[k]     = edge_full[E];
        assign out_sf[k]       = e_p_sf[E];
        assign out_se[k]       = e_p_se[E];
        assign out_se_valid[k] = e_p_se_valid[E];
        assign e_write[E]      = out_write[k];
        assign e_din[E]        = out_data;
        assign prod_stall[E]   = out_stall[k];
      end else begin : g_none
        assign out_full[k]     = 1'b0;
        assign out_sf[k]       = '0;
        assign out_se[k]       = '0;
        assign out_se_valid[k] = 1'b0;
      end
    end

    vfi_island #(
      .N_IN(NIN), .N_OUT(NOUT), .WIDTH(WIDTH),
      .WORK_CYCLES(WORK_CYCLES[n]), .PRIMED_IN(primed_mask(n)),
      .PRIME_ITEMS(PRIME_ITEMS),
      .T_SAMPLE(T_SAMPLE), .CNT_W(CNT_W), .REQ_PERIOD_NS(REQ_PERIOD_NS),
      .FREQ_MHZ(FREQ_MHZ), .VOLT_MV(VOLT_MV)
    ) u_island (
      .clk(clk[n]), .rst_n(rst_n[n]), .run, .adapt_en, .sink_constrained,
      .in_empty, .in_data, .in_read, .in_stall, .in_se, .in_sf, .in_sf_valid,
      .out_full, .out_write, .out_data, .out_stall, .out_sf, .out_se, .out_se_valid,
      .tsample(tsample[n]),
      .level(level[n]), .freq_mhz(freq_mhz[n]), .volt_mv(volt_mv[n]),
      .level_up(level_up[n]), .level_down(level_down[n]),
      .item_done(item_done[n]), .item_data(item_data[n]), .join_err(join_err[n])
    );
  end

endmodule
