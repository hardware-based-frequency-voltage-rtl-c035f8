// fifo_link: the communication channel between a producer island and a
// consumer island, with the monitoring hardware needed to scale their speeds.
//
// It holds a mixed-clock FIFO; one stall monitor on the producer side
// (counting S_f, cycles the producer had data but the FIFO was full); one
// stall monitor on the consumer side (counting S_e, cycles the consumer wanted
// data but the FIFO was empty); and two count synchronizers that hand each
// side's count to the clock control at the other side.  Each stall monitor
// closes its window on the tsample pulse of the clock control of its own
// island, so the producer-side clock control sees S_f (own) and S_e (far),
// and the consumer-side clock control sees S_e (own) and S_f (far).
//
// Timing: p_sf / c_se are valid the cycle after the local tsample and held;
// p_se / c_sf are the far-side counts, delivered a few cycles after the far
// window closes, with a one-cycle _valid strobe.  FIFO timing is that of
// mixed_clock_fifo.
module fifo_link #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned CNT_W = 13
) (
  // producer island
  input  logic             p_clk,
  input  logic             p_rst_n,
  input  logic             p_write,
  input  logic [WIDTH-1:0] p_din,
  output logic             p_full,
  input  logic             p_stall,
  input  logic             p_tsample,
  output logic [CNT_W-1:0] p_sf,
  output logic [CNT_W-1:0] p_se,
  output logic             p_se_valid,
  // consumer island
  input  logic             c_clk,
  input  logic             c_rst_n,
  input  logic             c_read,
  output logic [WIDTH-1:0] c_dout,
  output logic             c_empty,
  input  logic             c_stall,
  input  logic             c_tsample,
  output logic [CNT_W-1:0] c_se,
  output logic [CNT_W-1:0] c_sf,
  output logic             c_sf_valid
);

  logic p_sf_valid, c_se_valid;
  logic p_sync_busy, c_sync_busy;

  mixed_clock_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .wclk (p_clk), .wrst_n(p_rst_n), .write(p_write), .din(p_din), .full(p_full),
    .rclk (c_clk), .rrst_n(c_rst_n), .read (c_read),  .dout(c_dout), .empty(c_empty)
  );

  stall_monitor #(.CNT_W(CNT_W)) u_mon_prod (
    .clk(p_clk), .rst_n(p_rst_n), .stall(p_stall), .tsample(p_tsample),
    .count(p_sf), .count_valid(p_sf_valid)
  );

  stall_monitor #(.CNT_W(CNT_W)) u_mon_cons (
    .clk(c_clk), .rst_n(c_rst_n), .stall(c_stall), .tsample(c_tsample),
    .count(c_se), .count_valid(c_se_valid)
  );

  // S_f to the consumer side.
  count_synchronizer #(.WIDTH(CNT_W)) u_sync_sf (
    .src_clk(p_clk), .src_rst_n(p_rst_n), .load(p_sf_valid), .d(p_sf), .busy(p_sync_busy),
    .dst_clk(c_clk), .dst_rst_n(c_rst_n), .q(c_sf), .q_valid(c_sf_valid)
  );

  // S_e to the producer side.
  count_synchronizer #(.WIDTH(CNT_W)) u_sync_se (
    .src_clk(c_clk), .src_rst_n(c_rst_n), .load(c_se_valid), .d(c_se), .busy(c_sync_busy),
    .dst_clk(p_clk), .dst_rst_n(p_rst_n), .q(p_se), .q_valid(p_se_valid)
  );

endmodule
