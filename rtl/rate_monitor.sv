// rate_monitor: measures the period between the data items of the node
// whose rate is constrained (the sink of an output-rate-constrained system,
// or the source of an input-rate-constrained one).
//
// There is no FIFO link at that port, so a stall count cannot be used.
// Instead the monitor counts island clock cycles from one item to the next.
// period reports the larger of the last complete item-to-item interval and
// the time already elapsed since the last item, so a node that has stopped
// producing is seen as slow at once rather than at its next item.  The clock
// control turns this cycle count into a required frequency: an observed
// period of P cycles at f_curr is P/f_curr seconds, the scaling factor is
// S = (P/f_curr)/T_req, and the required frequency f_curr*S = P/T_req.
//
// Timing: item is a one-cycle pulse per data item; period is registered and
// valid from reset (it reads 0 until the first item).  The counters saturate.
module rate_monitor #(
  parameter int unsigned CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             item,
  output logic [CNT_W-1:0] period
);

  logic [CNT_W-1:0] elapsed, last;
  logic             seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elapsed <= '0;
      last    <= '0;
      seen    <= 1'b0;
    end else if (item) begin
      if (seen) last <= (elapsed == '1) ? elapsed : elapsed + 1'b1;
      seen    <= 1'b1;
      elapsed <= '0;
    end else if (elapsed != '1) begin
      elapsed <= elapsed + 1'b1;
    end
  end

  // Before the first item only the time since reset is known.
  assign period = !seen ? elapsed : ((elapsed > last) ? elapsed : last);

endmodule
