// stall_monitor: counts the cycles in one sampling window during which a
// producer or consumer port is stalled.
//
// A producer port stalls when it has data to write but its FIFO is full; a
// consumer port stalls when it wants data but its FIFO is empty.  Counting
// that stall signal, rather than the FIFO's full or empty flag, measures only
// the time the port really waits.  The window is set by the island's clock
// control, which pulses tsample on the last cycle of every window.  On that
// cycle the count of the window (including the current cycle) is copied to
// count and count_valid pulses for one cycle; the running counter restarts
// from zero.  The counter saturates at its maximum.
//
// Timing: count is registered; it changes one clk after the tsample pulse and
// is held until the next window ends.  Counter width CNT_W must hold the
// window length (T_SAMPLE cycles).
module stall_monitor #(
  parameter int unsigned CNT_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stall,
  input  logic             tsample,
  output logic [CNT_W-1:0] count,
  output logic             count_valid
);

  logic [CNT_W-1:0] running;
  logic [CNT_W-1:0] running_next;

  always_comb begin
    running_next = running;
    if (stall && running != '1) running_next = running + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= '0;
      count       <= '0;
      count_valid <= 1'b0;
    end else begin
      count_valid <= tsample;
      if (tsample) begin
        count   <= running_next;
        running <= '0;
      end else begin
        running <= running_next;
      end
    end
  end

endmodule
