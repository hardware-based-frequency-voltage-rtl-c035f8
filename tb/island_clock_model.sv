// island_clock_model: behavioural model of an island's clock source, the
// voltage-controlled ring oscillator locked by a digital PLL.  It is not
// synthesizable: it produces a clock whose period is 1/freq_mhz and follows
// a change of freq_mhz at the next clock edge, with no lock time.  phase_ps
// delays the first edge so that islands do not share edges.
module island_clock_model #(
  parameter int unsigned PHASE_PS = 0
) (
  input  logic [15:0] freq_mhz,
  output logic        clk
);
  initial begin
    clk = 1'b0;
    #(PHASE_PS * 1ps);
    forever begin
      int unsigned half_ps;
      half_ps = (freq_mhz == 0) ? 500_000 : 500_000 / freq_mhz;
      #(half_ps * 1ps) clk = ~clk;
    end
  end
endmodule
