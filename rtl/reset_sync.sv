// reset_sync: reset synchronizer for one island clock domain.  Assertion of
// the chip reset (arst_n low) is passed on at once; its release reaches
// rst_n two clk edges later, so every flop of the island leaves reset on the
// same edge of its own clock.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic s1;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      s1    <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      s1    <= 1'b1;
      rst_n <= s1;
    end
  end

endmodule
