// tb_rate_monitor: issues item pulses at random intervals and checks period
// against an independently kept count: the larger of the last item-to-item
// interval and the cycles since the last item.
module tb_rate_monitor;
  localparam int unsigned CNT_W = 10;

  logic clk = 0, rst_n = 0, item = 0;
  logic [CNT_W-1:0] period;
  int checks = 0, failures = 0;

  rate_monitor #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned last_iv, since;
    bit seen;
    seen = 0; last_iv = 0; since = 1;  // one edge passes before the first check
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int unsigned gap;
      gap = (i % 50 == 49) ? 1500 : $urandom_range(1, 60);
      for (int c = 0; c < gap; c++) begin
        @(negedge clk);
        item = (c == gap - 1);
        // Reference, before this edge.
        begin
          int unsigned exp_p;
          exp_p = seen ? ((since > last_iv) ? since : last_iv) : since;
          if (exp_p > 2**CNT_W - 1) exp_p = 2**CNT_W - 1;
          check(period == CNT_W'(exp_p),
                $sformatf("period %0d expected %0d", period, exp_p));
        end
        @(posedge clk);
        if (item) begin
          if (seen) last_iv = since + 1;
          if (last_iv > 2**CNT_W - 1) last_iv = 2**CNT_W - 1;
          seen  = 1;
          since = 0;
        end else begin
          since++;
        end
      end
      @(negedge clk) item = 0;
      since++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
