// tb_stall_monitor: drives random stall patterns through windows of random
// length and checks, after every window, that the reported count equals the
// number of stalled cycles a reference counter saw, that count_valid pulses
// exactly on the cycle after tsample, and that the counter saturates.
module tb_stall_monitor;
  localparam int unsigned CNT_W = 6;

  logic clk = 0, rst_n = 0, stall = 0, tsample = 0;
  logic [CNT_W-1:0] count;
  logic count_valid;
  int checks = 0, failures = 0;

  stall_monitor #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expect_cnt, len, pct;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      len = 1 + $urandom_range(0, 80);
      pct = $urandom_range(0, 100);
      if (w % 10 == 9) pct = 100;  // saturation windows
      expect_cnt = 0;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        stall   = ($urandom_range(0, 99) < pct);
        tsample = (c == len - 1);
        if (stall) expect_cnt++;
        @(posedge clk);
        #1;
        check(count_valid == tsample, "count_valid follows tsample by one cycle");
      end
      @(negedge clk);
      stall = 0; tsample = 0;
      if (expect_cnt > 2**CNT_W - 1) expect_cnt = 2**CNT_W - 1;
      check(count == CNT_W'(expect_cnt),
            $sformatf("window %0d: count %0d expected %0d", w, count, expect_cnt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
