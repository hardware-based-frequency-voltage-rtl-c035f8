// tb_count_synchronizer: sends random values from one clock domain to
// another with unrelated periods (both directions of speed ratio) and checks
// that every value loaded while the synchronizer was free arrives once,
// unchanged and in order, and that the transfer latency stays within a few
// destination cycles.
module tb_count_synchronizer;
  localparam int unsigned W = 13;

  logic src_clk = 0, dst_clk = 0, src_rst_n = 0, dst_rst_n = 0;
  logic load = 0, busy, q_valid;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;
  int src_half = 7, dst_half = 11;
  logic [W-1:0] sent [$];
  int sent_n = 0, got_n = 0;
  realtime t_load;

  count_synchronizer #(.WIDTH(W)) dut (.*);

  always #(src_half * 1ns) src_clk = ~src_clk;
  always #(dst_half * 1ns) dst_clk = ~dst_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dst_clk) begin
    if (q_valid) begin
      got_n++;
      check(sent.size() > 0, "value arrived that was never sent");
      if (sent.size() > 0) check(q == sent.pop_front(), "value corrupted");
      check(($realtime - t_load) <= (2 * src_half + 8 * dst_half) * 1ns,
            $sformatf("latency %0t too long", $realtime - t_load));
    end
  end

  initial begin
    #100ns;
    src_rst_n = 1; dst_rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin src_half = 13; dst_half = 3; end
      for (int i = 0; i < 200; i++) begin
        @(negedge src_clk);
        d    = W'($urandom);
        load = 1'b1;
        if (!busy) begin
          sent.push_back(d);
          sent_n++;
          t_load = $realtime;
        end
        @(negedge src_clk);
        load = 1'b0;
        repeat ($urandom_range(0, 12)) @(negedge src_clk);
      end
      repeat (20) @(negedge dst_clk);
      repeat (20) @(negedge src_clk);
    end
    check(got_n == sent_n, $sformatf("sent %0d received %0d", sent_n, got_n));
    check(got_n > 200, "too few transfers accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
