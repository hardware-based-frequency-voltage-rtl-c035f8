// tb_fifo_link: a producer and a consumer on unrelated clocks exchange a
// numbered stream through a FIFO link, first with a fast producer (it stalls
// on full) and then with a fast consumer (it stalls on empty).  Each side
// closes its own sampling windows.  Checks the stream order, that each
// side's own count equals the stall cycles the testbench counted in that
// window, that each far-side count delivered equals the count the other side
// reported, and that both S_f and S_e were non-zero in their phase.
module tb_fifo_link;
  localparam int unsigned W = 16, CNT_W = 10, TP = 300, TC = 200;

  logic p_clk = 0, c_clk = 0, p_rst_n = 0, c_rst_n = 0;
  logic p_write = 0, p_full, p_stall = 0, p_tsample = 0, p_se_valid;
  logic [W-1:0] p_din = '0, c_dout;
  logic [CNT_W-1:0] p_sf, p_se, c_se, c_sf;
  logic c_read = 0, c_empty, c_stall = 0, c_tsample = 0, c_sf_valid;
  int checks = 0, failures = 0;
  int phalf = 4, chalf = 9, p_pct = 100, c_pct = 100;

  fifo_link #(.WIDTH(W), .DEPTH(8), .CNT_W(CNT_W)) dut (.*);

  always #(phalf * 1ns) p_clk = ~p_clk;
  always #(chalf * 1ns) c_clk = ~c_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(20ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer side.
  int p_cyc = 0, p_cnt = 0, p_win_stalls = 0, wr_n = 0;
  bit p_has = 0;
  int p_reported [$], c_reported [$];
  int sf_nonzero = 0, se_nonzero = 0;
  always @(negedge p_clk) if (p_rst_n) begin
    if (!p_has) p_has = ($urandom_range(0, 99) < p_pct);
    p_write   = p_has && !p_full;
    p_stall   = p_has && p_full;
    p_din     = W'(wr_n);
    p_tsample = (p_cyc % TP == TP - 1);
  end
  always @(posedge p_clk) if (p_rst_n) begin
    if (p_stall) p_win_stalls++;
    if (p_write) begin wr_n++; p_has = 0; end
    if (p_tsample) begin p_cnt = p_win_stalls; p_win_stalls = 0; end
    if (p_cyc > 0 && (p_cyc - 1) % TP == TP - 1) begin
      check(p_sf == CNT_W'(p_cnt), $sformatf("S_f %0d expected %0d", p_sf, p_cnt));
      p_reported.push_back(p_cnt);
      if (p_cnt > 0) sf_nonzero++;
    end
    if (p_se_valid) begin
      check(c_reported.size() > 0 && p_se == CNT_W'(c_reported[0]), "far-side S_e");
      if (c_reported.size() > 0) void'(c_reported.pop_front());
    end
    p_cyc++;
  end

  // Consumer side.
  int c_cyc = 0, c_cnt = 0, c_win_stalls = 0, rd_n = 0;
  bit c_wants = 0;
  always @(negedge c_clk) if (c_rst_n) begin
    if (!c_wants) c_wants = ($urandom_range(0, 99) < c_pct);
    c_read    = c_wants && !c_empty;
    c_stall   = c_wants && c_empty;
    c_tsample = (c_cyc % TC == TC - 1);
  end
  always @(posedge c_clk) if (c_rst_n) begin
    if (c_stall) c_win_stalls++;
    if (c_read) begin
      check(c_dout == W'(rd_n), $sformatf("read %0d expected %0d", c_dout, rd_n));
      rd_n++;
      c_wants = 0;
    end
    if (c_tsample) begin c_cnt = c_win_stalls; c_win_stalls = 0; end
    if (c_cyc > 0 && (c_cyc - 1) % TC == TC - 1) begin
      check(c_se == CNT_W'(c_cnt), $sformatf("S_e %0d expected %0d", c_se, c_cnt));
      c_reported.push_back(c_cnt);
      if (c_cnt > 0) se_nonzero++;
    end
    if (c_sf_valid) begin
      check(p_reported.size() > 0 && c_sf == CNT_W'(p_reported[0]), "far-side S_f");
      if (p_reported.size() > 0) void'(p_reported.pop_front());
    end
    c_cyc++;
  end

  initial begin
    #40ns;
    p_rst_n = 1; c_rst_n = 1;
    // Fast producer: S_f grows.
    #(100us);
    check(sf_nonzero > 5, $sformatf("producer stalled in %0d windows", sf_nonzero));
    // Fast consumer, slow producer: S_e grows.
    phalf = 9; chalf = 4; p_pct = 30;
    #(100us);
    check(se_nonzero > 5, $sformatf("consumer stalled in %0d windows", se_nonzero));
    check(rd_n > 1000, $sformatf("%0d items transferred", rd_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
