// tb_mixed_clock_fifo: random writes and reads from two unrelated clocks,
// first with a fast writer (the FIFO fills) and then with a fast reader (it
// drains).  Checks that every written word comes out once and in order, that
// full is seen after DEPTH writes without reads, and that both full and
// empty phases occur.
module tb_mixed_clock_fifo;
  localparam int unsigned WIDTH = 16, DEPTH = 8;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic write = 0, read = 0, full, empty;
  logic [WIDTH-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  int whalf = 5, rhalf = 9;
  logic [WIDTH-1:0] model [$];
  int full_seen = 0, empty_seen = 0, wr_n = 0, rd_n = 0;
  bit wr_on = 0, rd_on = 0;
  int wr_pct = 90, rd_pct = 90;

  mixed_clock_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #(whalf * 1ns) wclk = ~wclk;
  always #(rhalf * 1ns) rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(5ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer.
  always @(negedge wclk) begin
    write <= 1'b0;
    if (wr_on && !full && $urandom_range(0, 99) < wr_pct) begin
      write <= 1'b1;
      din   <= WIDTH'(wr_n);
    end
  end
  always @(posedge wclk) begin
    if (write && !full) begin
      model.push_back(din);
      wr_n++;
    end
    if (full) full_seen++;
  end

  // Reader.
  always @(negedge rclk) begin
    read <= 1'b0;
    if (rd_on && !empty && $urandom_range(0, 99) < rd_pct) read <= 1'b1;
  end
  always @(posedge rclk) begin
    if (read && !empty) begin
      check(model.size() > 0 && dout == model[0],
            $sformatf("read %0d expected %0d", dout, model.size() ? model[0] : 0));
      if (model.size() > 0) void'(model.pop_front());
      rd_n++;
    end
    if (empty && rd_on) empty_seen++;
  end

  initial begin
    #50ns;
    wrst_n = 1; rrst_n = 1;
    // Fill without reading: full after exactly DEPTH words.
    wr_on = 1;
    repeat (40) @(posedge wclk);
    check(full && wr_n == DEPTH, $sformatf("full after %0d writes", wr_n));
    // Fast writer, slow reader.
    rd_on = 1;
    repeat (3000) @(posedge wclk);
    // Fast reader, slow writer.
    whalf = 12; rhalf = 4; wr_pct = 40;
    repeat (3000) @(posedge rclk);
    wr_on = 0;
    repeat (200) @(posedge rclk);
    check(model.size() == 0 && empty, "FIFO drained");
    check(full_seen > 0 && empty_seen > 0, "both full and empty phases occurred");
    check(rd_n == wr_n && rd_n > 1000, $sformatf("wrote %0d read %0d", wr_n, rd_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
