// tb_pe_model: three PE models (a source, a two-input/two-output node with
// one primed feedback input, and a two-input sink) connected to FIFOs kept
// by the testbench, with random empty/full behaviour.  Checks that every
// item arrives in order at every output, that stalls are raised only while
// the PE waits on an empty input or a full output and that both kinds occur,
// the cycles per item when nothing stalls (source WORK+1, node WORK+2), that
// the source stops when run is low, and that a mismatched item at a join
// sets join_err.
module tb_pe_model;
  localparam int unsigned W = 16, WORK = 5;

  logic clk = 0, rst_n = 0, run = 0;
  int checks = 0, failures = 0;

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

  // ---------------- source ----------------
  logic s_in_empty [1], s_in_read [1], s_cstall [1];
  logic [W-1:0] s_in_data [1];
  logic s_full [1], s_write [1], s_pstall [1], s_done, s_jerr;
  logic [W-1:0] s_out, s_idata;
  assign s_in_empty[0] = 1'b1;
  assign s_in_data[0]  = '0;
  pe_model #(.N_IN(0), .N_OUT(1), .WIDTH(W), .WORK_CYCLES(WORK)) u_src (
    .clk, .rst_n, .run, .in_empty(s_in_empty), .in_data(s_in_data), .in_read(s_in_read),
    .cons_stall(s_cstall), .out_full(s_full), .out_write(s_write), .out_data(s_out),
    .prod_stall(s_pstall), .item_done(s_done), .item_data(s_idata), .join_err(s_jerr));

  // ---------------- node: 2 in (input 1 primed), 2 out ----------------
  logic n_empty [2], n_read [2], n_cstall [2];
  logic [W-1:0] n_data [2];
  logic n_full [2], n_write [2], n_pstall [2], n_done, n_jerr;
  logic [W-1:0] n_out, n_idata;
  pe_model #(.N_IN(2), .N_OUT(2), .WIDTH(W), .WORK_CYCLES(WORK), .PRIMED_IN(32'b10)) u_node (
    .clk, .rst_n, .run(1'b0), .in_empty(n_empty), .in_data(n_data), .in_read(n_read),
    .cons_stall(n_cstall), .out_full(n_full), .out_write(n_write), .out_data(n_out),
    .prod_stall(n_pstall), .item_done(n_done), .item_data(n_idata), .join_err(n_jerr));

  // ---------------- sink: 2 in ----------------
  logic k_empty [2], k_read [2], k_cstall [2];
  logic [W-1:0] k_data [2];
  logic k_full [1], k_write [1], k_pstall [1], k_done, k_jerr;
  logic [W-1:0] k_out, k_idata;
  assign k_full[0] = 1'b0;
  pe_model #(.N_IN(2), .N_OUT(0), .WIDTH(W), .WORK_CYCLES(WORK)) u_sink (
    .clk, .rst_n, .run(1'b0), .in_empty(k_empty), .in_data(k_data), .in_read(k_read),
    .cons_stall(k_cstall), .out_full(k_full), .out_write(k_write), .out_data(k_out),
    .prod_stall(k_pstall), .item_done(k_done), .item_data(k_idata), .join_err(k_jerr));

  // Testbench FIFOs: source -> node in 0, node out 0 -> sink in 0 and 1
  // (both sink inputs are fed from node out 0 and out 1), node in 1 fed
  // directly by the testbench with the sequence lagging by one.
  logic [W-1:0] q_sn [$], q_in1 [$], q_o0 [$], q_o1 [$];
  int pct_empty = 0, pct_full = 0;
  bit block_sn, block_in1, block_o0, block_o1;
  int src_n = 0, node_n = 0, sink_n = 0;
  int cstall_n = 0, pstall_n = 0;
  bit corrupt = 0;

  always @(negedge clk) begin
    block_sn  = ($urandom_range(0, 99) < pct_empty);
    block_in1 = ($urandom_range(0, 99) < pct_empty);
    block_o0  = ($urandom_range(0, 99) < pct_full);
    block_o1  = ($urandom_range(0, 99) < pct_full);
    s_full[0]  = block_o0;
    n_empty[0] = block_sn  || q_sn.size()  == 0;
    n_data[0]  = q_sn.size()  ? q_sn[0]  : '0;
    n_empty[1] = block_in1 || q_in1.size() == 0;
    n_data[1]  = q_in1.size() ? q_in1[0] : '0;
    n_full[0]  = block_o0;
    n_full[1]  = block_o1;
    k_empty[0] = block_sn  || q_o0.size() == 0;
    k_data[0]  = q_o0.size() ? q_o0[0] : '0;
    k_empty[1] = block_in1 || q_o1.size() == 0;
    k_data[1]  = q_o1.size() ? q_o1[0] : '0;
  end

  // Independent model of what the node is waiting for: both inputs after
  // it has written its previous item (input 1 not on the first iteration),
  // both outputs WORK cycles after its last read.
  bit wait_in [2] = '{1, 0};
  bit pend_out [2] = '{0, 0};
  bit wrote [2] = '{0, 0};
  int work_ctr = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      check(n_cstall[i] == (wait_in[i] && n_empty[i]),
            $sformatf("node consumer stall %0d: got %0d", i, n_cstall[i]));
      check(n_pstall[i] == (pend_out[i] && n_full[i]),
            $sformatf("node producer stall %0d: got %0d", i, n_pstall[i]));
    end
    if (work_ctr > 0) begin
      work_ctr--;
      if (work_ctr == 0) pend_out = '{1, 1};
    end
    if ((wait_in[0] || wait_in[1]) &&
        !(wait_in[0] && !n_read[0]) && !(wait_in[1] && !n_read[1])) work_ctr = WORK;
    for (int i = 0; i < 2; i++) if (n_read[i]) wait_in[i] = 0;
    for (int j = 0; j < 2; j++) if (n_write[j]) begin pend_out[j] = 0; wrote[j] = 1; end
    if (wrote[0] && wrote[1]) begin
      wrote   = '{0, 0};
      wait_in = '{1, 1};
    end
  end

  always @(posedge clk) if (rst_n) begin
    // stall rules
    for (int i = 0; i < 2; i++) begin
      if (n_cstall[i]) begin cstall_n++; check(n_empty[i] && !n_read[i], "node consumer stall without empty FIFO"); end
      if (n_pstall[i]) begin pstall_n++; check(n_full[i] && !n_write[i], "node producer stall without full FIFO"); end
      if (n_read[i]) check(!n_empty[i], "node read while empty");
      if (n_write[i]) check(!n_full[i], "node write while full");
    end
    if (s_write[0]) begin
      check(s_out == W'(src_n), $sformatf("source item %0d expected %0d", s_out, src_n));
      src_n++;
      q_sn.push_back(s_out);
    end
    if (n_read[0]) void'(q_sn.pop_front());
    if (n_read[1]) void'(q_in1.pop_front());
    if (n_write[0]) begin
      check(n_out == W'(node_n), $sformatf("node out0 %0d expected %0d", n_out, node_n));
      q_o0.push_back(n_out);
    end
    if (n_write[1]) q_o1.push_back(n_out);
    if (n_done) node_n++;
    if (k_read[0]) void'(q_o0.pop_front());
    if (k_read[1]) void'(q_o1.pop_front());
    if (k_done) begin
      if (!corrupt) check(k_idata == W'(sink_n), $sformatf("sink item %0d expected %0d", k_idata, sink_n));
      sink_n++;
    end
  end

  // Node input 1 is the feedback path: iteration n reads item n-1 there
  // (iteration 0 reads nothing), so the testbench queues 0, 1, 2, ...
  initial for (int i = 0; i < 8000; i++) q_in1.push_back(W'(i));

  task automatic measure(input string who, ref int counter, input int expect_cycles);
    int c0, t0, t1;
    c0 = counter;
    while (counter == c0) @(posedge clk);
    t0 = $time;
    c0 = counter;
    repeat (10) begin
      while (counter == c0) @(posedge clk);
      c0 = counter;
    end
    t1 = $time;
    check((t1 - t0) / 10 == expect_cycles * 10,
          $sformatf("%s: %0d ns per item, expected %0d cycles", who, (t1 - t0) / 10, expect_cycles));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run   = 1;
    // No stalls: cycles per item.
    measure("source", src_n, WORK + 1);
    measure("node",   node_n, WORK + 2);
    // Random blocking: stalls and ordering.
    pct_empty = 30; pct_full = 30;
    repeat (20000) @(posedge clk);
    check(cstall_n > 100 && pstall_n > 100,
          $sformatf("stalls seen: consumer %0d producer %0d", cstall_n, pstall_n));
    check(node_n > 100 && sink_n > 100, $sformatf("items: node %0d sink %0d", node_n, sink_n));
    check(!n_jerr && !k_jerr, "no join error in normal operation");
    // run low stops the source.
    pct_empty = 0; pct_full = 0;
    run = 0;
    repeat (50) @(posedge clk);
    begin
      int s0;
      s0 = src_n;
      repeat (200) @(posedge clk);
      check(src_n == s0, "source idle while run is low");
    end
    while (q_sn.size() != 0) @(posedge clk);
    repeat (100) @(posedge clk);
    check(sink_n == src_n, $sformatf("all items reached the sink: %0d of %0d", sink_n, src_n));
    check(!n_jerr && !k_jerr, "primed input is not compared, joins matched");
    // A wrong item at the sink join.
    corrupt = 1;
    @(negedge clk);
    q_o0.push_back(16'h1234);
    q_o1.push_back(16'h4321);
    repeat (50) @(posedge clk);
    check(k_jerr, "mismatched items at the sink join set join_err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
