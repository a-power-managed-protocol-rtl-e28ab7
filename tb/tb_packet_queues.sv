// tb_packet_queues: moves a packet network layer -> DLL through the TX queue
// and a different packet DLL -> network layer through the RX queue at the
// same time, then drains the two queues separately, checking byte order,
// independence of the two queues and the fill levels. Full size (1 kB per queue): the TX packet fills its queue.
module tb_packet_queues;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       net_tx_wr = 0, net_rx_rd = 0, dll_tx_rd = 0, dll_rx_wr = 0;
  logic [7:0] net_tx_data = 0, dll_rx_data = 0;
  logic       net_tx_full, net_rx_empty, dll_tx_empty, dll_rx_full;
  logic [7:0] net_rx_data, dll_tx_data;
  logic [10:0] tx_level, rx_level;

  packet_queues dut (.clk, .rst_n, .net_tx_wr, .net_tx_data, .net_tx_full,
    .net_rx_rd, .net_rx_data, .net_rx_empty, .dll_tx_rd, .dll_tx_data,
    .dll_tx_empty, .dll_rx_wr, .dll_rx_data, .dll_rx_full, .tx_level, .rx_level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic byte unsigned txb(int i); return 8'(i * 7 + 3); endfunction
  function automatic byte unsigned rxb(int i); return 8'(i * 13 + 100); endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(dll_tx_empty && net_rx_empty && !net_tx_full && !dll_rx_full, "empty after reset");
    // Fill TX with 1024 bytes and RX with 300 bytes in parallel.
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      net_tx_wr = 1; net_tx_data = txb(i);
      dll_rx_wr = (i < 300); dll_rx_data = rxb(i);
    end
    @(negedge clk); net_tx_wr = 0; dll_rx_wr = 0;
    check(tx_level == 1024 && net_tx_full, "TX full");
    check(rx_level == 300 && !dll_rx_full, "RX level 300");
    // Drain: first 100 TX bytes alone, then all RX bytes alone, then the
    // rest of TX, so each side's reads must leave the other queue untouched.
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); dll_tx_rd = 1; net_rx_rd = 0;
      @(posedge clk); #1;
      check(dll_tx_data == txb(i), $sformatf("TX byte %0d", i));
    end
    @(negedge clk); dll_tx_rd = 0;
    check(rx_level == 300 && tx_level == 924, "RX untouched by TX reads");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); net_rx_rd = 1;
      @(posedge clk); #1;
      check(net_rx_data == rxb(i), $sformatf("RX byte %0d", i));
    end
    @(negedge clk); net_rx_rd = 0;
    check(tx_level == 924 && net_rx_empty, "TX untouched by RX reads");
    for (int i = 100; i < 1024; i++) begin
      @(negedge clk); dll_tx_rd = 1;
      @(posedge clk); #1;
      check(dll_tx_data == txb(i), $sformatf("TX byte %0d", i));
    end
    @(negedge clk); dll_tx_rd = 0; net_rx_rd = 0;
    check(dll_tx_empty && net_rx_empty, "both empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
