// Testbench of bsc_wrapper: the wrapper's serial output is looped back to its
// serial input, so its encoder talks to its own decoder. Random transactions of
// slowly changing and of random words, offered with random gaps under every
// coding setting, must come back unchanged and in order, with the first flag of
// each transaction.
module bsc_wrapper_tb;
  import bsc_pkg::*;
  logic         clk = 1'b0, rst_n = 1'b0;
  bsc_cfg_t     cfg;
  logic         tx_valid, tx_ready, tx_first, rx_valid, rx_first;
  logic [15:0]  tx_data, rx_data;
  bsc_ser_t     ser;
  logic [15:0]  exp_word[$];
  logic         exp_first[$];
  int checks = 0, failures = 0;

  bsc_wrapper dut (.clk, .rst_n, .cfg, .tx_valid, .tx_ready, .tx_data, .tx_first,
    .ser_tx(ser), .ser_rx(ser), .rx_valid, .rx_data, .rx_first);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && rx_valid) begin
    check(exp_word.size() > 0, "unexpected word");
    if (exp_word.size() > 0) begin
      check(rx_data === exp_word.pop_front(), "word");
      check(rx_first === exp_first.pop_front(), "first");
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_valid = 0; tx_data = '0; tx_first = 0;
    cfg = BSC_CFG_COMPLETE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      automatic int len = 1 + $urandom % 10;
      automatic logic [15:0] w = 16'($urandom);
      // the coding setting may change only while the link is idle
      wait (exp_word.size() == 0);
      @(negedge clk);
      cfg = bsc_cfg_t'(3'($urandom));
      for (int k = 0; k < len; k++) begin
        w = (t % 2 == 1) ? 16'($urandom) : 16'(w + 16'($urandom % 5) - 16'd2);
        if ($urandom % 4 == 0) begin
          tx_valid = 1'b0;
          repeat ($urandom % 20) @(negedge clk);
        end
        tx_valid = 1'b1; tx_data = w; tx_first = (k == 0);
        exp_word.push_back(w); exp_first.push_back(k == 0);
        @(posedge clk);
        while (!tx_ready) @(posedge clk);
        @(negedge clk);
        tx_valid = 1'b0;
      end
    end
    wait (exp_word.size() == 0);
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
