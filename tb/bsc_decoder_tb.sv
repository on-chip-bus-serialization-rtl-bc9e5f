// Testbench of bsc_decoder at its default size (16-bit words, two byte lanes).
// Transactions of slowly changing and of random words are coded by the
// reference model into serial frames and driven onto the link bit by bit with
// random idle cycles, under every coding setting. The decoder must return every
// original word, in order, with the right first flag, in the cycle after the
// word's last bit.
module bsc_decoder_tb;
  import bsc_pkg::*;
  import bsc_ref_pkg::*;
  logic         clk = 1'b0, rst_n = 1'b0;
  bsc_cfg_t     cfg;
  bsc_ser_t     ser;
  logic         out_valid, out_first;
  logic [15:0]  out_data;
  logic [15:0]  exp_word[$];
  logic         exp_first[$];
  int checks = 0, failures = 0;
  int gray_frames = 0;

  bsc_decoder dut (.clk, .rst_n, .cfg, .ser, .out_valid, .out_data, .out_first);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    check(exp_word.size() > 0, "unexpected word");
    if (exp_word.size() > 0) begin
      automatic logic [15:0] e = exp_word.pop_front();
      check(out_data === e, $sformatf("word %h expected %h", out_data, e));
      check(out_first === exp_first.pop_front(), "first");
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
    ser = '0;
    cfg = BSC_CFG_COMPLETE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      automatic word_t words[$] = {};
      automatic logic  bits[$] = {};
      automatic int    len = 1 + $urandom % 10;
      automatic word_t w = word_t'(16'($urandom));
      @(negedge clk);  // the setting changes only between transactions
      cfg = bsc_cfg_t'(3'(t < 8 ? 7 : $urandom));
      for (int k = 0; k < len; k++) begin
        if (t % 2 == 1) w = word_t'(16'($urandom));
        else w = word_t'(16'(w + 64'($urandom % 9) - 64'd4));
        words.push_back(w);
        exp_word.push_back(16'(w)); exp_first.push_back(k == 0);
      end
      enc_frame(bits, words, cfg.xor_en, cfg.inv_en, cfg.gray_en, 16, 8);
      if (bits[0] || bits[1]) gray_frames++;
      foreach (bits[i]) begin
        while ($urandom % 6 == 0) begin
          @(negedge clk);
          ser = '{valid: 1'b0, sof: 1'b0, data: ser.data};
        end
        @(negedge clk);
        ser = '{valid: 1'b1, sof: (i == 0), data: bits[i]};
        if (i == bits.size() - 1) begin
          @(negedge clk);
          ser.valid = 1'b0;
          checks++;
          if (!out_valid) begin failures++; $display("FAIL latency at %0t", $time); end
        end
      end
    end
    repeat (5) @(negedge clk);
    check(exp_word.size() == 0, "all words received");
    check(gray_frames > 0, "gray-coded first words exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
