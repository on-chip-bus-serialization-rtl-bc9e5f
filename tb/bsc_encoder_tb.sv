// Testbench of bsc_encoder.
//
// Part 1, an 8-bit encoder with one lane: the worked example of the method, the
// words 51h, 52h, 53h, 54h, 55h sent as one transaction. Serialized, the five
// words must make 31 transitions without coding, 13 with the XOR step only and
// 7 with all three steps, and with all three steps the exact bit stream
// 1 (indicator), 79h, FCh, 01h, F8h, 01h.
// Part 2, the default 16-bit encoder with two byte lanes: random transactions
// of slowly changing and of random words, with random gaps and all coding
// settings, compared bit by bit with the reference model. A burst offered
// without gaps must occupy the wire for 16 cycles per word plus 2.
module bsc_encoder_tb;
  import bsc_pkg::*;
  import bsc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 8-bit instance ----------------
  bsc_cfg_t     cfg8;
  logic         v8, r8, f8;
  logic [7:0]   d8;
  bsc_ser_t     s8;
  logic         bits8[$];

  bsc_encoder #(.WORD_W(8), .CODE_W(8)) u_e8 (.clk, .rst_n, .cfg(cfg8), .in_valid(v8),
    .in_ready(r8), .in_data(d8), .in_first(f8), .ser(s8));

  always @(posedge clk) if (rst_n && s8.valid) bits8.push_back(s8.data);

  // ---------------- 16-bit instance ----------------
  bsc_cfg_t     cfg;
  logic         v16, r16, f16;
  logic [15:0]  d16;
  bsc_ser_t     s16;
  logic         exp16[$];
  int           busy16 = 0;

  bsc_encoder u_e16 (.clk, .rst_n, .cfg, .in_valid(v16), .in_ready(r16), .in_data(d16),
    .in_first(f16), .ser(s16));

  always @(posedge clk) if (rst_n && s16.valid) begin
    busy16++;
    check(exp16.size() > 0, "unexpected bit");
    if (exp16.size() > 0) check(s16.data === exp16.pop_front(), "16-bit stream");
  end

  function automatic int unsigned stream_trans(const ref logic q[$], input int unsigned from);
    int unsigned c = 0;
    for (int unsigned i = from + 1; i < q.size(); i++) if (q[i] != q[i-1]) c++;
    return c;
  endfunction

  task automatic example(bsc_cfg_t c, int unsigned exp_tr);
    logic [7:0] ex[5] = '{8'h51, 8'h52, 8'h53, 8'h54, 8'h55};
    cfg8 = c;
    bits8.delete();
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      v8 = 1'b1; d8 = ex[k]; f8 = (k == 0);
      @(posedge clk);
      while (!r8) @(posedge clk);
    end
    @(negedge clk);
    v8 = 1'b0;
    repeat (12) @(negedge clk);
    check(bits8.size() == 41, $sformatf("example length %0d", bits8.size()));
    check(stream_trans(bits8, 1) == exp_tr,
          $sformatf("example transitions %0d, expected %0d", stream_trans(bits8, 1), exp_tr));
  endtask

  task automatic send16(input word_t words[$], input bit gaps);
    enc_frame(exp16, words, cfg.xor_en, cfg.inv_en, cfg.gray_en, 16, 8);
    foreach (words[k]) begin
      if (gaps && $urandom % 3 == 0) begin
        @(negedge clk); v16 = 1'b0;
        repeat ($urandom % 25) @(negedge clk);
      end
      @(negedge clk);
      v16 = 1'b1; d16 = 16'(words[k]); f16 = (k == 0);
      @(posedge clk);
      while (!r16) @(posedge clk);
    end
    @(negedge clk);
    v16 = 1'b0;
  endtask

  initial begin
    logic fig4[$];
    word_t words[$];
    cfg8 = BSC_CFG_COMPLETE; cfg = BSC_CFG_COMPLETE;
    v8 = 0; d8 = '0; f8 = 0; v16 = 0; d16 = '0; f16 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    example(BSC_CFG_NONE, 31);
    example(BSC_CFG_XOR, 13);
    example(BSC_CFG_COMPLETE, 7);
    fig4 = {1'b1};
    push_bits(fig4, 64'h79, 8); push_bits(fig4, 64'hFC, 8); push_bits(fig4, 64'h01, 8);
    push_bits(fig4, 64'hF8, 8); push_bits(fig4, 64'h01, 8);
    check(bits8 == fig4, "example bit stream");

    // timed burst of 5 words
    words = {};
    for (int k = 0; k < 5; k++) words.push_back(64'(16'h1230 + k));
    busy16 = 0;
    send16(words, 0);
    wait (exp16.size() == 0);
    repeat (3) @(negedge clk);
    check(busy16 == 5 * 16 + 2, $sformatf("burst took %0d cycles", busy16));

    for (int t = 0; t < 300; t++) begin
      automatic int len = 1 + $urandom % 10;
      automatic word_t w = word_t'(16'($urandom));
      cfg = bsc_cfg_t'(3'($urandom));
      words = {};
      for (int k = 0; k < len; k++) begin
        if (t % 2 == 0) w = word_t'(16'($urandom));
        else w = word_t'(16'(w + 64'($urandom % 7) - 64'd3));
        words.push_back(w);
      end
      send16(words, 1);
      wait (exp16.size() == 0);
    end
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
