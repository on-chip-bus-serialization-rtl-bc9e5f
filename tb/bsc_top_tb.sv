// End-to-end testbench of bsc_top at its default parameters (16-bit bus, byte
// lanes). Three traffic sources run at once: wrapper A to wrapper B and B to A
// over the full-duplex pair, and the back-bus link. They send transactions of
// image-like words (two slowly varying 8-bit samples per word), incrementing
// addresses and random words, with random gaps, under the three coding levels
// in turn: no coding, XOR only, and all three steps. Every word must arrive
// unchanged, in order, with its first flag.
//
// The testbench also counts how often each mechanism happens and fails if one
// never does: gray code chosen and not chosen for a first word (read from the
// indicator bits on the wire), inverted words, a source stalled by ready, an
// idle link, simultaneous traffic in both directions, and a change of coding
// level. For the image-like traffic it counts data-wire transitions per level
// and requires no coding > XOR only > all three steps.
module bsc_top_tb;
  import bsc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  bsc_cfg_t    cfg;
  logic        a_tx_valid, a_tx_ready, a_tx_first, a_rx_valid, a_rx_first;
  logic [15:0] a_tx_data, a_rx_data;
  logic        b_tx_valid, b_tx_ready, b_tx_first, b_rx_valid, b_rx_first;
  logic [15:0] b_tx_data, b_rx_data;
  logic        bb_tx_valid, bb_tx_ready, bb_tx_first, bb_rx_valid, bb_rx_first;
  logic [15:0] bb_tx_data, bb_rx_data;
  bsc_ser_t    ser_ab, ser_ba, ser_bb;

  bsc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // expected words per channel: 0 = A to B, 1 = B to A, 2 = back-bus
  logic [16:0] expq[3][$];
  // mechanism counters
  int n_gray_on = 0, n_gray_off = 0, n_inverted = 0, n_stall = 0, n_idle = 0;
  int n_duplex = 0, n_mode_switch = 0, n_words = 0;
  // data-wire transitions per coding level (0 none, 1 XOR, 2 complete)
  longint tr_level[3] = '{0, 0, 0};
  int level;
  logic prev_ab, prev_ba, prev_bb;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic rx_check(int ch, logic [15:0] data, logic first);
    check(expq[ch].size() > 0, $sformatf("unexpected word on channel %0d", ch));
    if (expq[ch].size() > 0) begin
      automatic logic [16:0] e = expq[ch].pop_front();
      check({first, data} === e, $sformatf("channel %0d got %h/%0b expected %h/%0b",
            ch, data, first, e[15:0], e[16]));
      n_words++;
    end
  endtask

  // indicator bits: the two bits starting at sof
  int ind_pos[3] = '{-1, -1, -1};
  task automatic watch_ind(int ch, bsc_ser_t s);
    if (s.valid && s.sof) ind_pos[ch] = 0;
    else if (s.valid && ind_pos[ch] == 0) ind_pos[ch] = 1;
    else if (s.valid) ind_pos[ch] = -1;
    if (s.valid && ind_pos[ch] >= 0 && cfg.gray_en) begin
      if (s.data) n_gray_on++; else n_gray_off++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (b_rx_valid)  rx_check(0, b_rx_data, b_rx_first);
    if (a_rx_valid)  rx_check(1, a_rx_data, a_rx_first);
    if (bb_rx_valid) rx_check(2, bb_rx_data, bb_rx_first);
    watch_ind(0, ser_ab); watch_ind(1, ser_ba); watch_ind(2, ser_bb);
    if (a_tx_valid && !a_tx_ready) n_stall++;
    if (b_tx_valid && !b_tx_ready) n_stall++;
    if (bb_tx_valid && !bb_tx_ready) n_stall++;
    if (!ser_ab.valid && !ser_ba.valid && !ser_bb.valid) n_idle++;
    if (ser_ab.valid && ser_ba.valid) n_duplex++;
    tr_level[level] += int'(ser_ab.data != prev_ab) + int'(ser_ba.data != prev_ba)
                     + int'(ser_bb.data != prev_bb);
    prev_ab <= ser_ab.data; prev_ba <= ser_ba.data; prev_bb <= ser_bb.data;
  end

  // One source: ntr transactions of the given kind (0 image, 1 address, 2 random).
  task automatic source(int ch, int ntr, int kind);
    logic [7:0]  p0, p1;
    logic [15:0] w;
    for (int t = 0; t < ntr; t++) begin
      automatic int len = 4 + $urandom % 13;
      p0 = 8'($urandom); p1 = p0 + 8'($urandom % 5);
      w = 16'($urandom);
      for (int k = 0; k < len; k++) begin
        case (kind)
          0: begin
            p0 = p0 + 8'($urandom % 3) - 8'd1;
            p1 = p1 + 8'($urandom % 3) - 8'd1;
            w = {p1, p0};
          end
          1: w = (k == 0) ? w : w + 16'd2;
          default: w = 16'($urandom);
        endcase
        if ($urandom % 8 == 0) begin
          @(negedge clk);
          case (ch) 0: a_tx_valid = 0; 1: b_tx_valid = 0; default: bb_tx_valid = 0; endcase
          repeat ($urandom % 30) @(negedge clk);
        end
        @(negedge clk);
        expq[ch].push_back({k == 0, w});
        if (k % 2 == 1 && cfg.inv_en) n_inverted++;
        case (ch)
          0: begin a_tx_valid = 1; a_tx_data = w; a_tx_first = (k == 0); end
          1: begin b_tx_valid = 1; b_tx_data = w; b_tx_first = (k == 0); end
          default: begin bb_tx_valid = 1; bb_tx_data = w; bb_tx_first = (k == 0); end
        endcase
        @(posedge clk);
        case (ch)
          0: while (!a_tx_ready) @(posedge clk);
          1: while (!b_tx_ready) @(posedge clk);
          default: while (!bb_tx_ready) @(posedge clk);
        endcase
      end
      @(negedge clk);
      case (ch) 0: a_tx_valid = 0; 1: b_tx_valid = 0; default: bb_tx_valid = 0; endcase
    end
  endtask

  task automatic drain();
    wait (expq[0].size() == 0 && expq[1].size() == 0 && expq[2].size() == 0);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bsc_cfg_t levels[3] = '{BSC_CFG_NONE, BSC_CFG_XOR, BSC_CFG_COMPLETE};
    longint img_tr[3];
    a_tx_valid = 0; b_tx_valid = 0; bb_tx_valid = 0;
    a_tx_data = '0; b_tx_data = '0; bb_tx_data = '0;
    a_tx_first = 0; b_tx_first = 0; bb_tx_first = 0;
    prev_ab = 0; prev_ba = 0; prev_bb = 0;
    level = 0;
    cfg = BSC_CFG_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // image-like traffic on all three links, once per coding level;
    // the random generator is reseeded so every level codes the same words
    for (int l = 0; l < 3; l++) begin
      if (cfg != levels[l]) n_mode_switch++;
      cfg = levels[l];
      level = l;
      tr_level[l] = 0;
      void'($urandom(1234));
      fork
        source(0, 40, 0);
        source(1, 40, 0);
        source(2, 40, 0);
      join
      drain();
      img_tr[l] = tr_level[l];
    end
    $display("image-like traffic, data-wire transitions: none %0d, XOR %0d, complete %0d",
             img_tr[0], img_tr[1], img_tr[2]);
    check(img_tr[0] > img_tr[1], "XOR step lowers transitions");
    check(img_tr[1] > img_tr[2], "all three steps lower transitions further");

    // address-like and random traffic under every level
    for (int l = 0; l < 3; l++) begin
      if (cfg != levels[l]) n_mode_switch++;
      cfg = levels[l];
      level = l;
      fork
        source(0, 15, 1);
        source(1, 15, 2);
        source(2, 15, 1);
      join
      drain();
    end

    // latency of a lone one-word transaction on an idle link: accepted at one
    // clock edge, its 2 indicator bits and 16 data bits occupy the next 18
    // cycles, and the word is restored at the edge that takes the last bit, so
    // it is valid 18 edges after it was accepted
    begin
      int lat = 0;
      @(negedge clk);
      a_tx_valid = 1; a_tx_data = 16'h5151; a_tx_first = 1;
      expq[0].push_back({1'b1, 16'h5151});
      @(posedge clk);
      check(a_tx_ready === 1'b1, "idle link accepts at once");
      @(negedge clk);
      a_tx_valid = 0;
      while (!b_rx_valid) begin @(posedge clk); #1 lat++; end
      $display("one-word latency %0d cycles", lat);
      check(lat == 16 + 2, $sformatf("one-word latency %0d cycles", lat));
      drain();
    end

    $display("words %0d, gray on %0d, gray off %0d, inverted %0d, stalls %0d, idle %0d, duplex %0d, switches %0d",
             n_words, n_gray_on, n_gray_off, n_inverted, n_stall, n_idle, n_duplex, n_mode_switch);
    check(n_gray_on > 0, "gray code chosen");
    check(n_gray_off > 0, "gray code not chosen");
    check(n_inverted > 0, "inverted words");
    check(n_stall > 0, "source stalled");
    check(n_idle > 0, "idle link");
    check(n_duplex > 0, "both directions at once");
    check(n_mode_switch >= 3, "coding level switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
