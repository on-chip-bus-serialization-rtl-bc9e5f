// Workload testbench: transition counts of three kinds of bus traffic through
// bsc_top at its default parameters, in the style of the per-module comparison
// the coding method is evaluated with. Each kind is sent from wrapper A to
// wrapper B once per coding level (no coding, XOR only, all three steps), and
// the data-wire transitions are compared with those of a 16-bit parallel bus
// carrying the same words (the Hamming distance between consecutive words).
//   image    - raw pixels of a smooth synthetic picture with a little noise, two
//              8-bit samples per word, one 16-pixel macroblock row per transaction
//              (like the traffic of the video input and output modules);
//   address  - addresses A, A+1, A+2, ... (like the address bus);
//   entropy  - random words (like entropy-coded streams).
// Checks: every word arrives intact; for image and address traffic serializing
// without coding costs more than the parallel bus and each coding step lowers
// the count (complete < XOR < none); coding helps image traffic relatively more
// than entropy-coded traffic, where correlation is absent and no ordering is
// expected. The relative counts are printed.
module bsc_traffic_tb;
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
  logic [15:0] expq[$];
  longint serial_tr;
  logic prev_bit;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (b_rx_valid) begin
      check(expq.size() > 0 && b_rx_data === expq[0], "word intact");
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (ser_ab.data != prev_bit) serial_tr++;
    prev_bit <= ser_ab.data;
  end

  function automatic logic [7:0] pixel(int x, int y, int frame);
    int v = 60 + (x * 3 + y * 2 + frame) / 2 + int'($urandom % 3);
    return 8'(v);
  endfunction

  // Builds the words of one kind; returns the parallel-bus transition count.
  function automatic longint make_words(int kind, ref logic [15:0] w[$], ref logic f[$]);
    longint ptr = 0;
    logic [15:0] last = '0;
    void'($urandom(777 + kind));
    w = {}; f = {};
    for (int t = 0; t < 120; t++) begin
      logic [15:0] base = 16'($urandom);
      for (int k = 0; k < 8; k++) begin
        logic [15:0] v;
        case (kind)
          0: v = {pixel(2 * k + 1, t % 16, t / 16), pixel(2 * k, t % 16, t / 16)};
          1: v = base + 16'(k);
          default: v = 16'($urandom);
        endcase
        w.push_back(v); f.push_back(k == 0);
        ptr += $countones(v ^ last);
        last = v;
      end
    end
    return ptr;
  endfunction

  task automatic run(const ref logic [15:0] w[$], const ref logic f[$]);
    foreach (w[i]) begin
      @(negedge clk);
      a_tx_valid = 1'b1; a_tx_data = w[i]; a_tx_first = f[i];
      expq.push_back(w[i]);
      @(posedge clk);
      while (!a_tx_ready) @(posedge clk);
    end
    @(negedge clk);
    a_tx_valid = 1'b0;
    wait (expq.size() == 0);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bsc_cfg_t levels[3] = '{BSC_CFG_NONE, BSC_CFG_XOR, BSC_CFG_COMPLETE};
    string    names[3] = '{"image", "address", "entropy"};
    real      rel[3][3];
    logic [15:0] words[$];
    logic        firsts[$];
    a_tx_valid = 0; b_tx_valid = 0; bb_tx_valid = 0;
    a_tx_data = '0; b_tx_data = '0; bb_tx_data = '0;
    a_tx_first = 0; b_tx_first = 0; bb_tx_first = 0;
    prev_bit = 1'b0;
    cfg = BSC_CFG_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int kind = 0; kind < 3; kind++) begin
      longint par;
      longint ser_tr[3];
      par = make_words(kind, words, firsts);
      for (int l = 0; l < 3; l++) begin
        cfg = levels[l];
        serial_tr = 0;
        run(words, firsts);
        ser_tr[l] = serial_tr;
        rel[kind][l] = real'(serial_tr) / real'(par);
      end
      $display("%-8s parallel %0d, serial: none %0d (%.2f), XOR %0d (%.2f), complete %0d (%.2f)",
               names[kind], par, ser_tr[0], rel[kind][0], ser_tr[1], rel[kind][1],
               ser_tr[2], rel[kind][2]);
      if (kind < 2) begin
        check(ser_tr[0] > par, {names[kind], ": serializing costs more than the parallel bus"});
        check(ser_tr[2] < ser_tr[1] && ser_tr[1] < ser_tr[0], {names[kind], ": each step helps"});
      end
    end
    check(rel[0][2] / rel[0][0] < rel[2][2] / rel[2][0], "image gains more than entropy-coded data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
