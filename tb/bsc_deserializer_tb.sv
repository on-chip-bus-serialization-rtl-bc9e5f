// Testbench of bsc_deserializer at its default size (16-bit words, two lanes).
// The testbench drives framed transactions bit by bit, with idle cycles in
// random places (carrying random data that must be ignored) and stray bits
// before the first sof. Every word must come out once, in order, with the right
// first flag and the indicator bits of its transaction, one cycle after its
// last bit.
module bsc_deserializer_tb;
  import bsc_pkg::*;
  localparam int unsigned W = 16, L = 2;
  logic          clk = 1'b0, rst_n = 1'b0;
  bsc_ser_t      ser;
  logic          out_valid, out_first;
  logic [W-1:0]  out_word;
  logic [L-1:0]  out_ind;
  logic [W-1:0]  exp_word[$];
  logic          exp_first[$];
  logic [L-1:0]  exp_ind[$];
  int checks = 0, failures = 0;

  bsc_deserializer #(.WORD_W(W), .LANES(L)) dut (.clk, .rst_n, .ser, .out_valid,
    .out_word, .out_first, .out_ind);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    check(exp_word.size() > 0, "unexpected word");
    if (exp_word.size() > 0) begin
      check(out_word === exp_word.pop_front(), "word");
      check(out_first === exp_first.pop_front(), "first");
      check(out_ind === exp_ind.pop_front(), "indicator");
    end
  end

  task automatic drive_bit(logic b, logic sof, bit last);
    while ($urandom % 5 == 0) begin
      @(negedge clk);
      ser = '{valid: 1'b0, sof: 1'b0, data: 1'($urandom)};
    end
    @(negedge clk);
    ser = '{valid: 1'b1, sof: sof, data: b};
    if (last) begin
      // the word must appear exactly one cycle after its last bit
      @(negedge clk);
      ser = '{valid: 1'b0, sof: 1'b0, data: 1'($urandom)};
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency at %0t", $time); end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ser = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 7; i++) drive_bit(1'($urandom), 1'b0, 0);  // stray bits
    for (int t = 0; t < 200; t++) begin
      automatic int len = 1 + $urandom % 5;
      automatic logic [L-1:0] ind = L'($urandom);
      for (int i = L - 1; i >= 0; i--) drive_bit(ind[i], i == L - 1, 0);
      for (int k = 0; k < len; k++) begin
        automatic logic [W-1:0] w = W'($urandom);
        exp_word.push_back(w); exp_first.push_back(k == 0); exp_ind.push_back(ind);
        for (int i = W - 1; i >= 0; i--) drive_bit(w[i], 1'b0, i == 0 && ($urandom % 2 == 0));
      end
    end
    repeat (3) @(negedge clk);
    ser = '0;
    repeat (3) @(negedge clk);
    check(exp_word.size() == 0, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
