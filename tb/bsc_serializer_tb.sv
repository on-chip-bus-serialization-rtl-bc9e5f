// Testbench of bsc_serializer at its default size (16-bit words, two lanes).
// Random transactions are offered with random gaps; every bit on the wire is
// compared with the expected frame (indicator bits, then each word MSB first),
// sof must mark exactly the first indicator bit of each transaction, the wire
// must hold its value while idle, and a burst offered without gaps must take
// exactly 16 cycles per word plus 2 for the indicator bits.
module bsc_serializer_tb;
  import bsc_pkg::*;
  localparam int unsigned W = 16, L = 2;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid, in_ready, in_first;
  logic [W-1:0]  in_word;
  logic [L-1:0]  in_ind;
  bsc_ser_t      ser;
  logic          exp_bits[$];
  logic          exp_sof[$];
  logic          last_bit;
  int checks = 0, failures = 0;
  int busy_cycles, span_cycles, gaps_seen = 0;

  bsc_serializer #(.WORD_W(W), .LANES(L)) dut (.clk, .rst_n, .in_valid, .in_ready,
    .in_word, .in_first, .in_ind, .ser);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (exp_bits.size() > 0) span_cycles++;
    if (ser.valid) begin
      check(exp_bits.size() > 0, "unexpected bit");
      if (exp_bits.size() > 0) begin
        check(ser.data === exp_bits.pop_front(), "data bit");
        check(ser.sof === exp_sof.pop_front(), "sof");
      end
      last_bit = ser.data;
      busy_cycles++;
    end else begin
      check(ser.data === last_bit, "idle hold");
      check(ser.sof === 1'b0, "idle sof");
    end
  end

  task automatic send(logic [W-1:0] w, logic f, logic [L-1:0] ind, bit gap);
    if (gap) begin
      in_valid = 1'b0;
      repeat (1 + $urandom % 20) @(negedge clk);
      gaps_seen++;
    end
    in_valid = 1'b1; in_word = w; in_first = f; in_ind = ind;
    if (f) for (int i = L - 1; i >= 0; i--) begin exp_bits.push_back(ind[i]); exp_sof.push_back(i == L - 1); end
    for (int i = W - 1; i >= 0; i--) begin exp_bits.push_back(w[i]); exp_sof.push_back(1'b0); end
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_word = '0; in_first = 0; in_ind = '0; last_bit = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // timed burst: 4 words offered back to back
    busy_cycles = 0;
    span_cycles = 0;
    for (int k = 0; k < 4; k++) begin
      in_valid = 1'b1; in_word = W'($urandom); in_first = (k == 0); in_ind = L'($urandom);
      if (k == 0) for (int i = L - 1; i >= 0; i--) begin exp_bits.push_back(in_ind[i]); exp_sof.push_back(i == L - 1); end
      for (int i = W - 1; i >= 0; i--) begin exp_bits.push_back(in_word[i]); exp_sof.push_back(1'b0); end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    wait (exp_bits.size() == 0);
    @(negedge clk); @(negedge clk);
    check(busy_cycles == 4 * W + L, $sformatf("burst sent %0d bits", busy_cycles));
    check(span_cycles == 4 * W + L + 1, $sformatf("burst took %0d cycles", span_cycles));
    // random traffic
    for (int t = 0; t < 300; t++) begin
      automatic int len = 1 + $urandom % 6;
      for (int k = 0; k < len; k++)
        send(W'($urandom), k == 0, L'($urandom), $urandom % 3 == 0);
    end
    wait (exp_bits.size() == 0);
    repeat (3) @(negedge clk);
    check(gaps_seen > 0, "gaps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
