// Testbench of bsc_xor_dec: random transactions of original words are coded in
// the testbench (each word but the first XORed with the previous original word)
// and fed in; the block must return the original words. The worked example
// 51h, 03h, 01h, 07h, 01h must decode to 51h..55h.
module bsc_xor_dec_tb;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en, first, load;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  bsc_xor_dec #(.CODE_W(8)) dut (.clk, .rst_n, .en, .first, .load, .d, .q);

  always #5 clk = ~clk;

  task automatic check(logic [7:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 8) $display("FAIL d=%h first=%0b q=%h exp=%h", d, first, q, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ex_in [5] = '{8'h51, 8'h03, 8'h01, 8'h07, 8'h01};
    logic [7:0] ex_out[5] = '{8'h51, 8'h52, 8'h53, 8'h54, 8'h55};
    logic [7:0] w, wprev;
    en = 1; first = 0; load = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      d = ex_in[k]; first = (k == 0); load = 1'b1;
      #1 check(ex_out[k]);
    end
    for (int t = 0; t < 400; t++) begin
      automatic int len = 1 + $urandom % 8;
      en = ($urandom % 4 != 0);
      w = 8'($urandom);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        if (k > 0) w = wprev + 8'($urandom % 5) - 8'd2;
        first = (k == 0); load = 1'b1;
        d = (k == 0 || !en) ? w : (w ^ wprev);
        #1 check(w);
        wprev = w;
        // an idle cycle must not disturb the stored word
        if ($urandom % 3 == 0) begin
          @(negedge clk);
          load = 1'b0; d = 8'($urandom);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
