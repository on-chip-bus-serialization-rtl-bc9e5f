// Testbench of bsc_xor_enc. First the worked example: words 51h..55h must come
// out as 51h, 03h, 01h, 07h, 01h. Then random words with random first, load and
// en, checked against a model that remembers the last word accepted.
module bsc_xor_enc_tb;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en, first, load;
  logic [7:0] d, q;
  logic [7:0] prev_m;
  int checks = 0, failures = 0;

  bsc_xor_enc #(.CODE_W(8)) dut (.clk, .rst_n, .en, .first, .load, .d, .q);

  always #5 clk = ~clk;

  task automatic check(logic [7:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 8) $display("FAIL d=%h first=%0b en=%0b q=%h exp=%h", d, first, en, q, exp);
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
    logic [7:0] ex_in [5] = '{8'h51, 8'h52, 8'h53, 8'h54, 8'h55};
    logic [7:0] ex_out[5] = '{8'h51, 8'h03, 8'h01, 8'h07, 8'h01};
    en = 1; first = 0; load = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      d = ex_in[k]; first = (k == 0); load = 1'b1;
      #1 check(ex_out[k]);
    end
    @(posedge clk);
    prev_m = 8'h55;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      d = 8'($urandom); first = ($urandom % 5 == 0); load = ($urandom % 4 != 0);
      en = ($urandom % 6 != 0);
      #1 check((first || !en) ? d : (d ^ prev_m));
      @(posedge clk);
      if (load) prev_m = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
