// Testbench of bsc_invert: every 8-bit word with every setting of en and odd;
// the word must be inverted exactly when both are high.
module bsc_invert_tb;
  logic       en, odd;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  bsc_invert #(.CODE_W(8)) dut (.en, .odd, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int v = 0; v < 256; v++) begin
        {en, odd} = 2'(m);
        d = 8'(v);
        #1;
        checks++;
        if (q !== ((en && odd) ? (8'hFF ^ 8'(v)) : 8'(v))) begin
          failures++;
          if (failures < 5) $display("FAIL en=%0b odd=%0b d=%h q=%h", en, odd, d, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
