// Testbench of bsc_gray_enc: every 8-bit word. The gray code must be chosen for
// the first word exactly when it has fewer adjacent-bit transitions than the
// word itself, the output must make the smaller of the two counts (never more
// than 5 for 8 bits), and the worked example 51h must give 79h (5 transitions
// down to 3).
module bsc_gray_enc_tb;
  import bsc_ref_pkg::*;
  logic       en, first, sel;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  int chosen = 0;

  bsc_gray_enc #(.CODE_W(8)) dut (.en, .first, .d, .q, .sel);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s en=%0b first=%0b d=%h q=%h sel=%0b", what, en, first, d, q, sel);
    end
  endtask

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
        logic exp_sel;
        {en, first} = 2'(m);
        d = 8'(v);
        #1;
        exp_sel = en && first && (trans(gray(64'(v), 8), 8) < trans(64'(v), 8));
        check(sel === exp_sel, "sel");
        check(q === (exp_sel ? 8'(gray(64'(v), 8)) : 8'(v)), "q");
        if (en && first) begin
          // the word sent never has more transitions than either candidate;
          // over all 8-bit words the worst case is 5 (for example 49h)
          check(trans(64'(q), 8) == ((trans(gray(64'(v), 8), 8) < trans(64'(v), 8)) ?
                trans(gray(64'(v), 8), 8) : trans(64'(v), 8)), "minimum");
          check(trans(64'(q), 8) <= 5, "bound");
        end
        if (sel) chosen++;
      end
    en = 1; first = 1; d = 8'h51;
    #1;
    check(q === 8'h79 && sel === 1'b1, "example 51h");
    check(trans(64'(q), 8) == 3, "example count");
    check(chosen > 0 && chosen < 256, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
