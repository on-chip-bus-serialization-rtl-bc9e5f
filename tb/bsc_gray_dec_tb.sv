// Testbench of bsc_gray_dec: for every 8-bit word w, the decoder must return w
// from the gray code of w when sel and first are high, and pass its input
// through unchanged otherwise.
module bsc_gray_dec_tb;
  import bsc_ref_pkg::*;
  logic       sel, first;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  bsc_gray_dec #(.CODE_W(8)) dut (.sel, .first, .d, .q);

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
        {sel, first} = 2'(m);
        d = (sel && first) ? 8'(gray(64'(v), 8)) : 8'(v);
        #1;
        checks++;
        if (q !== 8'(v)) begin
          failures++;
          if (failures < 8) $display("FAIL sel=%0b first=%0b d=%h q=%h exp=%h", sel, first, d, q, v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
