// tb_morph3x3: all 512 windows in every mode, against AND/OR/centre.
module tb_morph3x3;
  import tof_pkg::*;
  logic [8:0] win;
  morph_mode_e mode;
  logic out;
  int checks = 0, failures = 0;
  morph3x3 dut (.*);
  initial begin
    for (int m = 0; m < 3; m++) begin
      for (int w = 0; w < 512; w++) begin
        logic e;
        win = 9'(w);
        mode = morph_mode_e'(m);
        #1;
        e = (m == 1) ? (w == 511) : (m == 2) ? (w != 0) : win[4];
        checks++;
        if (out != e) begin failures++; $display("mode %0d win %b got %b", m, win, out); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
