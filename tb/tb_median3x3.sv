// tb_median3x3: random windows (with many ties) against the middle element
// of a sorted copy.
module tb_median3x3;
  logic [8:0][23:0] win;
  logic [23:0] med;
  int checks = 0, failures = 0;
  median3x3 #(.W(24)) dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int v [9];
      for (int i = 0; i < 9; i++) begin
        v[i] = (t % 2) ? int'($urandom_range(5)) : int'($urandom_range(24'hffffff));
        win[i] = 24'(v[i]);
      end
      v.sort();
      #1;
      checks++;
      if (med != 24'(v[4])) begin failures++; $display("got %0d exp %0d", med, v[4]); end
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
