// tb_temp_comp: random sensor temperatures, reference and coefficient;
// checks d_temp = (k*(mean - t_ref)) >>> 8 and that it only changes on update.
module tb_temp_comp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic update = 0;
  logic [3:0][15:0] temp = '0;
  logic [15:0] t_ref = 0, k_temp = 0;
  logic [23:0] d_temp;
  int checks = 0, failures = 0;
  temp_comp dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      longint signed sum, e;
      logic [23:0] prev;
      @(negedge clk);
      sum = 0;
      for (int k = 0; k < 4; k++) begin
        temp[k] = 16'($signed($urandom_range(4000)) - 2000);
        sum += longint'($signed(temp[k]));
      end
      t_ref = 16'($signed($urandom_range(400)) - 200);
      k_temp = 16'($signed($urandom_range(20000)) - 10000);
      // floor division of the sum by 4, as an arithmetic shift does
      e = ((sum >>> 2) - longint'($signed(t_ref))) * longint'($signed(k_temp));
      e = e >>> 8;
      prev = d_temp;
      @(negedge clk);
      checks++;
      if (d_temp != prev) begin failures++; $display("changed without update"); end
      update = 1;
      @(negedge clk);
      update = 0;
      checks++;
      if (d_temp != 24'(e)) begin failures++; $display("got %0d exp %0d", $signed(d_temp), e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
