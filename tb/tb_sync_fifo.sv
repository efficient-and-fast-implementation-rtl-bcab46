// tb_sync_fifo: random pushes and pops against a queue model; checks data,
// order, empty/full and count, and fills the FIFO to full once.
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0, saw_full = 0;
  logic [31:0] q [$];
  sync_fifo #(.W(32), .DEPTH(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || int'(count) != q.size()) begin
        failures++; $display("flags: size %0d count %0d", q.size(), count);
      end
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
      end
      if (full) saw_full++;
      // fill phase, then drain phase, then random
      wr_en = (i < 40) ? !full : (i < 80) ? 1'b0 : (!full && $urandom_range(1));
      rd_en = (i < 40) ? 1'b0 : (i < 80) ? !empty : (!empty && $urandom_range(1));
      wr_data = $urandom;
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
