// tb_tcmi_rx: drives the TCMI bus at one clock rate with line and frame
// blanking, reads the system side at another with random back-pressure, and
// checks every pixel, its start-of-frame mark and that nothing overflowed.
module tb_tcmi_rx;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 10, H = 4, FRAMES = 3;
  logic dclk = 0, clk = 0, drst_n = 0, rst_n = 0;
  always #12.5 dclk = ~dclk;
  always #3.1 clk = ~clk;
  logic hsync = 0, vsync = 0;
  logic [11:0] data = 0;
  logic px_valid, px_ready = 0, px_sof, overflow;
  logic [11:0] px_data;
  int checks = 0, failures = 0, got = 0;
  logic [11:0] exp_q [$];
  logic        sof_q [$];
  tcmi_rx dut (.*);

  initial begin
    #40 drst_n = 1; rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      @(negedge dclk); vsync = 1;
      repeat (3) @(negedge dclk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge dclk);
          hsync = 1; data = 12'($urandom);
          exp_q.push_back(data); sof_q.push_back(x == 0 && y == 0);
        end
        @(negedge dclk); hsync = 0;
        repeat (4) @(negedge dclk);
      end
      vsync = 0;
      repeat (10) @(negedge dclk);
    end
  end

  always @(posedge clk) begin
    px_ready <= $urandom_range(1);
    if (rst_n && px_valid && px_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected pixel"); end
      else begin
        if (px_data != exp_q[0] || px_sof != sof_q[0]) begin
          failures++; $display("pixel %0d got %h/%b exp %h/%b", got, px_data, px_sof, exp_q[0], sof_q[0]);
        end
        void'(exp_q.pop_front()); void'(sof_q.pop_front());
      end
      got++;
      if (got == W * H * FRAMES) begin
        checks++;
        if (overflow) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
  initial begin
    #200000;
    failures++;
    $display("watchdog, got %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
