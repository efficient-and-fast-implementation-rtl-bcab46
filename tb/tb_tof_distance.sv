// tb_tof_distance: random phases, offsets and temperature terms; checks the
// wrapped 24-bit distance fraction and the millimetre value against an
// independent computation, and the two-cycle latency.
module tb_tof_distance;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [23:0] phase = 0, d_offset = 0, d_temp = 0;
  logic [15:0] du_mm = 6250;
  logic out_valid;
  logic [23:0] pixel_data;
  logic [15:0] dist_mm;
  int checks = 0, failures = 0;
  tof_distance dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      longint unsigned e_px, e_mm;
      longint signed s;
      @(negedge clk);
      in_valid = 1;
      phase = 24'($urandom);
      d_offset = (i % 3 == 0) ? 24'(-(i * 1000)) : 24'($urandom_range(200000));
      d_temp = 24'($signed($urandom_range(2000)) - 1000);
      du_mm = (i < 150) ? 16'd6250 : 16'($urandom_range(65535));
      s = longint'(phase) + longint'($signed(d_offset)) + longint'($signed(d_temp));
      s = s % 64'sd16777216;
      if (s < 0) s += 64'sd16777216;
      e_px = longint'(s);
      e_mm = (e_px * longint'(du_mm)) / 16777216;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid) begin failures++; $display("output after one cycle"); end
      @(negedge clk);
      checks++;
      if (!out_valid || pixel_data != 24'(e_px) || dist_mm != 16'(e_mm)) begin
        failures++;
        $display("ph=%0d off=%0d got %0d/%0d exp %0d/%0d", phase, $signed(d_offset), pixel_data, dist_mm, e_px, e_mm);
      end
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
