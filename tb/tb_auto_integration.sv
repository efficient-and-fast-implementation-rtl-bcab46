// tb_auto_integration: frames of constant amplitude (over-exposed, good,
// weak, very weak) with a small NPIX; checks the verdict, the proportional
// new time t*650/mean with clamping, that a good frame changes nothing, and
// the time from the last pixel to t_update.
module tb_auto_integration;
  import tof_pkg::*;
  localparam int NPIX = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic auto_en = 1, amp_valid = 0, amp_eof = 0;
  logic [11:0] amp = 0;
  logic [15:0] t_int, n_adjust;
  logic t_update;
  expo_e status;
  int checks = 0, failures = 0;
  auto_integration #(.NPIX(NPIX)) dut (.*);

  task automatic frame(input int level, input expo_e exp_st, input bit changes);
    longint exp_t;
    int t0, lat;
    t0 = int'(t_int);
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      amp_valid = 1; amp = 12'(level + ((i % 2) ? 3 : -3)); amp_eof = (i == NPIX - 1);
    end
    @(negedge clk);
    amp_valid = 0; amp_eof = 0;
    exp_t = (longint'(t0) * 650 * NPIX) / (longint'(level) * NPIX);
    if (exp_t < 800) exp_t = 800;
    if (exp_t > 4000) exp_t = 4000;
    lat = 1;
    while (!t_update && lat < 80) begin @(negedge clk); lat++; end
    checks++;
    if (status != exp_st) begin failures++; $display("status %0d exp %0d", status, exp_st); end
    checks++;
    if (changes) begin
      if (!t_update || int'(t_int) != int'(exp_t) || lat != 50) begin
        failures++; $display("t_int %0d exp %0d lat %0d", t_int, exp_t, lat);
      end
    end else if (t_update || int'(t_int) != t0) begin
      failures++; $display("unexpected change");
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (t_int != 2400) failures++;
    frame(1500, EXPO_OVER, 1);      // 2400*650/1500 = 1040
    frame(700,  EXPO_GOOD, 0);
    frame(60,   EXPO_WEAK, 1);      // 1040*650/60 -> clamped to 4000
    frame(1300, EXPO_OVER, 1);      // 4000*650/1300 = 2000
    frame(3000, EXPO_OVER, 1);      // 2000*650/3000 = 433 -> clamped to 800
    frame(90,   EXPO_WEAK, 1);      // 800*650/90 = 5777 -> 4000
    auto_en = 0;
    frame(2000, EXPO_OVER, 0);
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
