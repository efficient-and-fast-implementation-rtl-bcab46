// tb_phase_unwrap: generates a true distance over the extended range M_A*du_A,
// derives the two wrapped phases (with a little noise) for the 4:3 frequency
// pair, and checks that the unwrapped result recovers the right wrap count
// and the extended phase. Latency two cycles.
module tb_phase_unwrap;
  localparam int MA = 4, MB = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [23:0] phi_a = 0, phi_b = 0;
  logic out_valid;
  logic [1:0] n_a;
  logic [25:0] ext;
  int checks = 0, failures = 0;
  phase_unwrap #(.BR(24), .M_A(MA), .M_B(MB)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      longint unsigned d, pa, pb, ena;
      longint signed noise;
      // d: distance as a fraction of the extended range, 26 bits
      // kept a little away from the ends of the range, where noise would wrap
      d = (i < 4) ? longint'(i) * (64'd1 << 24) + 64'd5000 : longint'($urandom_range(32'h3ffd000, 32'h3000));
      // phase A turns M_A times over the range, phase B M_B times
      pa = (d * MA) / 4;            // in 2^-24 turn units: d*MA/2^26*2^24
      pb = (d * MB) / 4;
      noise = longint'($urandom_range(2000)) - 1000;
      ena = pa >> 24;
      @(negedge clk);
      in_valid = 1;
      phi_a = 24'(pa);
      phi_b = 24'(longint'(pb) + noise);
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (!out_valid || n_a != 2'(ena) || ext != 26'(pa)) begin
        failures++;
        $display("d=%0d got n_a=%0d ext=%0d exp %0d %0d", d, n_a, ext, ena, pa);
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
