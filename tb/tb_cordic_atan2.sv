// tb_cordic_atan2: drives random and corner (Re, Im) pairs into the CORDIC at
// one per clock and compares phase and amplitude with $atan2/$sqrt reference
// values, allowing a small tolerance. Also checks the ITER+2 cycle latency.
module tb_cordic_atan2;
  localparam int ITER = 24;
  localparam int N    = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [12:0] re = '0, im = '0;
  logic out_valid;
  logic [23:0] phase;
  logic [11:0] amp;
  int checks = 0, failures = 0;

  cordic_atan2 dut (.clk, .rst_n, .in_valid, .re, .im, .out_valid, .phase, .amp);

  logic signed [12:0] q_re [N], q_im [N];
  int sent = 0, got = 0;
  int cyc = 0, first_in = -1, first_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < N; i++) begin
      case (i)
        0: begin q_re[i] = 1000;  q_im[i] = 0;     end
        1: begin q_re[i] = 0;     q_im[i] = 1000;  end
        2: begin q_re[i] = -1000; q_im[i] = 0;     end
        3: begin q_re[i] = 0;     q_im[i] = -1000; end
        4: begin q_re[i] = -4095; q_im[i] = -4095; end
        5: begin q_re[i] = 4095;  q_im[i] = 4095;  end
        6: begin q_re[i] = -700;  q_im[i] = 5;     end
        7: begin q_re[i] = -700;  q_im[i] = -5;    end
        default: begin
          q_re[i] = 13'($signed($urandom_range(8190)) - 4095);
          q_im[i] = 13'($signed($urandom_range(8190)) - 4095);
        end
      endcase
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      in_valid <= 1; re <= q_re[i]; im <= q_im[i];
      if (i == 0) first_in = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real ref_ph, ref_amp, err;
    real r, m;
    r = real'(q_re[got]); m = real'(q_im[got]);
    if (got == 0) begin
      first_out = cyc;
      checks++;
      // sampled one edge after the output register loads
      if (first_out - first_in - 1 != ITER + 2) begin
        failures++; $display("latency %0d, expected %0d", first_out - first_in, ITER + 2);
      end
    end
    ref_ph = $atan2(m, r) / (2.0 * 3.14159265358979323846);
    if (ref_ph < 0) ref_ph += 1.0;
    ref_ph *= 16777216.0;
    err = real'(phase) - ref_ph;
    if (err > 8388608.0) err -= 16777216.0;
    if (err < -8388608.0) err += 16777216.0;
    // tolerance: a few LSB of 2^-24 turn plus input quantisation effects
    checks++;
    if (err > 600.0 || err < -600.0) begin
      failures++; $display("phase mismatch re=%0d im=%0d got=%0d ref=%0f", q_re[got], q_im[got], phase, ref_ph);
    end
    ref_amp = $sqrt(r * r + m * m) / 2.0;
    checks++;
    if (real'(amp) - ref_amp > 1.5 || ref_amp - real'(amp) > 1.5) begin
      failures++; $display("amp mismatch re=%0d im=%0d got=%0d ref=%0f", q_re[got], q_im[got], amp, ref_amp);
    end
    got++;
    if (got == N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: got %0d of %0d", got, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
