// cordic_atan2: pipelined vectoring-mode CORDIC that turns the two DCS
// differences of a pixel into its phase and amplitude.
//
// Inputs are Re = DCS3-DCS1 and Im = DCS2-DCS0 (signed). The first stage
// folds the left half-plane onto the right one (rotation by pi), then ITER
// stages each rotate the vector by +-atan(2^-k) with a shift and an add,
// driving y towards zero while the accumulated angle builds up in z. The
// phase leaves as an unsigned fraction of a full turn, phase/2pi*2^PHASE_W,
// so a negative atan2 result is already wrapped into [0, 2pi). The final x is
// sqrt(Re^2+Im^2) times the CORDIC gain K; the output stage multiplies by
// 1/(2K) to give the amplitude sqrt(Re^2+Im^2)/2.
//
// Timing: one pixel per clock, result ITER+2 cycles after the input.
// The shift-add rotation, the 24-bit phase and the atan2/amplitude equations
// follow the source method; the pipelining, the guard bits (FRAC, two extra
// angle bits) and the iteration count are choices of this design.
module cordic_atan2 #(
  parameter int unsigned IN_W    = 13,
  parameter int unsigned PHASE_W = 24,
  parameter int unsigned AMP_W   = 12,
  parameter int unsigned ITER    = 24,
  parameter int unsigned FRAC    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   re,
  input  logic signed [IN_W-1:0]   im,
  output logic                     out_valid,
  output logic [PHASE_W-1:0]       phase,
  output logic [AMP_W-1:0]         amp
);
  localparam int unsigned XW = IN_W + 2 + FRAC;   // room for gain 1.65 and sign
  localparam int unsigned ZW = PHASE_W + 2;       // two guard bits on the angle
  localparam int unsigned KW = 18;                // gain-correction constant bits

  // atan(2^-k) as a fraction of a turn, scaled to 2^ZW.
  function automatic logic [ZW-1:0] atan_turn(int k);
    real a;
    a = $atan(2.0 ** (-k)) / (2.0 * 3.14159265358979323846) * (2.0 ** ZW);
    return ZW'(longint'(a + 0.5));
  endfunction

  // 1/(2K), K = prod sqrt(1+2^-2k), scaled to 2^KW.
  function automatic logic [KW-1:0] inv_2k();
    real g;
    g = 1.0;
    for (int k = 0; k < int'(ITER); k++) g = g * $sqrt(1.0 + 2.0 ** (-2 * k));
    return KW'(longint'((2.0 ** KW) / (2.0 * g) + 0.5));
  endfunction

  localparam logic [KW-1:0] INV2K = inv_2k();

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic        [ZW-1:0] z [ITER+1];
  logic                 v [ITER+1];

  // Stage 0: quadrant fold. A vector with Re<0 is rotated by pi.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      x[0] <= '0;
      y[0] <= '0;
      z[0] <= '0;
    end else begin
      v[0] <= in_valid;
      if (re < 0) begin
        x[0] <= -(XW'(re) <<< FRAC);
        y[0] <= -(XW'(im) <<< FRAC);
        z[0] <= ZW'(1) << (ZW - 1);          // half a turn
      end else begin
        x[0] <= XW'(re) <<< FRAC;
        y[0] <= XW'(im) <<< FRAC;
        z[0] <= '0;
      end
    end
  end

  // Micro-rotation stages, eq. x' = x - d*y*2^-k, y' = y + d*x*2^-k.
  for (genvar k = 0; k < ITER; k++) begin : g_stage
    localparam logic [ZW-1:0] ANG = atan_turn(k);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[k+1] <= 1'b0;
        x[k+1] <= '0;
        y[k+1] <= '0;
        z[k+1] <= '0;
      end else begin
        v[k+1] <= v[k];
        if (y[k] < 0) begin                   // rotate anti-clockwise
          x[k+1] <= x[k] - (y[k] >>> k);
          y[k+1] <= y[k] + (x[k] >>> k);
          z[k+1] <= z[k] - ANG;
        end else begin                        // rotate clockwise
          x[k+1] <= x[k] + (y[k] >>> k);
          y[k+1] <= y[k] - (x[k] >>> k);
          z[k+1] <= z[k] + ANG;
        end
      end
    end
  end

  // Output stage: round the angle to PHASE_W bits, correct the gain.
  logic [XW+KW-1:0] mag_full;
  logic [XW+KW-1:0] amp_wide;
  always_comb begin
    mag_full = (XW + KW)'(unsigned'(x[ITER])) * (XW + KW)'(INV2K);
    amp_wide = (mag_full + ((XW + KW)'(1) << (FRAC + KW - 1))) >> (FRAC + KW);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase     <= '0;
      amp       <= '0;
    end else begin
      out_valid <= v[ITER];
      phase     <= PHASE_W'((z[ITER] + ZW'(2)) >> 2);
      amp       <= (amp_wide > (XW + KW)'({AMP_W{1'b1}})) ? {AMP_W{1'b1}} : AMP_W'(amp_wide);
    end
  end
endmodule
