// temp_comp: temperature compensation term of the distance.
//
// The sensor has four temperature sensors, one per corner. Their mean is
// compared with the temperature at calibration and the difference, scaled
// by a signed coefficient, is the distance correction in du/2^24 units:
//   d_temp = (k_temp * (mean(T0..T3) - t_ref)) >>> 8
// The use of the four sensors follows the source; the linear model and
// the 8-bit fractional coefficient are choices of this design.
// Timing: the output register loads one cycle after `update`.
module temp_comp #(
  parameter int unsigned T_W     = 16,
  parameter int unsigned PHASE_W = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  update,
  input  logic [3:0][T_W-1:0]   temp,     // signed readings
  input  logic [T_W-1:0]        t_ref,    // signed
  input  logic [T_W-1:0]        k_temp,   // signed, 8 fractional bits
  output logic [PHASE_W-1:0]    d_temp    // signed
);
  logic signed [T_W+1:0]     sum;
  logic signed [T_W+1:0]     delta;
  logic signed [2*T_W+3:0]   prod;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++) sum += (T_W + 2)'(signed'(temp[i]));
    delta = (sum >>> 2) - (T_W + 2)'(signed'(t_ref));
    prod  = (2*T_W + 4)'(delta) * (2*T_W + 4)'(signed'(k_temp));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_temp <= '0;
    else if (update) d_temp <= PHASE_W'(prod >>> 8);
  end
endmodule
