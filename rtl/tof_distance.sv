// tof_distance: turns a pixel phase into its distance.
//
// The phase arrives as an unsigned fraction of a turn (phase/2pi * 2^24).
// Because the unambiguous range du corresponds to one full turn, the
// distance in units of du/2^24 equals the phase; the calibration offset and
// the temperature term are added in the same units, and the wrap
// d - floor(d/du)*du of the method is the natural overflow of the 24-bit sum.
// The result leaves both as that 24-bit fraction (the "pixel data" used for
// display, d/du*2^24) and in millimetres, dist_mm = pixel_data*du_mm >> 24.
//
// Timing: two register stages, one pixel per clock. The offset/temperature
// addition and the wrap follow the source method; the units of d_offset and
// d_temp and the millimetre output are choices of this design.
module tof_distance #(
  parameter int unsigned PHASE_W = 24,
  parameter int unsigned DU_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [PHASE_W-1:0]  phase,
  input  logic [PHASE_W-1:0]  d_offset,   // two's complement, du/2^PHASE_W units
  input  logic [PHASE_W-1:0]  d_temp,     // two's complement, same units
  input  logic [DU_W-1:0]     du_mm,
  output logic                out_valid,
  output logic [PHASE_W-1:0]  pixel_data,
  output logic [DU_W-1:0]     dist_mm
);
  logic               v1;
  logic [PHASE_W-1:0] d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      d1 <= '0;
      out_valid  <= 1'b0;
      pixel_data <= '0;
      dist_mm    <= '0;
    end else begin
      v1 <= in_valid;
      d1 <= phase + d_offset + d_temp;       // wraps modulo one turn
      out_valid  <= v1;
      pixel_data <= d1;
      dist_mm    <= DU_W'(((PHASE_W + DU_W)'(d1) * (PHASE_W + DU_W)'(du_mm)) >> PHASE_W);
    end
  end
endmodule
