// point_cloud: converts each pixel's distance into a 3-D point.
//
// Every pixel has a unit direction vector (its viewing ray through the
// lens), stored as three signed Q1.15 components in an on-chip RAM of
// NPIX entries that the configuration processor loads through the
// vec_we/vec_addr/vec_data port. As the distance stream passes, a pixel
// counter (restarted by in_sof) reads the pixel's vector and the point is
// (x, y, z) = dist_mm * (vx, vy, vz), in mm, signed.
// Timing: vector read and multiply in one stage, output register in the
// next: two cycles, one pixel per clock.
// The per-pixel product d*vector follows the source; the vector format, the
// RAM and its load port are choices of this design (the lens calibration
// that yields the vectors is not part of it).
module point_cloud #(
  parameter int unsigned NPIX = 76800,
  parameter int unsigned D_W  = 16,
  localparam int unsigned AW  = $clog2(NPIX)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // vector RAM load
  input  logic                   vec_we,
  input  logic [AW-1:0]          vec_addr,
  input  logic [2:0][15:0]       vec_data,     // {vz, vy, vx}, Q1.15
  // distance stream
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic [D_W-1:0]         dist_mm,
  // points
  output logic                   out_valid,
  output logic signed [D_W:0]    px,
  output logic signed [D_W:0]    py,
  output logic signed [D_W:0]    pz
);
  logic [2:0][15:0] vram [NPIX];
  logic [AW-1:0]    cnt, idx;
  logic [2:0][15:0] vec;
  logic             v1;
  logic [D_W-1:0]   d1;

  assign idx = in_sof ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (vec_we) vram[vec_addr] <= vec_data;
    if (in_valid) vec <= vram[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; v1 <= 1'b0; d1 <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        d1  <= dist_mm;
        cnt <= (idx == AW'(NPIX - 1)) ? '0 : idx + 1'b1;
      end
    end
  end

  function automatic logic signed [D_W:0] scale(logic [D_W-1:0] d, logic [15:0] c);
    logic signed [D_W+16:0] p, a, b;
    a = $signed((D_W + 17)'(d));                 // zero-extended distance
    b = (D_W + 17)'($signed(c));                 // sign-extended component
    p = a * b;
    return (D_W + 1)'(p >>> 15);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; px <= '0; py <= '0; pz <= '0;
    end else begin
      out_valid <= v1;
      px <= scale(d1, vec[0]);
      py <= scale(d1, vec[1]);
      pz <= scale(d1, vec[2]);
    end
  end
endmodule
