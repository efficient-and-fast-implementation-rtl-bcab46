// roi_stats: mean and variance of the distance over a square region of
// interest (ROI) in the centre of the frame.
//
// Range precision is judged on the pixels of a small centre window, away from
// lens distortion and the image border; the same mean is what an offset
// calibration against a flat wall at a known distance needs
// (d_offset = reference - mean). The block follows the pixel stream with an
// x/y counter restarted by in_sof, accumulates the sum and the sum of squares
// of the ROI pixels and, after the last one, reports
//   mean = floor(S1 / N)          var = floor((N*S2 - S1^2) / N^2)
// with N = ROI*ROI (a power of two, so both divisions are shifts).
// Interface: the distance stream in (24-bit fraction of du); out_valid pulses
// once per frame, two cycles after the last ROI pixel, with mean and var
// (var in LSB^2). The statistic is taken on the unwrapped 24-bit values, so a
// ROI that straddles the wrap point at du gives a meaningless spread.
// The 16x16 centre ROI and the use of mean and variance follow the source; the
// exact formulas and the timing are this design's.
module roi_stats #(
  parameter int unsigned H_PIX = 320,
  parameter int unsigned V_PIX = 240,
  parameter int unsigned ROI   = 16,
  parameter int unsigned W     = 24,
  localparam int unsigned LN   = $clog2(ROI * ROI),
  localparam int unsigned XW   = $clog2(H_PIX),
  localparam int unsigned YW   = $clog2(V_PIX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic [W-1:0]     in_data,
  output logic             out_valid,
  output logic [W-1:0]     mean,
  output logic [2*W-1:0]   var_out
);
  localparam int unsigned X0 = (H_PIX - ROI) / 2;
  localparam int unsigned Y0 = (V_PIX - ROI) / 2;
  localparam int unsigned S1W = W + LN;
  localparam int unsigned S2W = 2 * W + LN;

  logic [XW-1:0]  x, xc;
  logic [YW-1:0]  y, yc;
  logic           in_roi, last;
  logic [S1W-1:0] s1, s1_f;
  logic [S2W-1:0] s2, s2_f;
  logic           done;

  // position of the current pixel (in_sof restarts at 0, 0)
  assign xc     = in_sof ? '0 : x;
  assign yc     = in_sof ? '0 : y;
  assign in_roi = (xc >= XW'(X0)) && (xc < XW'(X0 + ROI)) && (yc >= YW'(Y0)) && (yc < YW'(Y0 + ROI));
  assign last   = (xc == XW'(X0 + ROI - 1)) && (yc == YW'(Y0 + ROI - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; s1 <= '0; s2 <= '0; s1_f <= '0; s2_f <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        if (xc == XW'(H_PIX - 1)) begin
          x <= '0;
          y <= (yc == YW'(V_PIX - 1)) ? '0 : yc + 1'b1;
        end else begin
          x <= xc + 1'b1;
          y <= yc;
        end
        if (in_roi) begin
          if (last) begin
            s1_f <= s1 + S1W'(in_data);
            s2_f <= s2 + S2W'(in_data) * S2W'(in_data);
            s1   <= '0;
            s2   <= '0;
            done <= 1'b1;
          end else begin
            s1 <= s1 + S1W'(in_data);
            s2 <= s2 + S2W'(in_data) * S2W'(in_data);
          end
        end
      end
    end
  end

  // N*S2 >= S1^2 always (Cauchy-Schwarz), so the difference is not negative
  logic [S2W+LN-1:0] spread;
  assign spread = ((S2W + LN)'(s2_f) << LN) - (S2W + LN)'(s1_f) * (S2W + LN)'(s1_f);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; mean <= '0; var_out <= '0;
    end else begin
      out_valid <= done;
      if (done) begin
        mean    <= W'(s1_f >> LN);
        var_out <= (2 * W)'(spread >> (2 * LN));
      end
    end
  end

  // ROI must fit in the frame and hold a power-of-two number of pixels
  initial begin
    assert (ROI <= H_PIX && ROI <= V_PIX && (1 << LN) == ROI * ROI)
      else $error("roi_stats: ROI %0d does not fit or is not a power of two", ROI);
  end
endmodule
