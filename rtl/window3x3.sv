// window3x3: streaming 3x3 neighbourhood generator with row buffering.
//
// Two row buffers hold the previous two image rows, so each pixel is read
// from the stream once and the 3x3 window is rebuilt from the buffers and a
// 3-column shift register as the stream advances, one pixel per clock.
// For the input pixel at (x, y) the window holds rows y-2..y and columns
// x-2..x, i.e. it is centred on (x-1, y-1); win_ok is low while that window
// would reach outside the image (x < 2 or y < 2), so downstream filters can
// mark the border. win[0] is the top-left (oldest) pixel, win[8] the newest.
// in_sof restarts the row and column counters.
// Timing: the window for an input pixel is registered one cycle later.
// Row buffering follows the source; the border treatment is this design's.
module window3x3 #(
  parameter int unsigned W     = 24,
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic [W-1:0]       in_data,
  output logic               out_valid,
  output logic               out_sof,
  output logic               out_eof,
  output logic               win_ok,
  output logic [8:0][W-1:0]  win
);
  localparam int unsigned XW = $clog2(IMG_W + 1);
  localparam int unsigned YW = $clog2(IMG_H + 1);

  logic [W-1:0] row1 [IMG_W];    // row y-1
  logic [W-1:0] row2 [IMG_W];    // row y-2
  logic [XW-1:0] x, xc;
  logic [YW-1:0] y, yc;
  logic [2:0][W-1:0] col0, col1, col2;   // columns x-2, x-1, x ; [0]=row y-2

  // Current position: a start-of-frame pixel is (0,0).
  always_comb begin
    xc = in_sof ? '0 : x;
    yc = in_sof ? '0 : y;
  end

  logic [W-1:0] r1, r2;
  always_comb begin
    r1 = row1[xc];
    r2 = row2[xc];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      row1[xc] <= in_data;
      row2[xc] <= r1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      col0 <= '0; col1 <= '0; col2 <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eof <= 1'b0; win_ok <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        col0 <= col1;
        col1 <= col2;
        col2 <= {in_data, r1, r2};
        out_sof <= in_sof;
        out_eof <= (xc == XW'(IMG_W - 1)) && (yc == YW'(IMG_H - 1));
        win_ok  <= (xc >= XW'(2)) && (yc >= YW'(2));
        if (xc == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= (yc == YW'(IMG_H - 1)) ? '0 : yc + 1'b1;
        end else begin
          x <= xc + 1'b1;
          y <= yc;
        end
      end
    end
  end

  always_comb begin
    // col2 is loaded with the new pixel in the same edge as out_valid, so
    // the registered window is {col0, col1, col2}.
    win = {col2[2], col1[2], col0[2],
           col2[1], col1[1], col0[1],
           col2[0], col1[0], col0[0]};
  end
endmodule
