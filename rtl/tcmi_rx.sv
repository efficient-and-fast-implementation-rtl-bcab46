// tcmi_rx: receiver for the sensor's TCMI parallel pixel bus.
//
// In the DCLK domain the bus (HSYNC, VSYNC, DATA[11:0]) is registered once;
// a pixel is taken on every DCLK edge where both HSYNC and VSYNC are high,
// and the first such pixel after VSYNC rises is marked as start of frame.
// Pixel and mark cross into the system clock domain through a dual-clock
// FIFO and leave as a valid/ready stream. A pixel arriving while the FIFO is
// full is dropped and sets the sticky `overflow` flag (the system side must
// drain faster than the sensor bursts).
// Signal names follow the source; sync polarity and the FIFO are this
// design's choices.
module tcmi_rx #(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic              dclk,
  input  logic              drst_n,
  input  logic              hsync,
  input  logic              vsync,
  input  logic [DATA_W-1:0] data,
  input  logic              clk,
  input  logic              rst_n,
  output logic              px_valid,
  input  logic              px_ready,
  output logic [DATA_W-1:0] px_data,
  output logic              px_sof,
  output logic              overflow
);
  logic              hs_r, vs_r, vs_d;
  logic [DATA_W-1:0] d_r;
  logic              first;      // next valid pixel starts a frame
  logic              wfull, rempty, w_en;
  logic              ovf_d;

  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) begin
      hs_r <= 1'b0; vs_r <= 1'b0; vs_d <= 1'b0; d_r <= '0; first <= 1'b1; ovf_d <= 1'b0;
    end else begin
      hs_r <= hsync;
      vs_r <= vsync;
      d_r  <= data;
      vs_d <= vs_r;
      if (vs_r && !vs_d) first <= 1'b1;
      else if (w_en) first <= 1'b0;
      if (hs_r && vs_r && wfull) ovf_d <= 1'b1;
    end
  end

  logic sof_now;
  assign sof_now = first || (vs_r && !vs_d);
  assign w_en = hs_r && vs_r && !wfull;

  async_fifo #(.W(DATA_W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(dclk), .wrst_n(drst_n), .wr_en(w_en), .wr_data({sof_now, d_r}), .full(wfull),
    .rclk(clk), .rrst_n(rst_n), .rd_en(px_ready), .rd_data({px_sof, px_data}), .empty(rempty)
  );
  assign px_valid = !rempty;

  // The overflow flag is a level that only ever rises; two flops bring it over.
  logic ovf_s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin ovf_s1 <= 1'b0; overflow <= 1'b0; end
    else begin ovf_s1 <= ovf_d; overflow <= ovf_s1; end
  end
endmodule
