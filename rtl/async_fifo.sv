// async_fifo: dual-clock FIFO with Gray-coded pointers synchronised through
// two flip-flops each way. Show-ahead read in the read domain. Full is
// computed in the write domain and empty in the read domain, both
// conservative. Depth must be a power of two.
module async_fifo #(
  parameter int unsigned W     = 13,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          empty
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_n = wbin + (AW + 1)'(wr_en && !full);
  assign rbin_n = rbin + (AW + 1)'(rd_en && !empty);
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty  = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n;
      wgray <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n;
      rgray <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
