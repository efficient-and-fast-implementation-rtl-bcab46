// tb_window3x3: streams two small random frames with random gaps and checks
// every registered window against a copy of the image: contents when the
// window lies inside the image, win_ok, and the end-of-frame mark.
module tb_window3x3;
  localparam int IW = 8, IH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_sof, out_eof, win_ok;
  logic [8:0][7:0] win;
  int checks = 0, failures = 0;
  window3x3 #(.W(8), .IMG_W(IW), .IMG_H(IH)) dut (.*);

  logic [7:0] img [IH][IW];
  int ox = 0, oy = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic ok_exp;
    ok_exp = (ox >= 2) && (oy >= 2);
    checks++;
    if (win_ok != ok_exp || out_eof != (ox == IW-1 && oy == IH-1) || out_sof != (ox == 0 && oy == 0)) begin
      failures++; $display("flags at %0d,%0d", ox, oy);
    end
    if (ok_exp) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (win[r*3+c] != img[oy-2+r][ox-2+c]) begin
            failures++; $display("win at %0d,%0d [%0d][%0d]", ox, oy, r, c);
          end
        end
    end
    if (ox == IW-1) begin ox = 0; oy = (oy == IH-1) ? 0 : oy + 1; end else ox++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) begin
          while ($urandom_range(3) == 0) begin
            @(negedge clk); in_valid = 0; in_sof = 0;
          end
          @(negedge clk);
          img[y][x] = 8'($urandom);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_data = img[y][x];
        end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
