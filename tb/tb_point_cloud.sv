// tb_point_cloud: loads random direction vectors for a small frame, streams
// two frames of random distances with gaps, and checks every point against
// floor(d * v / 2^15) and the two-cycle latency.
module tb_point_cloud;
  localparam int NP = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vec_we = 0, in_valid = 0, in_sof = 0;
  logic [4:0] vec_addr = 0;
  logic [2:0][15:0] vec_data = '0;
  logic [15:0] dist_mm = 0;
  logic out_valid;
  logic signed [16:0] px, py, pz;
  logic [2:0][15:0] vecs [NP];
  int checks = 0, failures = 0;
  point_cloud #(.NPIX(NP)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 5'(i);
      for (int c = 0; c < 3; c++) vecs[i][c] = (i == 0) ? 16'h7fff : 16'($urandom);
      vec_data = vecs[i];
    end
    @(negedge clk); vec_we = 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < NP; i++) begin
        longint e [3];
        @(negedge clk);
        while ($urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_sof = (i == 0); dist_mm = (i == 1) ? 16'hffff : 16'($urandom);
        for (int c = 0; c < 3; c++) e[c] = (longint'(dist_mm) * longint'($signed(vecs[i][c]))) >>> 15;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (out_valid) begin failures++; $display("early output"); end
        @(negedge clk);
        checks++;
        if (!out_valid || px != 17'(e[0]) || py != 17'(e[1]) || pz != 17'(e[2])) begin
          failures++; $display("frame %0d pixel %0d d=%0d v=%h: got %0d %0d %0d exp %0d %0d %0d", f, i, dist_mm, vecs[i], px, py, pz, e[0], e[1], e[2]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
