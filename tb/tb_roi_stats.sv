// tb_roi_stats: checks the centre-ROI mean and variance.
// A 20x12 frame with a 4x4 ROI (and a second instance with an 8x8 ROI) is
// streamed four times with random gaps and random values (full range, then a
// narrow band, then a constant). The testbench sums the ROI pixels itself and
// compares mean = floor(S1/N) and var = floor((N*S2 - S1^2)/N^2) exactly, and
// checks that the result comes two cycles after the last ROI pixel.
module tb_roi_stats;
  localparam int H = 20, V = 12, W = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sof = 0;
  logic [W-1:0] in_data = '0;
  logic ov4, ov8;
  logic [W-1:0] m4, m8;
  logic [2*W-1:0] v4, v8;

  roi_stats #(.H_PIX(H), .V_PIX(V), .ROI(4), .W(W)) dut4 (
    .clk, .rst_n, .in_valid, .in_sof, .in_data, .out_valid(ov4), .mean(m4), .var_out(v4));
  roi_stats #(.H_PIX(H), .V_PIX(V), .ROI(8), .W(W)) dut8 (
    .clk, .rst_n, .in_valid, .in_sof, .in_data, .out_valid(ov8), .mean(m8), .var_out(v8));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // reference for one ROI size
  typedef struct { longint unsigned s1; logic [127:0] s2; int last_cyc; } acc_t;
  acc_t a4, a8;
  int n_out4 = 0, n_out8 = 0;

  function automatic bit in_roi(int r, int x, int y);
    return x >= (H - r) / 2 && x < (H - r) / 2 + r && y >= (V - r) / 2 && y < (V - r) / 2 + r;
  endfunction

  task automatic check(int r, acc_t a, logic [W-1:0] m, logic [2*W-1:0] v, int at);
    logic [127:0] n, em, ev;
    n = 128'(r * r);
    em = 128'(a.s1) / n;
    ev = (n * a.s2 - 128'(a.s1) * 128'(a.s1)) / (n * n);
    checks += 3;
    if (128'(m) != em) begin failures++; $display("ROI %0d: mean %0d, expected %0d", r, m, em); end
    if (128'(v) != ev) begin failures++; $display("ROI %0d: var %0d, expected %0d", r, v, ev); end
    if (at - a.last_cyc != 2) begin failures++; $display("ROI %0d: latency %0d", r, at - a.last_cyc); end
  endtask

  always @(posedge clk) begin
    if (ov4) begin check(4, a4, m4, v4, cyc); n_out4++; end
    if (ov8) begin check(8, a8, m8, v8, cyc); n_out8++; end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      a4 = '{0, 0, 0}; a8 = '{0, 0, 0};
      for (int y = 0; y < V; y++)
        for (int x = 0; x < H; x++) begin
          logic [W-1:0] d;
          while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; in_sof = 0; end
          case (f)
            0, 3: d = W'($urandom);
            1:    d = W'(24'h800000 + $urandom_range(2000));
            default: d = 24'h123456;
          endcase
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_data = d;
          if (in_roi(4, x, y)) begin
            a4.s1 += longint'(d); a4.s2 += 128'(d) * 128'(d); a4.last_cyc = cyc + 1;
          end
          if (in_roi(8, x, y)) begin
            a8.s1 += longint'(d); a8.s2 += 128'(d) * 128'(d); a8.last_cyc = cyc + 1;
          end
        end
      @(negedge clk); in_valid = 0; in_sof = 0;
      repeat ($urandom_range(20)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks += 2;
    if (n_out4 != 4) begin failures++; $display("ROI 4: %0d results", n_out4); end
    if (n_out8 != 4) begin failures++; $display("ROI 8: %0d results", n_out8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
