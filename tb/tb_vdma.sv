// tb_vdma: streams four DCS sets of random pixels (a small 16x4 frame) into
// the VDMA with random gaps, against the behavioural SDRAM with random
// ready, and random downstream space. Sets 0..2 are read in single-frequency
// mode; the fourth set completes in two-frequency mode, so sets 2 (A) and 3
// (B) come back together. Every tuple, its sof/eof marks, the set counter,
// the absence of overrun, and that a read was held back by a write at least
// once, are checked.
module tb_vdma;
  import tof_pkg::*;
  localparam int H = 16, V = 4, NP = H * V, FW = NP / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dual_freq = 0;
  logic px_valid = 0, px_ready, px_sof = 0;
  logic [11:0] px_data = 0;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rsp_valid;
  logic [23:0] mem_cmd_addr;
  logic [127:0] mem_cmd_wdata, mem_rsp_data;
  logic out_space = 1, out_valid, overrun;
  dcs_tuple_t out_tuple;
  logic [15:0] sets_done;
  int checks = 0, failures = 0, got = 0, wr_blocks = 0;

  vdma #(.H_PIX(H), .V_PIX(V)) dut (.*);
  sdram_model #(.WORDS(8 * FW)) u_mem (
    .clk, .rst_n, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .cmd_wdata(mem_cmd_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  logic [11:0] pix [4][4][NP];       // [set][dcs][pixel]
  dcs_tuple_t exp_q [$];

  task automatic expect_set(input int sa, input int sb, input bit dual);
    for (int p = 0; p < NP; p++) begin
      dcs_tuple_t t;
      t = '0;
      for (int k = 0; k < 4; k++) begin
        t.a[k] = pix[sa][k][p];
        t.b[k] = dual ? pix[sb][k][p] : 12'h000;
      end
      t.sof = (p == 0);
      t.eof = (p == NP - 1);
      exp_q.push_back(t);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      if (s == 3) begin
        wait (sets_done == 16'd3);   // switch modes between sets
        dual_freq = 1;
      end
      for (int k = 0; k < 4; k++) begin
        for (int p = 0; p < NP; p++) begin
          pix[s][k][p] = 12'($urandom);
          @(negedge clk);
          while ($urandom_range(2) != 0) begin px_valid = 0; @(negedge clk); end
          px_valid = 1; px_data = pix[s][k][p]; px_sof = (p == 0);
          @(posedge clk);
          while (!px_ready) @(posedge clk);
        end
        @(negedge clk); px_valid = 0;
      end
      if (s < 3) expect_set(s, 0, 0);
      else expect_set(2, 3, 1);
    end
  end

  always @(posedge clk) begin
    out_space <= ($urandom_range(3) != 0);
    if (rst_n && dut.rstate == 1 && dut.wr_pend) wr_blocks++;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected tuple"); end
      else begin
        if (out_tuple != exp_q[0]) begin failures++; $display("tuple %0d mismatch", got); end
        void'(exp_q.pop_front());
      end
      got++;
      if (got == 4 * NP) begin
        repeat (2) @(posedge clk);
        checks += 3;
        if (sets_done != 16'd4) begin failures++; $display("sets_done %0d", sets_done); end
        if (overrun) begin failures++; $display("overrun"); end
        if (wr_blocks == 0) begin failures++; $display("write priority never seen"); end
        $display("reads held back by writes: %0d cycles", wr_blocks);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog, got %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
