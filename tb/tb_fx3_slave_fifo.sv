// tb_fx3_slave_fifo: behavioural FX3 socket (a buffer drained at random,
// flag dropped while fewer than four words of room are left) receiving two
// frames of 24-bit pixels offered with random gaps. Checks the unpacked
// pixels, PKTEND on exactly the last word of each frame, that the buffer
// never overflows, and that the flag stalled the writer at least once.
module tb_fx3_slave_fifo;
  localparam int NP = 40, FR = 2, CAP = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_eof = 0;
  logic [23:0] in_data = 0;
  logic slcs_n, slwr_n, sloe_n, slrd_n, pktend_n;
  logic [1:0] fifoadr;
  logic [31:0] dq, words_sent;
  logic flaga;
  logic [15:0] frames_sent;
  int checks = 0, failures = 0, level = 0, stalls = 0, nwords = 0, npx = 0;
  logic [23:0] sent [$];
  logic [55:0] bits = '0; int nb = 0;
  fx3_slave_fifo dut (.*);

  // socket model
  always @(posedge clk) begin
    if (!rst_n) begin level = 0; flaga <= 0; end
    else begin
      if (!slwr_n) begin
        level++;
        checks++;
        if (level > CAP) begin failures++; $display("socket overflow"); end
        checks++;
        if (slcs_n || fifoadr != 2'b00 || !sloe_n || !slrd_n) begin failures++; $display("strobes"); end
        bits = bits | (56'(dq) << nb); nb += 32;
        nwords++;
        while (nb >= 24) begin
          checks++;
          if (sent.size() == 0 || bits[23:0] != sent[0]) begin failures++; $display("pixel %0d wrong", npx); end
          if (sent.size() != 0) void'(sent.pop_front());
          bits = bits >> 24; nb -= 24; npx++;
        end
        checks++;
        if ((pktend_n == 1'b0) != (npx % NP == 0 && nb == 0)) begin failures++; $display("pktend at word %0d", nwords); end
      end
      if (level > 0 && $urandom_range(2) == 0) level--;
      flaga <= (CAP - level) >= 4;
      if (in_valid && !in_ready) stalls++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FR; f++)
      for (int i = 0; i < NP; i++) begin
        @(negedge clk);
        while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = 24'($urandom); in_eof = (i == NP - 1);
        sent.push_back(in_data);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks += 3;
    if (npx != NP * FR) begin failures++; $display("pixels %0d", npx); end
    if (frames_sent != 16'(FR) || words_sent != 32'(NP * FR * 3 / 4)) begin failures++; $display("counters"); end
    if (stalls == 0) begin failures++; $display("never stalled"); end
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
