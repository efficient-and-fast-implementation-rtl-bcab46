// sdram_model: behavioural stand-in for the external DDR3 SDRAM and its
// memory controller, seen through a valid/ready command port and an in-order
// read response port. Commands are accepted on cycles chosen at random
// (about READY_PCT percent), read data returns LAT cycles after acceptance.
// Not synthesizable logic of the design; used only by testbenches.
module sdram_model #(
  parameter int unsigned MEM_W     = 128,
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned LAT       = 6,
  parameter int unsigned READY_PCT = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_we,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [MEM_W-1:0]  cmd_wdata,
  output logic              rsp_valid,
  output logic [MEM_W-1:0]  rsp_data
);
  logic [MEM_W-1:0] mem [WORDS];
  logic [LAT-1:0] vpipe;
  logic [MEM_W-1:0] dpipe [LAT];
  int unsigned n_wr = 0, n_rd = 0, n_stall = 0;

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cmd_ready <= 1'b0;
    else cmd_ready <= ($urandom_range(99) < READY_PCT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
    end else begin
      vpipe <= {vpipe[LAT-2:0], cmd_valid && cmd_ready && !cmd_we};
      for (int i = LAT - 1; i > 0; i--) dpipe[i] <= dpipe[i-1];
      dpipe[0] <= mem[cmd_addr % WORDS];
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) begin mem[cmd_addr % WORDS] <= cmd_wdata; n_wr++; end
        else n_rd++;
        if (cmd_addr >= ADDR_W'(WORDS)) $display("sdram_model: address %0d out of range", cmd_addr);
      end
      if (cmd_valid && !cmd_ready) n_stall++;
    end
  end
  assign rsp_valid = vpipe[LAT-1];
  assign rsp_data  = dpipe[LAT-1];
endmodule
