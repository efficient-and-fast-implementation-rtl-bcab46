// tb_i2c_master: a behavioural I2C slave with a small register file decodes
// the bus from the open-drain lines. Checks register writes, register reads
// with repeated START, the NACK path for a wrong device address, START/STOP
// conditions and the bit time.
module tb_i2c_master;
  localparam int DIV = 4;
  localparam logic [6:0] DEV = 7'h22;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid = 0, cmd_ready, cmd_rw = 0;
  logic [6:0] cmd_dev = 0;
  logic [7:0] cmd_reg = 0, cmd_wdata = 0, rsp_rdata;
  logic rsp_valid, rsp_nack, scl_oe, sda_oe;
  logic slave_sda_low = 0;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || slave_sda_low);
  logic scl_i, sda_i;
  assign scl_i = scl;
  assign sda_i = sda;
  int checks = 0, failures = 0, starts = 0, stops = 0;
  i2c_master #(.CLK_DIV(DIV)) dut (.*);

  // ---- slave model ----
  logic [7:0] regs [256];
  logic [7:0] sh; int nbit; int bytei; bit selected, rd_mode, addr_phase; logic [7:0] ptr;
  bit in_ack;
  initial for (int i = 0; i < 256; i++) regs[i] = 8'(i * 7);

  always @(negedge sda) if (scl && rst_n) begin
    starts++; nbit = 0; bytei = 0; selected = 0; in_ack = 0; rd_mode = 0; slave_sda_low = 0;
  end
  always @(posedge sda) if (scl && rst_n) begin stops++; slave_sda_low = 0; end
  bit m_ack;
  always @(posedge scl) begin
    if (in_ack) m_ack = !sda;
    else begin
      if (!rd_mode) sh = {sh[6:0], sda};
      nbit++;
    end
  end
  always @(negedge scl) begin
    if (in_ack) begin
      in_ack = 0; slave_sda_low = 0; nbit = 0;
      if (rd_mode && selected && (bytei == 1 || m_ack)) slave_sda_low = !sh[7];
    end else if (nbit == 8) begin
      if (rd_mode && bytei > 0) begin
        slave_sda_low = 0;     // master acks or nacks
        in_ack = 1;
        bytei++;
      end else begin
        if (bytei == 0) begin
          selected = (sh[7:1] == DEV);
          rd_mode = sh[0];
          if (rd_mode) sh = regs[ptr];
        end else if (selected && bytei == 1) ptr = sh;
        else if (selected) begin regs[ptr] = sh; ptr++; end
        slave_sda_low = selected;
        in_ack = 1;
        bytei++;
      end
    end else if (rd_mode && selected && nbit > 0) begin
      sh = {sh[6:0], 1'b0};
      slave_sda_low = !sh[7];
    end
  end

  task automatic xfer(input bit rw, input logic [6:0] dev, input logic [7:0] rg, input logic [7:0] wd,
                      output logic [7:0] rd, output logic nack, output int cycles);
    @(negedge clk);
    cmd_valid = 1; cmd_rw = rw; cmd_dev = dev; cmd_reg = rg; cmd_wdata = wd;
    cycles = 0;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
    while (!rsp_valid) begin @(posedge clk); cycles++; end
    rd = rsp_rdata; nack = rsp_nack;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] rd; logic nack; int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      logic [7:0] a, d;
      a = 8'($urandom); d = 8'($urandom);
      xfer(0, DEV, a, d, rd, nack, cyc);
      checks += 3;
      if (nack) begin failures++; $display("write nacked"); end
      if (regs[a] != d) begin failures++; $display("reg %0d = %h exp %h", a, regs[a], d); end
      // START + 3 bytes of 9 bits + STOP, four quarters of DIV clocks each
      if (cyc < (1 + 27 + 1) * 4 * DIV - 2 * DIV || cyc > (1 + 27 + 1) * 4 * DIV + 2 * DIV) begin
        failures++; $display("write took %0d cycles", cyc);
      end
      xfer(1, DEV, a, 0, rd, nack, cyc);
      checks += 2;
      if (nack) begin failures++; $display("read nacked"); end
      if (rd != d) begin failures++; $display("read %h exp %h", rd, d); end
    end
    xfer(1, DEV, 8'd5, 0, rd, nack, cyc);
    checks++;
    if (rd != 8'(5 * 7)) begin failures++; $display("preset read %h", rd); end
    xfer(0, 7'h11, 8'd1, 8'd1, rd, nack, cyc);
    checks += 2;
    if (!nack) begin failures++; $display("wrong address not nacked"); end
    if (starts != 6 * 3 + 2 + 1 || stops != 6 * 2 + 2) begin failures++; $display("starts %0d stops %0d", starts, stops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
