// i2c_master: I2C master for single-register accesses to the sensor (mode
// selection, configuration, temperature read-out).
//
// A command is a register write (START, dev+W, reg, data, STOP) or a
// register read (START, dev+W, reg, repeated START, dev+R, one data byte
// with master NACK, STOP). Every bit is four quarter periods of CLK_DIV
// clocks: SCL low with SDA set up, SCL released, SDA sampled, SCL low
// again. SCL and SDA are open drain: *_oe high pulls the line low, *_i is
// the line as seen at the pad. A missing ACK from the slave sets rsp_nack
// and ends the transfer with STOP. No clock stretching, single master.
// The source gives only the bus and its use; this controller is this
// design's own.
module i2c_master #(
  parameter int unsigned CLK_DIV = 100     // clocks per quarter bit
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_rw,        // 1 = read
  input  logic [6:0]  cmd_dev,
  input  logic [7:0]  cmd_reg,
  input  logic [7:0]  cmd_wdata,
  output logic        rsp_valid,
  output logic [7:0]  rsp_rdata,
  output logic        rsp_nack,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        scl_i,
  input  logic        sda_i
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP} state_e;
  state_e       st;
  logic [$clog2(CLK_DIV+1)-1:0] div;
  logic         tick;
  logic [1:0]   q;          // quarter within the current bit / condition
  logic [2:0]   nbit;
  logic [1:0]   bidx;       // byte index in the transfer
  logic         rw;
  logic [6:0]   dev;
  logic [7:0]   rg, wd, sh;
  logic         nack;
  logic         rd_byte;    // current byte is received, not sent

  assign tick = (div == '0);
  assign cmd_ready = (st == S_IDLE);

  function automatic logic [7:0] tx_byte(logic [1:0] i, logic r, logic [6:0] d, logic [7:0] a, logic [7:0] w);
    unique case (i)
      2'd0: return {d, 1'b0};
      2'd1: return a;
      2'd2: return r ? {d, 1'b1} : w;
      default: return 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; div <= '0; q <= '0; nbit <= '0; bidx <= '0; rw <= 1'b0;
      dev <= '0; rg <= '0; wd <= '0; sh <= '0; nack <= 1'b0; rd_byte <= 1'b0;
      scl_oe <= 1'b0; sda_oe <= 1'b0;
      rsp_valid <= 1'b0; rsp_rdata <= '0; rsp_nack <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      div <= (st == S_IDLE || tick) ? $bits(div)'(CLK_DIV - 1) : div - 1'b1;
      if (st == S_IDLE) begin
        scl_oe <= 1'b0; sda_oe <= 1'b0;
        if (cmd_valid) begin
          rw <= cmd_rw; dev <= cmd_dev; rg <= cmd_reg; wd <= cmd_wdata;
          bidx <= '0; nack <= 1'b0; q <= '0; rd_byte <= 1'b0;
          st <= S_START;
        end
      end else if (tick) begin
        q <= q + 1'b1;
        unique case (st)
          S_START: begin               // also serves as repeated START
            unique case (q)
              2'd0: begin sda_oe <= 1'b0; end           // SDA high (SCL low if repeated)
              2'd1: begin scl_oe <= 1'b0; end           // SCL high
              2'd2: begin sda_oe <= 1'b1; end           // SDA falls: START
              default: begin
                scl_oe <= 1'b1;
                sh <= tx_byte(bidx, rw, dev, rg, wd);
                nbit <= 3'd7;
                st <= S_BIT;
              end
            endcase
          end
          S_BIT: begin
            unique case (q)
              2'd0: sda_oe <= rd_byte ? 1'b0 : ~sh[7];
              2'd1: scl_oe <= 1'b0;
              2'd2: if (rd_byte) sh <= {sh[6:0], sda_i};
              default: begin
                scl_oe <= 1'b1;
                if (!rd_byte) sh <= {sh[6:0], 1'b0};
                if (nbit == 3'd0) st <= S_ACK;
                nbit <= nbit - 1'b1;
              end
            endcase
          end
          S_ACK: begin
            unique case (q)
              2'd0: sda_oe <= 1'b0;                      // release (or NACK on read)
              2'd1: scl_oe <= 1'b0;
              2'd2: if (!rd_byte && sda_i) nack <= 1'b1;
              default: begin
                scl_oe <= 1'b1;
                if (rd_byte || nack || (!rw && bidx == 2'd2)) begin
                  if (rd_byte) rsp_rdata <= sh;
                  st <= S_STOP;
                end else if (rw && bidx == 2'd1) begin
                  bidx <= 2'd2;
                  st <= S_START;                          // repeated START
                end else if (rw && bidx == 2'd2) begin
                  bidx <= 2'd3;
                  rd_byte <= 1'b1;
                  nbit <= 3'd7;
                  st <= S_BIT;
                end else begin
                  bidx <= bidx + 1'b1;
                  sh <= tx_byte(bidx + 1'b1, rw, dev, rg, wd);
                  nbit <= 3'd7;
                  st <= S_BIT;
                end
              end
            endcase
          end
          S_STOP: begin
            unique case (q)
              2'd0: sda_oe <= 1'b1;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;                      // SDA rises: STOP
              default: begin
                st <= S_IDLE;
                rsp_valid <= 1'b1;
                rsp_nack <= nack;
              end
            endcase
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  // SCL is only read back to keep the pin pair symmetric with a stretching
  // slave; this controller does not wait for it.
  logic scl_unused;
  assign scl_unused = scl_i;
endmodule
