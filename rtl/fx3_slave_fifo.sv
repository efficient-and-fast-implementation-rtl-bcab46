// fx3_slave_fifo: write master for the FX3 USB 3.0 controller's synchronous
// slave FIFO, 32-bit data bus, clocked by the system clock (forwarded to the
// controller as its interface clock).
//
// Output pixels are 24 bits. Four pixels are packed into three 32-bit words,
// least significant byte first:
//   w0 = {p1[7:0],  p0}, w1 = {p2[15:0], p1[23:8]}, w2 = {p3, p2[23:16]}
// Each accepted pixel yields at most one word, written on the same edge it is
// accepted (SLWR# low with DQ). Pixels are accepted only while the
// registered `flaga` (socket ready) is high; the controller is expected to
// drop the flag while it can still take the few words in flight. The last
// word of a frame is written with PKTEND# low, committing a short packet; a
// frame must hold a multiple of four pixels (an assertion checks this). Chip select stays asserted, the read strobes stay idle and the
// socket address is fixed at 0.
// The 32-bit interface and the 24-bit pixel follow the source; the packing,
// the socket and the flag use are choices of this design.
module fx3_slave_fifo (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [23:0]  in_data,
  input  logic         in_eof,
  // FX3 slave FIFO pins
  output logic         slcs_n,
  output logic         slwr_n,
  output logic         sloe_n,
  output logic         slrd_n,
  output logic         pktend_n,
  output logic [1:0]   fifoadr,
  output logic [31:0]  dq,
  input  logic         flaga,
  // status
  output logic [31:0]  words_sent,
  output logic [15:0]  frames_sent
);
  logic       flag_r;
  logic [1:0] ph;          // pixel index within a group of four
  logic [23:0] hold;
  logic        take;
  logic        emit;
  logic [31:0] word;

  assign in_ready = flag_r;
  assign take     = in_valid && in_ready;

  always_comb begin
    emit = 1'b0;
    word = '0;
    unique case (ph)
      2'd0: begin word = {8'h00, in_data};             emit = 1'b0;    end
      2'd1: begin word = {in_data[7:0], hold};         emit = 1'b1;    end
      2'd2: begin word = {in_data[15:0], hold[15:0]};  emit = 1'b1;    end
      default: begin word = {in_data, hold[7:0]};      emit = 1'b1;    end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_r <= 1'b0; ph <= '0; hold <= '0;
      slwr_n <= 1'b1; pktend_n <= 1'b1; dq <= '0;
      words_sent <= '0; frames_sent <= '0;
    end else begin
      flag_r   <= flaga;
      slwr_n   <= 1'b1;
      pktend_n <= 1'b1;
      if (take) begin
        unique case (ph)
          2'd0: hold <= in_data;
          2'd1: hold <= {8'h00, in_data[23:8]};
          2'd2: hold <= {16'h0000, in_data[23:16]};
          default: hold <= '0;
        endcase
        ph <= in_eof ? 2'd0 : ph + 1'b1;
        if (emit) begin
          slwr_n <= 1'b0;
          dq <= word;
          words_sent <= words_sent + 1'b1;
        end
        if (in_eof) begin
          pktend_n <= 1'b0;
          frames_sent <= frames_sent + 1'b1;
        end
      end
    end
  end

  a_frame_multiple_of_4: assert property (@(posedge clk) disable iff (!rst_n)
    take && in_eof |-> ph == 2'd3);

  assign slcs_n  = 1'b0;
  assign sloe_n  = 1'b1;
  assign slrd_n  = 1'b1;
  assign fifoadr = 2'b00;
endmodule
