// vdma: frame-buffer controller between the sensor stream, the external
// SDRAM and the phase computation.
//
// Write side: sensor pixels (12 bit) are packed eight to a 128-bit word, one
// 16-bit lane each, and written to SDRAM. A DCS frame is H_PIX*V_PIX pixels;
// four consecutive frames (DCS0..DCS3) form a set, and sets alternate between
// two areas, set 0 ("frame A") and set 1 ("frame B"). Word address =
// (set*4 + dcs)*FRAME_WORDS + word. A start-of-frame pixel restarts the word
// count of the current frame.
//
// Read side: when a set is complete it is read back word-interleaved: for
// word g the reader fetches word g of DCS0..DCS3 (and, with dual_freq, of
// both sets, so that frame A and frame B of the two modulation frequencies
// arrive together; then only completion of set 1 starts a read), collects the
// responses and emits the eight pixel tuples of that word, one per clock,
// while out_space says the downstream buffer can take eight more.
//
// The single SDRAM port is shared with writes first: the sensor stream must
// never wait long. `overrun` is sticky and rises when a set completes while
// the previous one is still being read. The memory port is a valid/ready
// command channel plus an in-order read response channel.
// The buffering scheme follows the source; the word format, address map and
// the port protocol are choices of this design.
module vdma
  import tof_pkg::*;
#(
  parameter int unsigned H_PIX       = 320,
  parameter int unsigned V_PIX       = 240,
  parameter int unsigned MEM_W       = 128,
  parameter int unsigned ADDR_W      = 24,
  localparam int unsigned PX_PER_WORD = MEM_W / 16,
  localparam int unsigned FRAME_WORDS = H_PIX * V_PIX / PX_PER_WORD,
  localparam int unsigned WW          = $clog2(FRAME_WORDS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               dual_freq,
  // sensor pixel stream
  input  logic               px_valid,
  output logic               px_ready,
  input  logic [DCS_W-1:0]   px_data,
  input  logic               px_sof,
  // SDRAM port
  output logic               mem_cmd_valid,
  input  logic               mem_cmd_ready,
  output logic               mem_cmd_we,
  output logic [ADDR_W-1:0]  mem_cmd_addr,
  output logic [MEM_W-1:0]   mem_cmd_wdata,
  input  logic               mem_rsp_valid,
  input  logic [MEM_W-1:0]   mem_rsp_data,
  // pixel tuples towards BRAM1
  input  logic               out_space,
  output logic               out_valid,
  output dcs_tuple_t         out_tuple,
  // status
  output logic               overrun,
  output logic [15:0]        sets_done
);
  localparam int unsigned PW = $clog2(PX_PER_WORD);

  function automatic logic [ADDR_W-1:0] word_addr(logic set, logic [1:0] dcs, logic [WW-1:0] w);
    return ADDR_W'((({set, dcs}) * FRAME_WORDS) + w);
  endfunction

  // ---------------- write side ----------------
  logic [PX_PER_WORD-1:0][15:0] wbuf;
  logic [PW-1:0]  wlane;
  logic [WW-1:0]  wword;
  logic [1:0]     wdcs;
  logic           wset;
  logic           wr_pend;
  logic [ADDR_W-1:0] wr_addr;
  logic [MEM_W-1:0]  wr_data;
  logic           set_done_p;      // pulse: set `done_set` fully written
  logic           done_set;
  logic           take_px, wr_go;

  assign px_ready = !wr_pend;
  assign take_px  = px_valid && px_ready;
  assign wr_go    = wr_pend && mem_cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf <= '0; wlane <= '0; wword <= '0; wdcs <= '0; wset <= 1'b0;
      wr_pend <= 1'b0; wr_addr <= '0; wr_data <= '0;
      set_done_p <= 1'b0; done_set <= 1'b0;
    end else begin
      set_done_p <= 1'b0;
      if (wr_go) begin
        wr_pend <= 1'b0;
        if (wword == WW'(FRAME_WORDS - 1)) begin
          wword <= '0;
          wdcs  <= wdcs + 1'b1;
          if (wdcs == 2'd3) begin
            wset <= ~wset;
            set_done_p <= 1'b1;
            done_set <= wset;
          end
        end else begin
          wword <= wword + 1'b1;
        end
      end
      if (take_px) begin
        logic [PW-1:0]  lane;
        logic [WW-1:0]  word;
        lane = px_sof ? '0 : wlane;
        word = px_sof ? '0 : wword;   // never in the same cycle as wr_go
        if (px_sof) wword <= '0;       // resynchronise on a new frame
        wbuf[lane] <= 16'(px_data);
        if (lane == PW'(PX_PER_WORD - 1)) begin
          logic [PX_PER_WORD-1:0][15:0] full_word;
          full_word = wbuf;
          full_word[lane] = 16'(px_data);
          wr_pend <= 1'b1;
          wr_data <= full_word;
          wr_addr <= word_addr(wset, wdcs, word);
          wlane   <= '0;
        end else begin
          wlane <= lane + 1'b1;
        end
      end
    end
  end

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_ISSUE, R_EMIT} rstate_e;
  rstate_e rstate;
  logic           rpend;          // a set is waiting to be read
  logic           rset;           // set to read (single-frequency mode)
  logic           rdual;          // read in two-frequency mode
  logic [WW-1:0]  rword;
  logic [2:0]     issued, recvd;  // read commands issued / answered for this word
  logic [3:0]     nrd;
  logic [7:0][MEM_W-1:0] rbuf;
  logic [PW-1:0]  elane;
  logic           rd_go;
  logic [ADDR_W-1:0] rd_addr;

  assign nrd   = rdual ? 4'd8 : 4'd4;
  assign rd_go = (rstate == R_ISSUE) && !wr_pend && (4'(issued) < nrd) && mem_cmd_ready;
  always_comb begin
    logic s;
    s = rdual ? issued[2] : rset;
    rd_addr = word_addr(s, issued[1:0], rword);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE; rpend <= 1'b0; rset <= 1'b0; rdual <= 1'b0;
      rword <= '0; issued <= '0; recvd <= '0; rbuf <= '0; elane <= '0;
      overrun <= 1'b0; sets_done <= '0;
    end else begin
      if (set_done_p && (!dual_freq || done_set)) begin
        if (rpend || rstate != R_IDLE) overrun <= 1'b1;
        rpend <= 1'b1;
        rset  <= done_set;
      end
      if (rd_go) issued <= issued + 1'b1;
      if (mem_rsp_valid) begin
        rbuf[recvd] <= mem_rsp_data;
        recvd <= recvd + 1'b1;
      end
      unique case (rstate)
        R_IDLE: if (rpend) begin
          rpend <= 1'b0;
          rdual <= dual_freq;
          rword <= '0; issued <= '0; recvd <= '0; elane <= '0;
          rstate <= R_ISSUE;
        end
        R_ISSUE: if (4'(recvd) == nrd || (mem_rsp_valid && 4'(recvd) + 4'd1 == nrd)) begin
          if (out_space) rstate <= R_EMIT;
        end
        R_EMIT: begin
          elane <= elane + 1'b1;
          if (elane == PW'(PX_PER_WORD - 1)) begin
            issued <= '0; recvd <= '0;
            if (rword == WW'(FRAME_WORDS - 1)) begin
              rstate <= R_IDLE;
              sets_done <= sets_done + 1'b1;
            end else begin
              rword <= rword + 1'b1;
              rstate <= R_ISSUE;
            end
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // Emit: tuple for lane `elane` of the collected words.
  always_comb begin
    out_valid = (rstate == R_EMIT);
    out_tuple = '0;
    for (int k = 0; k < 4; k++) begin
      out_tuple.a[k] = rbuf[k][elane*16 +: DCS_W];
      out_tuple.b[k] = rdual ? rbuf[4 + k][elane*16 +: DCS_W] : '0;
    end
    out_tuple.sof = (rword == '0) && (elane == '0);
    out_tuple.eof = (rword == WW'(FRAME_WORDS - 1)) && (elane == PW'(PX_PER_WORD - 1));
  end

  // ---------------- SDRAM command mux: writes first ----------------
  always_comb begin
    mem_cmd_valid = wr_pend || ((rstate == R_ISSUE) && (4'(issued) < nrd));
    mem_cmd_we    = wr_pend;
    mem_cmd_addr  = wr_pend ? wr_addr : rd_addr;
    mem_cmd_wdata = wr_data;
  end

  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_cmd_valid && !mem_cmd_ready && mem_cmd_we |=> mem_cmd_valid && mem_cmd_we && $stable(mem_cmd_addr));
endmodule
