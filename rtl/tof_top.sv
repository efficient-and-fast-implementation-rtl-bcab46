// tof_top: time-of-flight depth camera datapath.
//
// The sensor delivers, for every pixel, four correlation samples DCS0..DCS3
// taken a quarter modulation period apart, as four consecutive 12-bit frames
// on its TCMI parallel bus. This top turns them into a depth image:
//
//   TCMI bus --tcmi_rx--> VDMA <--> external SDRAM (two frame sets, A and B)
//   VDMA --> BRAM1 --> Im = DCS2-DCS0, Re = DCS3-DCS1 --> CORDIC atan2
//        --> phase + offset + temperature term (tof_distance)
//            or, in two-frequency mode, phase_unwrap of the A/B phases
//        --> 3x3 median of the depth, 3x3 erosion/dilation of the valid mask
//        --> BRAM2 --> FX3 slave-FIFO (USB 3.0) output, 24 bits per pixel
//   amplitude --> auto_integration (next integration time), gray_* ports
//   distance --> roi_stats (mean and variance over the centre ROI)
//   distance in mm --> point_cloud (x, y, z = d * per-pixel ray) --> pc_*
//   i2c_master --> sensor configuration bus
//
// Stream control: the VDMA reads a word group only when BRAM1 has room for
// its eight tuples, and BRAM1 is popped only while BRAM2 has more free
// entries than the pipeline behind it holds, so nothing after BRAM1 needs a
// stall signal and a full USB link simply pauses the read-back.
// A pixel is "valid" when its amplitude is at least cfg.amp_min; the valid
// mask goes through the morphology filter and invalid pixels are sent as 0.
// The 3x3 filters shift the image by one pixel right and down and send 0 on
// the first two rows and columns.
// In two-frequency mode the output is the unwrapped phase as a fraction of
// the extended range M_A*du_A; the offset and temperature terms apply in
// single-frequency mode only.
// Clocks: dclk (sensor bus) and clk (system, SDRAM and USB side).
module tof_top
  import tof_pkg::*;
#(
  parameter int unsigned H_PIX       = 320,
  parameter int unsigned V_PIX       = 240,
  parameter int unsigned ITER        = 24,
  parameter int unsigned BRAM1_DEPTH = 512,
  parameter int unsigned BRAM2_DEPTH = 1024,
  parameter int unsigned I2C_DIV     = 100,
  parameter int unsigned M_A         = 4,
  parameter int unsigned M_B         = 3,
  parameter int unsigned ADDR_W      = 24,
  parameter int unsigned ROI         = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // sensor TCMI bus
  input  logic               dclk,
  input  logic               drst_n,
  input  logic               tcmi_hsync,
  input  logic               tcmi_vsync,
  input  logic [DCS_W-1:0]   tcmi_data,
  // SDRAM controller user port
  output logic               mem_cmd_valid,
  input  logic               mem_cmd_ready,
  output logic               mem_cmd_we,
  output logic [ADDR_W-1:0]  mem_cmd_addr,
  output logic [127:0]       mem_cmd_wdata,
  input  logic               mem_rsp_valid,
  input  logic [127:0]       mem_rsp_data,
  // FX3 slave FIFO
  output logic               fx3_slcs_n,
  output logic               fx3_slwr_n,
  output logic               fx3_sloe_n,
  output logic               fx3_slrd_n,
  output logic               fx3_pktend_n,
  output logic [1:0]         fx3_fifoadr,
  output logic [31:0]        fx3_dq,
  input  logic               fx3_flaga,
  // I2C to the sensor
  output logic               scl_oe,
  output logic               sda_oe,
  input  logic               scl_i,
  input  logic               sda_i,
  input  logic               i2c_cmd_valid,
  output logic               i2c_cmd_ready,
  input  logic               i2c_cmd_rw,
  input  logic [6:0]         i2c_cmd_dev,
  input  logic [7:0]         i2c_cmd_reg,
  input  logic [7:0]         i2c_cmd_wdata,
  output logic               i2c_rsp_valid,
  output logic [7:0]         i2c_rsp_rdata,
  output logic               i2c_rsp_nack,
  // configuration and compensation inputs
  input  tof_cfg_t           cfg,
  input  logic               auto_en,
  input  logic [3:0][15:0]   temp,
  input  logic               temp_update,
  // pixel direction vectors for the point cloud, {vz, vy, vx} in Q1.15
  input  logic               vec_we,
  input  logic [$clog2(H_PIX*V_PIX)-1:0] vec_addr,
  input  logic [2:0][15:0]   vec_data,
  // gray-scale amplitude image, one value per pixel
  output logic               gray_valid,
  output logic [AMP_W-1:0]   gray_amp,
  // mean and variance of the distance over the centre ROI, once per frame
  output logic               roi_valid,
  output logic [PHASE_W-1:0] roi_mean,
  output logic [2*PHASE_W-1:0] roi_var,
  // point cloud, mm, single-frequency distance
  output logic               pc_valid,
  output logic signed [16:0] pc_x,
  output logic signed [16:0] pc_y,
  output logic signed [16:0] pc_z,
  // status
  output logic [15:0]        t_int,
  output logic               t_update,
  output expo_e              expo_status,
  output logic               tcmi_overflow,
  output logic               vdma_overrun,
  output logic [15:0]        sets_done,
  output logic [15:0]        frames_sent
);
  localparam int unsigned CLAT  = ITER + 2;          // CORDIC latency
  localparam int unsigned NA_W  = (M_A > 1) ? $clog2(M_A) : 1;
  localparam int unsigned TW    = $bits(dcs_tuple_t);
  localparam int unsigned B1W   = $clog2(BRAM1_DEPTH);
  localparam int unsigned B2W   = $clog2(BRAM2_DEPTH);
  localparam int unsigned PIPE  = CLAT + 8;          // entries in flight after BRAM1

  // ---------------- capture ----------------
  logic             px_valid, px_ready, px_sof;
  logic [DCS_W-1:0] px_data;

  tcmi_rx u_tcmi (
    .dclk, .drst_n, .hsync(tcmi_hsync), .vsync(tcmi_vsync), .data(tcmi_data),
    .clk, .rst_n, .px_valid, .px_ready, .px_data, .px_sof, .overflow(tcmi_overflow)
  );

  // ---------------- frame buffer ----------------
  logic        b1_space, v_valid;
  dcs_tuple_t  v_tuple;
  logic [B1W:0] b1_count;

  vdma #(.H_PIX(H_PIX), .V_PIX(V_PIX), .ADDR_W(ADDR_W)) u_vdma (
    .clk, .rst_n, .dual_freq(cfg.dual_freq),
    .px_valid, .px_ready, .px_data, .px_sof,
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_we, .mem_cmd_addr, .mem_cmd_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .out_space(b1_space), .out_valid(v_valid), .out_tuple(v_tuple),
    .overrun(vdma_overrun), .sets_done
  );

  // ---------------- BRAM1 ----------------
  logic        b1_empty, b1_full, b1_pop;
  dcs_tuple_t  b1_tuple;
  logic [B2W:0] b2_count;

  assign b1_space = (b1_count <= (B1W + 1)'(BRAM1_DEPTH - 8));

  sync_fifo #(.W(TW), .DEPTH(BRAM1_DEPTH)) u_bram1 (
    .clk, .rst_n, .wr_en(v_valid), .wr_data(v_tuple), .rd_en(b1_pop), .rd_data(b1_tuple),
    .empty(b1_empty), .full(b1_full), .count(b1_count)
  );
  assign b1_pop = !b1_empty && (b2_count < (B2W + 1)'(BRAM2_DEPTH - PIPE));

  // ---------------- phase computation ----------------
  logic signed [DIFF_W-1:0] re_a, im_a, re_b, im_b;
  always_comb begin
    im_a = DIFF_W'({1'b0, b1_tuple.a[2]}) - DIFF_W'({1'b0, b1_tuple.a[0]});
    re_a = DIFF_W'({1'b0, b1_tuple.a[3]}) - DIFF_W'({1'b0, b1_tuple.a[1]});
    im_b = DIFF_W'({1'b0, b1_tuple.b[2]}) - DIFF_W'({1'b0, b1_tuple.b[0]});
    re_b = DIFF_W'({1'b0, b1_tuple.b[3]}) - DIFF_W'({1'b0, b1_tuple.b[1]});
  end

  logic               c_valid, c_valid_b;
  logic [PHASE_W-1:0] phase_a, phase_b;
  logic [AMP_W-1:0]   amp_a, amp_b;

  cordic_atan2 #(.IN_W(DIFF_W), .PHASE_W(PHASE_W), .AMP_W(AMP_W), .ITER(ITER)) u_cordic_a (
    .clk, .rst_n, .in_valid(b1_pop), .re(re_a), .im(im_a),
    .out_valid(c_valid), .phase(phase_a), .amp(amp_a)
  );
  cordic_atan2 #(.IN_W(DIFF_W), .PHASE_W(PHASE_W), .AMP_W(AMP_W), .ITER(ITER)) u_cordic_b (
    .clk, .rst_n, .in_valid(b1_pop), .re(re_b), .im(im_b),
    .out_valid(c_valid_b), .phase(phase_b), .amp(amp_b)
  );

  // frame marks travel beside the CORDIC
  logic [CLAT-1:0] sof_d, eof_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sof_d <= '0; eof_d <= '0;
    end else begin
      sof_d <= {sof_d[CLAT-2:0], b1_pop && b1_tuple.sof};
      eof_d <= {eof_d[CLAT-2:0], b1_pop && b1_tuple.eof};
    end
  end

  // ---------------- compensation and distance ----------------
  logic [PHASE_W-1:0] d_temp;
  temp_comp #(.PHASE_W(PHASE_W)) u_temp (
    .clk, .rst_n, .update(temp_update), .temp, .t_ref(cfg.t_ref), .k_temp(cfg.k_temp), .d_temp
  );

  logic               dist_valid;
  logic [PHASE_W-1:0] pixel_data;
  logic [15:0]        dist_mm;
  tof_distance #(.PHASE_W(PHASE_W)) u_dist (
    .clk, .rst_n, .in_valid(c_valid), .phase(phase_a), .d_offset(cfg.d_offset), .d_temp,
    .du_mm(cfg.du_mm), .out_valid(dist_valid), .pixel_data, .dist_mm
  );

  logic                  uw_valid;
  logic [NA_W-1:0]       uw_na;
  logic [PHASE_W+NA_W-1:0] uw_ext;
  phase_unwrap #(.BR(PHASE_W), .M_A(M_A), .M_B(M_B)) u_unwrap (
    .clk, .rst_n, .in_valid(c_valid && c_valid_b), .phi_a(phase_a), .phi_b(phase_b),
    .out_valid(uw_valid), .n_a(uw_na), .ext(uw_ext)
  );

  // amplitude and frame marks aligned with the two-stage distance
  logic [1:0][AMP_W-1:0] amp_d;
  logic [1:0]            sof2, eof2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amp_d <= '0; sof2 <= '0; eof2 <= '0;
    end else begin
      amp_d <= {amp_d[0], amp_a};
      sof2  <= {sof2[0], sof_d[CLAT-1]};
      eof2  <= {eof2[0], eof_d[CLAT-1]};
    end
  end

  assign gray_valid = dist_valid;
  assign gray_amp   = amp_d[1];

  point_cloud #(.NPIX(H_PIX * V_PIX), .D_W(16)) u_pc (
    .clk, .rst_n, .vec_we, .vec_addr, .vec_data,
    .in_valid(dist_valid), .in_sof(sof2[1]), .dist_mm,
    .out_valid(pc_valid), .px(pc_x), .py(pc_y), .pz(pc_z)
  );

  roi_stats #(.H_PIX(H_PIX), .V_PIX(V_PIX), .ROI(ROI), .W(PHASE_W)) u_roi (
    .clk, .rst_n, .in_valid(dist_valid), .in_sof(sof2[1]), .in_data(pixel_data),
    .out_valid(roi_valid), .mean(roi_mean), .var_out(roi_var)
  );

  logic [PHASE_W-1:0] depth;
  logic               mask_bit;
  assign depth    = cfg.dual_freq ? uw_ext[PHASE_W+NA_W-1 -: PHASE_W] : pixel_data;
  assign mask_bit = (amp_d[1] >= cfg.amp_min);

  // ---------------- auto integration time ----------------
  logic [15:0] n_adjust;
  auto_integration #(.NPIX(H_PIX * V_PIX)) u_auto (
    .clk, .rst_n, .auto_en, .amp_valid(c_valid), .amp(amp_a), .amp_eof(eof_d[CLAT-1]),
    .t_int, .t_update, .status(expo_status), .n_adjust
  );

  // ---------------- 3x3 preprocessing ----------------
  logic                    wd_valid, wd_sof, wd_eof, wd_ok;
  logic [8:0][PHASE_W-1:0] wd;
  logic                    wm_valid, wm_sof, wm_eof, wm_ok;
  logic [8:0][0:0]         wm;

  window3x3 #(.W(PHASE_W), .IMG_W(H_PIX), .IMG_H(V_PIX)) u_win_d (
    .clk, .rst_n, .in_valid(dist_valid), .in_sof(sof2[1]), .in_data(depth),
    .out_valid(wd_valid), .out_sof(wd_sof), .out_eof(wd_eof), .win_ok(wd_ok), .win(wd)
  );
  window3x3 #(.W(1), .IMG_W(H_PIX), .IMG_H(V_PIX)) u_win_m (
    .clk, .rst_n, .in_valid(dist_valid), .in_sof(sof2[1]), .in_data(mask_bit),
    .out_valid(wm_valid), .out_sof(wm_sof), .out_eof(wm_eof), .win_ok(wm_ok), .win(wm)
  );

  logic [PHASE_W-1:0] med;
  logic               mask_f;
  median3x3 #(.W(PHASE_W)) u_median (.win(wd), .med);
  morph3x3 u_morph (.win(wm), .mode(cfg.morph_mode), .out(mask_f));

  logic               o_valid, o_eof;
  logic [PHASE_W-1:0] o_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_eof <= 1'b0; o_data <= '0;
    end else begin
      o_valid <= wd_valid;
      o_eof   <= wd_eof;
      o_data  <= (wd_ok && mask_f) ? (cfg.median_en ? med : wd[4]) : '0;
    end
  end

  // ---------------- BRAM2 and USB ----------------
  logic               b2_empty, b2_full, b2_pop;
  logic [PHASE_W:0]   b2_word;
  sync_fifo #(.W(PHASE_W + 1), .DEPTH(BRAM2_DEPTH)) u_bram2 (
    .clk, .rst_n, .wr_en(o_valid), .wr_data({o_eof, o_data}), .rd_en(b2_pop), .rd_data(b2_word),
    .empty(b2_empty), .full(b2_full), .count(b2_count)
  );

  logic        usb_ready;
  logic [31:0] words_sent;
  assign b2_pop = !b2_empty && usb_ready;

  fx3_slave_fifo u_fx3 (
    .clk, .rst_n, .in_valid(!b2_empty), .in_ready(usb_ready), .in_data(b2_word[PHASE_W-1:0]),
    .in_eof(b2_word[PHASE_W]),
    .slcs_n(fx3_slcs_n), .slwr_n(fx3_slwr_n), .sloe_n(fx3_sloe_n), .slrd_n(fx3_slrd_n),
    .pktend_n(fx3_pktend_n), .fifoadr(fx3_fifoadr), .dq(fx3_dq), .flaga(fx3_flaga),
    .words_sent, .frames_sent
  );

  // ---------------- sensor configuration bus ----------------
  i2c_master #(.CLK_DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n, .cmd_valid(i2c_cmd_valid), .cmd_ready(i2c_cmd_ready), .cmd_rw(i2c_cmd_rw),
    .cmd_dev(i2c_cmd_dev), .cmd_reg(i2c_cmd_reg), .cmd_wdata(i2c_cmd_wdata),
    .rsp_valid(i2c_rsp_valid), .rsp_rdata(i2c_rsp_rdata), .rsp_nack(i2c_rsp_nack),
    .scl_oe, .sda_oe, .scl_i, .sda_i
  );

  a_bram2_never_full: assert property (@(posedge clk) disable iff (!rst_n) !(o_valid && b2_full));
endmodule
