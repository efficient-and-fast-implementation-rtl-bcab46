// tb_tof_top: end-to-end test of the depth camera datapath.
//
// The testbench plays the sensor: for a synthetic scene (a depth ramp, a
// block and a single pixel of low reflectivity) it computes the four DCS
// samples of every pixel, DCS0/2 = B -/+ a*sin(phi), DCS1/3 = B -/+ a*cos(phi),
// with the amplitude a proportional to the integration time the design asks
// for, and sends each DCS as a TCMI frame. Sets are sent back to back, so
// SDRAM writes of one set overlap the read-back of the previous one. The
// SDRAM is a behavioural model with random ready; the FX3 socket model
// drains slowly and drops its flag, so the output path back-pressures.
// Output frames are decoded from the 32-bit USB words and every pixel is
// compared with a reference computed here from the scene: phase plus offset
// and temperature term, 3x3 median or centre, masked by the erosion/dilation
// of the amplitude-valid map. Frames 0..3 are single-frequency with varying
// filter settings; frames 4 and 5 use two-frequency unwrapping (4:3).
// Every mechanism is counted and must occur at least once.
module tb_tof_top;
  timeunit 1ns; timeprecision 1ps;
  import tof_pkg::*;
  localparam int H = 16, V = 8;
  localparam int NSETS = 8;
  localparam bit MECH = 1;
  localparam bit FAST_USB = 0;      // socket never full: measure the frame rate
  localparam int NP = H * V;
  localparam int ROI = (H >= 16 && V >= 16) ? 16 : 4;   // as set on the top
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, dclk = 0, rst_n = 0, drst_n = 0;
  always #3.125 clk = ~clk;
  always #12.5 dclk = ~dclk;

  logic tcmi_hsync = 0, tcmi_vsync = 0;
  logic [11:0] tcmi_data = 0;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rsp_valid;
  logic [23:0] mem_cmd_addr;
  logic [127:0] mem_cmd_wdata, mem_rsp_data;
  logic fx3_slcs_n, fx3_slwr_n, fx3_sloe_n, fx3_slrd_n, fx3_pktend_n;
  logic [1:0] fx3_fifoadr;
  logic [31:0] fx3_dq;
  logic fx3_flaga;
  logic scl_oe, sda_oe, scl_i, sda_i;
  logic i2c_cmd_valid = 0, i2c_cmd_ready, i2c_cmd_rw = 0;
  logic [6:0] i2c_cmd_dev = 7'h22;
  logic [7:0] i2c_cmd_reg = 8'h10, i2c_cmd_wdata = 8'h5a, i2c_rsp_rdata;
  logic i2c_rsp_valid, i2c_rsp_nack;
  tof_cfg_t cfg;
  logic auto_en = 1;
  logic [3:0][15:0] temp = {16'd98, 16'd102, 16'd99, 16'd101};
  logic temp_update = 0;
  logic [15:0] t_int;
  logic t_update;
  expo_e expo_status;
  logic tcmi_overflow, vdma_overrun;
  logic [15:0] sets_done, frames_sent;
  logic vec_we = 0;
  logic [$clog2(NP)-1:0] vec_addr = '0;
  logic [2:0][15:0] vec_data = '0;
  logic gray_valid;
  logic [11:0] gray_amp;
  logic roi_valid;
  logic [23:0] roi_mean;
  logic [47:0] roi_var;
  logic pc_valid;
  logic signed [16:0] pc_x, pc_y, pc_z;

  // no slave on the configuration bus: the lines read back what is driven
  assign scl_i = !scl_oe;
  assign sda_i = !sda_oe;

  tof_top #(.H_PIX(H), .V_PIX(V), .BRAM1_DEPTH(32), .BRAM2_DEPTH(64), .I2C_DIV(4), .ROI(4)) dut (.*); // TOP_INST

  sdram_model #(.WORDS(8 * NP / 8)) u_mem (
    .clk, .rst_n, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .cmd_wdata(mem_cmd_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0;

  // ---------------- scene ----------------
  function automatic bit dark(int x, int y);
    return (x >= 5 && x <= 7 && y >= 2 && y <= 4) || (x == 11 && y == 5);
  endfunction
  function automatic real d_single(int x, int y);     // fraction of du
    return 0.2 + 0.02 * real'(x * 16 / H) + 0.03 * real'(y * 8 / V) + 0.0001 * real'(x % (H / 16 + 1));
  endfunction
  function automatic real d_ext(int x, int y);        // fraction of 4*du
    return 0.1 + 0.03 * real'(x * 16 / H) + 0.05 * real'(y * 8 / V) + 0.0001 * real'(x % (H / 16 + 1));
  endfunction
  function automatic int amp_of(int s, int x, int y, int t);
    real base, a;
    base = (s < 4) ? (dark(x, y) ? 20.0 : 1400.0) : (dark(x, y) ? 5.0 : 120.0);
    a = base * real'(t) / 2400.0;
    if (a > 1900.0) a = 1900.0;
    return int'(a);
  endfunction

  int t_set [NSETS];

  // ---------------- sensor ----------------
  realtime set_start [NSETS];
  task automatic send_set(int s);
    t_set[s] = int'(t_int);
    set_start[s] = $realtime;
    for (int k = 0; k < 4; k++) begin
      @(negedge dclk); tcmi_vsync = 1;
      repeat (2) @(negedge dclk);
      for (int y = 0; y < V; y++) begin
        for (int x = 0; x < H; x++) begin
          real ph, a, v;
          a = real'(amp_of(s, x, y, t_set[s]));
          if (s < 4) ph = 2.0 * PI * d_single(x, y);
          else begin
            ph = d_ext(x, y) * ((s % 2 == 0) ? 4.0 : 3.0);
            ph = 2.0 * PI * (ph - $floor(ph));
          end
          case (k)
            0: v = 2048.0 - a * $sin(ph);
            1: v = 2048.0 - a * $cos(ph);
            2: v = 2048.0 + a * $sin(ph);
            default: v = 2048.0 + a * $cos(ph);
          endcase
          @(negedge dclk);
          tcmi_hsync = 1; tcmi_data = 12'(int'(v));   // int'() rounds
        end
        @(negedge dclk); tcmi_hsync = 0;
        repeat (4) @(negedge dclk);
      end
      tcmi_vsync = 0;
      repeat (6) @(negedge dclk);
    end
  endtask

  // ---------------- filter settings per output frame ----------------
  function automatic morph_mode_e f_morph(int f);
    case (f % 6)
      0: return MORPH_ERODE;  1: return MORPH_DILATE; 2: return MORPH_PASS;
      3: return MORPH_ERODE;  4: return MORPH_PASS;   default: return MORPH_DILATE;
    endcase
  endfunction
  function automatic bit f_median(int f);
    return (f % 6 == 0) || (f % 6 == 2) || (f % 6 == 4);
  endfunction
  function automatic bit f_dual(int f);
    return f >= 4;
  endfunction
  function automatic logic [11:0] f_ampmin(int f);
    return f_dual(f) ? 12'd20 : 12'd100;
  endfunction

  function automatic void apply_cfg(int f);
    cfg.morph_mode = f_morph(f);
    cfg.median_en  = f_median(f);
    cfg.dual_freq  = f_dual(f);
    cfg.amp_min    = f_ampmin(f);
  endfunction

  // d_temp = 256 * (mean(98,102,99,101) - 0) >>> 8 = 100
  localparam int D_OFFSET = 50000, D_TEMP = 100;

  // ---------------- reference ----------------
  function automatic longint ref_val(int f, int x, int y);
    if (f_dual(f)) return longint'(d_ext(x, y) * 16777216.0 + 0.5);
    return (longint'(d_single(x, y) * 16777216.0 + 0.5) + D_OFFSET + D_TEMP) % 16777216;
  endfunction

  function automatic bit ref_valid(int f, int x, int y);
    int s, t;
    s = f_dual(f) ? 4 + 2 * (f - 4) : f;      // set whose amplitude is used
    t = t_set[s];
    return amp_of(s, x, y, t) >= int'(f_ampmin(f));
  endfunction

  int px_err = 0, frames_checked = 0;
  task automatic check_frame(int f, logic [23:0] got [NP]);
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        longint e, diff, tol;
        int amin;
        bit m;
        logic [23:0] g;
        g = got[y * H + x];
        e = 0; m = 0;
        if (x >= 2 && y >= 2) begin
          int cx, cy, nv;
          longint w [9];
          cx = x - 1; cy = y - 1; nv = 0;
          for (int j = -1; j <= 1; j++)
            for (int i = -1; i <= 1; i++) begin
              nv += ref_valid(f, cx + i, cy + j);
              w[(j + 1) * 3 + i + 1] = ref_val(f, cx + i, cy + j);
            end
          case (f_morph(f))
            MORPH_ERODE:  m = (nv == 9);
            MORPH_DILATE: m = (nv != 0);
            default:      m = ref_valid(f, cx, cy);
          endcase
          if (f_median(f)) begin w.sort(); e = w[4]; end
          else e = ref_val(f, cx, cy);
          // phase noise of the DCS rounding grows as 1/amplitude
          amin = 4095;
          for (int j = -1; j <= 1; j++)
            for (int i = -1; i <= 1; i++) begin
              int ss;
              ss = f_dual(f) ? 4 + 2 * (f - 4) : f;
              if (amp_of(ss, cx + i, cy + j, t_set[ss]) < amin) amin = amp_of(ss, cx + i, cy + j, t_set[ss]);
            end
        end
        checks++;
        if (!m) begin
          if (g != 0) begin failures++; px_err++; if (px_err < 10) $display("frame %0d (%0d,%0d): got %0d, expected 0", f, x, y, g); end
        end else begin
          tol = (f_dual(f) ? 40000 : 8000) + longint'(16777216.0 / (2.0 * PI * real'(amin + 1)));
          diff = longint'(g) - e;
          if (diff > 8388608) diff -= 16777216;
          if (diff < -8388608) diff += 16777216;
          if (diff > tol || diff < -tol) begin
            failures++; px_err++;
            if (px_err < 10) $display("frame %0d (%0d,%0d): got %0d, expected %0d", f, x, y, g, e);
          end
        end
      end
    frames_checked++;
  endtask

  // ---------------- FX3 socket model and output decoding ----------------
  bit blocked = 0, held = 0;
  realtime frame_end [NSETS];
  int level = 0, fx3_stall = 0, fx3_words = 0, out_frames = 0, npx = 0;
  logic [55:0] bits = '0;
  int nb = 0;
  logic [23:0] fbuf [NP];
  always @(posedge clk) begin
    if (!rst_n) begin level = 0; fx3_flaga <= 1'b0; end
    else begin
      if (!fx3_slwr_n) begin
        level++; fx3_words++;
        bits = bits | (56'(fx3_dq) << nb); nb += 32;
        while (nb >= 24) begin
          if (npx < NP) fbuf[npx] = bits[23:0];
          npx++; bits = bits >> 24; nb -= 24;
        end
        if (!fx3_pktend_n) begin
          if (out_frames < NSETS) frame_end[out_frames] = $realtime;
          checks++;
          if (npx != NP || nb != 0) begin failures++; $display("frame %0d: %0d pixels", out_frames, npx); end
          check_frame(out_frames, fbuf);
          out_frames++;
          npx = 0; bits = '0; nb = 0;
          apply_cfg(out_frames);
        end
      end
      // the socket drains slowly and is unavailable for a while now and then
      if (FAST_USB) begin
        if (level > 0) level--;
      end else begin
        if (level > 0 && $urandom_range(7) == 0 && !blocked) level--;
        if ($urandom_range(999) == 0) blocked = 1;
        else if (blocked && $urandom_range(199) == 0) blocked = 0;
      end
      checks++;
      if (level > 64) begin failures++; $display("FX3 socket overflow"); end
      fx3_flaga <= ((64 - level) >= 4) && !blocked && !held;
      if (dut.u_fx3.in_valid && !dut.u_fx3.in_ready) fx3_stall++;
    end
  end

  // ---------------- point cloud ----------------
  // Each pixel gets a random direction vector; the points of the
  // single-frequency sets are checked against the scene distance in mm.
  logic [2:0][15:0] vecs [NP];
  int pc_n = 0, pc_frames = 0, pc_err = 0;
  always @(posedge clk) if (rst_n && pc_valid) begin
    if (pc_frames < 4) begin
      int x, y;
      real dm, tol;
      x = pc_n % H; y = pc_n / H;
      dm = real'((longint'(d_single(x, y) * 16777216.0 + 0.5) + D_OFFSET + D_TEMP) % 16777216)
           * 6250.0 / 16777216.0;
      tol = (8000.0 + 16777216.0 / (2.0 * PI * real'(amp_of(pc_frames, x, y, t_set[pc_frames]) + 1)))
            * 6250.0 / 16777216.0 + 2.0;
      for (int c = 0; c < 3; c++) begin
        real v, e, g;
        v = real'($signed(vecs[pc_n][c])) / 32768.0;
        e = dm * v;
        g = real'(c == 0 ? pc_x : c == 1 ? pc_y : pc_z);
        checks++;
        if (g - e > tol * (v < 0 ? -v : v) + 1.0 || e - g > tol * (v < 0 ? -v : v) + 1.0) begin
          failures++; pc_err++;
          if (pc_err < 10) $display("point %0d of frame %0d, axis %0d: got %0d, expected %0.1f", pc_n, pc_frames, c, int'(g), e);
        end
      end
    end
    pc_n++;
    if (pc_n == NP) begin pc_n = 0; pc_frames++; end
  end

  // centre-ROI mean and spread of the single-frequency sets against the scene:
  // the mean within the average pixel tolerance, the standard deviation within
  // the largest one (noise adds at most its RMS value to the spread)
  int roi_frames = 0;
  always @(posedge clk) if (rst_n && roi_valid) begin
    if (roi_frames < 4) begin
      real s1, s2, tsum, tmax, em, esd, gsd;
      s1 = 0; s2 = 0; tsum = 0; tmax = 0;
      for (int y = (V - ROI) / 2; y < (V - ROI) / 2 + ROI; y++)
        for (int x = (H - ROI) / 2; x < (H - ROI) / 2 + ROI; x++) begin
          real e, t;
          e = real'(ref_val(roi_frames, x, y));
          t = 8000.0 + 16777216.0 / (2.0 * PI * real'(amp_of(roi_frames, x, y, t_set[roi_frames]) + 1));
          s1 += e; s2 += e * e; tsum += t;
          if (t > tmax) tmax = t;
        end
      em = s1 / real'(ROI * ROI);
      esd = $sqrt(s2 / real'(ROI * ROI) - em * em);
      gsd = $sqrt(real'(roi_var));
      checks += 2;
      if (real'(roi_mean) - em > tsum / real'(ROI * ROI) || em - real'(roi_mean) > tsum / real'(ROI * ROI)) begin
        failures++; $display("ROI mean of frame %0d: got %0d, expected %0.0f", roi_frames, roi_mean, em);
      end
      if (gsd - esd > tmax + 2.0 || esd - gsd > tmax + 2.0) begin
        failures++; $display("ROI spread of frame %0d: got %0.0f, expected %0.0f", roi_frames, gsd, esd);
      end
    end
    roi_frames++;
  end

  // gray-scale amplitude of the single-frequency sets: A = a of the scene
  int g_n = 0, g_frames = 0;
  always @(posedge clk) if (rst_n && gray_valid) begin
    if (g_frames < 4) begin
      int e;
      e = amp_of(g_frames, g_n % H, g_n / H, t_set[g_frames]);
      checks++;
      if (int'(gray_amp) > e + 3 || int'(gray_amp) < e - 3) begin
        failures++; pc_err++;
        if (pc_err < 10) $display("amplitude %0d of frame %0d: got %0d, expected %0d", g_n, g_frames, gray_amp, e);
      end
    end
    g_n++;
    if (g_n == NP) begin g_n = 0; g_frames++; end
  end

  // one long stall during the second output frame backs the stream up to the VDMA
  initial begin
    wait (out_frames == 1 && !FAST_USB);
    repeat (NP) @(posedge clk);
    held = 1;
    repeat (20 * NP + 2000) @(posedge clk);
    held = 0;
  end

  // ---------------- mechanism counters ----------------
  int m_wr_prio = 0, m_b1_wait = 0, m_b2_throttle = 0, m_fold = 0, m_over = 0, m_weak = 0;
  int m_i2c = 0, m_dual_frames = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_vdma.rstate == 1 && dut.u_vdma.wr_pend) m_wr_prio++;
    if (dut.u_vdma.rstate == 1 && !dut.b1_space) m_b1_wait++;
    if (!dut.b1_empty && !dut.b1_pop) m_b2_throttle++;
    if (dut.b1_pop && dut.re_a < 0) m_fold++;
    if (t_update && expo_status == EXPO_OVER) m_over++;
    if (t_update && expo_status == EXPO_WEAK) m_weak++;
    if (i2c_rsp_valid) m_i2c++;
  end

  initial begin
    cfg = '0;
    cfg.d_offset = 24'(D_OFFSET);
    cfg.du_mm = 16'd6250;
    cfg.t_ref = 16'd0;
    cfg.k_temp = 16'd256;
    apply_cfg(0);
    for (int i = 0; i < NP; i++)
      for (int c = 0; c < 3; c++) vecs[i][c] = 16'($urandom_range(65535));
    #50;
    rst_n = 1; drst_n = 1;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk); vec_we = 1; vec_addr = ($clog2(NP))'(i); vec_data = vecs[i];
    end
    @(negedge clk); vec_we = 0;
    @(negedge clk); temp_update = 1; @(negedge clk); temp_update = 0;
    // one register write on the configuration bus
    @(negedge clk); i2c_cmd_valid = 1;
    @(posedge clk); while (!i2c_cmd_ready) @(posedge clk);
    @(negedge clk); i2c_cmd_valid = 0;
    for (int s = 0; s < NSETS; s++) send_set(s);
    wait (frames_checked == (NSETS <= 4 ? NSETS : 4 + (NSETS - 4) / 2));
    repeat (10) @(posedge clk);
    checks += 4;
    if (pc_frames < (NSETS < 4 ? NSETS : 4)) begin failures++; $display("only %0d point-cloud frames", pc_frames); end
    checks++;
    if (roi_frames < (NSETS < 4 ? NSETS : 4)) begin failures++; $display("only %0d ROI results", roi_frames); end
    if (tcmi_overflow) begin failures++; $display("TCMI FIFO overflow"); end
    if (vdma_overrun) begin failures++; $display("VDMA overrun"); end
    if (dut.d_temp != 24'(D_TEMP)) begin failures++; $display("temperature term %0d", dut.d_temp); end
    if (FAST_USB) begin
      // with a free USB link, depth frames must leave as fast as DCS sets arrive
      for (int f = 1; f < NSETS; f++) begin
        realtime t_in, t_out;
        t_in  = set_start[f] - set_start[f - 1];
        t_out = frame_end[f] - frame_end[f - 1];
        $display("set %0d: sensor set period %0.1f us, depth frame period %0.1f us, %0.1f frames/s",
                 f, t_in / 1000.0, t_out / 1000.0, 1.0e9 / t_out);
        checks++;
        if (t_out > t_in * 1.01) begin failures++; $display("output falls behind the sensor"); end
        checks++;
        if (1.0e9 / t_out < 131.0) begin failures++; $display("below 131 frames/s"); end
      end
    end
    $display("mechanisms: write priority %0d, BRAM1 full %0d, BRAM2 throttle %0d, FX3 flag stall %0d,",
             m_wr_prio, m_b1_wait, m_b2_throttle, fx3_stall);
    $display("  quadrant fold %0d, over-exposed %0d, weak %0d, I2C transfers %0d, frames %0d, point frames %0d, t_int %0d",
             m_fold, m_over, m_weak, m_i2c, frames_checked, pc_frames, t_int);
    if (MECH) begin
      checks += 9;
      if (m_wr_prio == 0) begin failures++; $display("no write-priority stall"); end
      if (m_b1_wait == 0) begin failures++; $display("BRAM1 never full"); end
      if (m_b2_throttle == 0) begin failures++; $display("BRAM2 never throttled"); end
      if (fx3_stall == 0) begin failures++; $display("FX3 never stalled"); end
      if (m_fold == 0) begin failures++; $display("no left-half-plane vector"); end
      if (m_over == 0) begin failures++; $display("never over-exposed"); end
      if (m_weak == 0) begin failures++; $display("never weak"); end
      if (m_i2c == 0) begin failures++; $display("no I2C transfer"); end
      if (frames_checked < 6) begin failures++; $display("two-frequency frames missing"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * NP * NSETS + 200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d frames checked", frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
