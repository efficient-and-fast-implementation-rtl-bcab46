// auto_integration: automatic integration-time control from the amplitude.
//
// The amplitude of every pixel of a frame is summed. At the last pixel of
// the frame the sum is compared with AMP_LO*NPIX and AMP_HI*NPIX, i.e. the
// frame mean with the good band [AMP_LO, AMP_HI] (100..1200 LSB). Inside the
// band nothing changes. Outside it, since amplitude grows in proportion to
// integration time, the next time is set to
//   t_next = t_int * AMP_TARGET * NPIX / sum       (= t_int*AMP_TARGET/mean)
// computed by a restoring divider (one quotient bit per clock), clamped to
// [T_MIN, T_MAX] and announced with a one-cycle t_update pulse, for the
// configuration processor to write to the sensor. With auto_en low the
// verdict is still reported but t_int is held.
// Timing: t_update comes QW+2 cycles after the frame's last pixel; a frame
// ending while the divider runs is not evaluated.
// The band and the proportional rule follow the source; AMP_TARGET, the
// clamp limits and the divider are choices of this design.
module auto_integration
  import tof_pkg::*;
#(
  parameter int unsigned AMP_LO     = 100,
  parameter int unsigned AMP_HI     = 1200,
  parameter int unsigned AMP_TARGET = 650,
  parameter int unsigned T_INIT     = 2400,
  parameter int unsigned T_MIN      = 800,
  parameter int unsigned T_MAX      = 4000,
  parameter int unsigned NPIX       = 76800
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              auto_en,
  input  logic              amp_valid,
  input  logic [AMP_W-1:0]  amp,
  input  logic              amp_eof,
  output logic [15:0]       t_int,
  output logic              t_update,
  output expo_e             status,
  output logic [15:0]       n_adjust
);
  localparam int unsigned SW = 40;            // amplitude sum
  localparam int unsigned QW = 48;            // numerator / quotient

  logic [SW-1:0] acc, total;
  logic          busy;
  logic [QW-1:0] num;       // shifts out into the quotient
  logic [SW:0]   rem;
  logic [6:0]    step;

  localparam logic [SW-1:0] LO_SUM = SW'(AMP_LO) * SW'(NPIX);
  localparam logic [SW-1:0] HI_SUM = SW'(AMP_HI) * SW'(NPIX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; total <= '0; busy <= 1'b0; num <= '0; rem <= '0; step <= '0;
      t_int <= 16'(T_INIT); t_update <= 1'b0; status <= EXPO_GOOD; n_adjust <= '0;
    end else begin
      t_update <= 1'b0;
      if (amp_valid) acc <= amp_eof ? '0 : acc + SW'(amp);
      if (amp_valid && amp_eof && !busy) begin
        logic [SW-1:0] s;
        s = acc + SW'(amp);
        total <= s;
        if (s < LO_SUM || s > HI_SUM) begin
          status <= (s < LO_SUM) ? EXPO_WEAK : EXPO_OVER;
          if (auto_en) begin
            busy <= 1'b1;
            step <= '0;
            rem  <= '0;
            num  <= QW'(t_int) * QW'(AMP_TARGET) * QW'(NPIX);
          end
        end else begin
          status <= EXPO_GOOD;
        end
      end
      if (busy) begin
        // restoring division num / total, one bit per cycle
        logic [SW:0] r;
        r = {rem[SW-1:0], num[QW-1]};
        if (r >= {1'b0, total}) begin
          rem <= r - {1'b0, total};
          num <= {num[QW-2:0], 1'b1};
        end else begin
          rem <= r;
          num <= {num[QW-2:0], 1'b0};
        end
        step <= step + 1'b1;
        if (step == 7'(QW - 1)) busy <= 1'b0;
      end
      if (step == 7'(QW) && !busy) begin
        logic [QW-1:0] q;
        q = (total == '0) ? QW'(T_MAX) : num;
        if (q < QW'(T_MIN)) t_int <= 16'(T_MIN);
        else if (q > QW'(T_MAX)) t_int <= 16'(T_MAX);
        else t_int <= 16'(q);
        t_update <= 1'b1;
        n_adjust <= n_adjust + 1'b1;
        step <= '0;
      end
    end
  end
endmodule
