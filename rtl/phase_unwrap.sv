// phase_unwrap: extends the unambiguous range with two modulation
// frequencies f_A : f_B = M_A : M_B (coprime).
//
// With phases phi_A, phi_B as BR-bit fractions (s = 2^BR), every candidate
// pair (n_A, n_B), n_A < M_A, n_B < M_B, is scored in parallel by
//   y = |(M_B*phi_A - M_A*phi_B) + s*(M_B*n_A - M_A*n_B)|
// and the pair with the smallest y wins (the first one on a tie). The output
// is n_A and the extended phase n_A*s + phi_A, i.e. the distance in units of
// du_A/s over a range of M_A*du_A.
// Timing: two register stages (scores, then the minimum), one pixel per clock.
// The score and the exhaustive search follow the source; the candidate
// ranges, the default ratio 4:3 and the pipelining are choices of this design.
module phase_unwrap #(
  parameter int unsigned BR  = 24,
  parameter int unsigned M_A = 4,
  parameter int unsigned M_B = 3,
  localparam int unsigned NA_W = (M_A > 1) ? $clog2(M_A) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [BR-1:0]         phi_a,
  input  logic [BR-1:0]         phi_b,
  output logic                  out_valid,
  output logic [NA_W-1:0]       n_a,
  output logic [BR+NA_W-1:0]    ext
);
  localparam int unsigned NC = M_A * M_B;
  localparam int unsigned YW = BR + 12;        // enough for M up to 15

  logic [YW-1:0]    y_r [NC];
  logic [BR-1:0]    phi_a_r;
  logic             v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      phi_a_r <= '0;
      for (int c = 0; c < int'(NC); c++) y_r[c] <= '0;
    end else begin
      v1 <= in_valid;
      phi_a_r <= phi_a;
      for (int na = 0; na < int'(M_A); na++) begin
        for (int nb = 0; nb < int'(M_B); nb++) begin
          logic signed [YW:0] t;
          t = (YW + 1)'(M_B) * (YW + 1)'({1'b0, phi_a}) - (YW + 1)'(M_A) * (YW + 1)'({1'b0, phi_b})
            + (((YW + 1)'(M_B * na) - (YW + 1)'(M_A * nb)) <<< BR);
          y_r[na * M_B + nb] <= YW'((t < 0) ? -t : t);
        end
      end
    end
  end

  logic [NA_W-1:0] best_na;
  always_comb begin
    logic [YW-1:0] best;
    best = y_r[0];
    best_na = '0;
    for (int c = 1; c < int'(NC); c++) begin
      if (y_r[c] < best) begin
        best = y_r[c];
        best_na = NA_W'(c / M_B);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      n_a <= '0;
      ext <= '0;
    end else begin
      out_valid <= v1;
      n_a <= best_na;
      ext <= {best_na, phi_a_r};
    end
  end
endmodule
