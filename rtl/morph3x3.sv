// morph3x3: binary morphology on a 3x3 window with a full 3x3 structuring
// element. Erosion keeps an object pixel only if all nine inputs are one
// (AND), dilation sets it if any input is one (OR); each is formed as three
// row terms combined, the way the source writes it. MORPH_PASS returns the
// centre pixel. Purely combinational; the mode select is this design's.
module morph3x3
  import tof_pkg::*;
(
  input  logic [8:0]   win,      // win[0] top-left .. win[8] bottom-right
  input  morph_mode_e  mode,
  output logic         out
);
  logic p1, p2, p3, q1, q2, q3;
  always_comb begin
    p1 = win[0] & win[1] & win[2];
    p2 = win[3] & win[4] & win[5];
    p3 = win[6] & win[7] & win[8];
    q1 = win[0] | win[1] | win[2];
    q2 = win[3] | win[4] | win[5];
    q3 = win[6] | win[7] | win[8];
    unique case (mode)
      MORPH_ERODE:  out = p1 & p2 & p3;
      MORPH_DILATE: out = q1 | q2 | q3;
      default:      out = win[4];
    endcase
  end
endmodule
