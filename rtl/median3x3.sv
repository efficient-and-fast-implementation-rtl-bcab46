// median3x3: median of the nine values of a 3x3 window.
// Each element's rank is counted with eight comparisons, ties broken by
// position (an element ranks above an equal one with a lower index), so
// exactly one element has rank 4: that is the median. Purely combinational.
// The filter follows the source; the rank-count structure is this design's.
module median3x3 #(
  parameter int unsigned W = 24
) (
  input  logic [8:0][W-1:0] win,
  output logic [W-1:0]      med
);
  always_comb begin
    med = win[4];
    for (int i = 0; i < 9; i++) begin
      int unsigned rank;
      rank = 0;
      for (int j = 0; j < 9; j++) begin
        if (j != i) begin
          if (win[j] < win[i] || (win[j] == win[i] && j < i)) rank++;
        end
      end
      if (rank == 4) med = win[i];
    end
  end
endmodule
