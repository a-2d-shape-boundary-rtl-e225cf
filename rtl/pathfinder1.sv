// pathfinder1 - pathfinder I criterion on a 3x3 window (combinational).
//
// Decides whether the centre pixel lies on a continuous border line crossing
// the window. All 44 paths of bd_pkg are valued with
//   S = (12/N) * (sum of the N pixels of the path),
// which is an integer for N = 1..4 (weights 12, 6, 4, 3). A comparison tree
// finds the largest value M among the 12 paths through the centre; 32
// comparators flag the other paths whose value is strictly greater than M;
// the flags are counted and the criterion holds when fewer than RANK paths
// beat M, i.e. when the centre lies on one of the RANK (6) best paths.
// Treating equal values as not beating M is this design's choice.
module pathfinder1
  import bd_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned RANK = 6
) (
  input  logic [W-1:0]   win [3][3],
  output logic           ok_o,
  output logic [W+3:0]   best_centre_o,  // M
  output logic [5:0]     beaten_o        // paths not through the centre with S > M
);

  logic [W+3:0] s [NUM_PATHS];

  always_comb begin
    for (int p = 0; p < NUM_PATHS; p++) begin
      logic [W+1:0] acc;
      acc = '0;
      for (int i = 0; i < 9; i++)
        if (PATH_MASK[p][i]) acc = acc + (W+2)'(win[i/3][i%3]);
      s[p] = (W+4)'(acc * path_weight(PATH_MASK[p]));
    end
    best_centre_o = s[0];
    for (int p = 1; p < NUM_CENTRE; p++)
      if (s[p] > best_centre_o) best_centre_o = s[p];
    beaten_o = '0;
    for (int p = NUM_CENTRE; p < NUM_PATHS; p++)
      if (s[p] > best_centre_o) beaten_o = beaten_o + 6'd1;
    ok_o = beaten_o < 6'(RANK);
  end

endmodule
