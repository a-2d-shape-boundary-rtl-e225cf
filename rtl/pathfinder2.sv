// pathfinder2 - pathfinder II criterion on a 3x3 window (combinational).
//
// Uses the 28 paths of bd_pkg with at least three pixels, valued like
// pathfinder I: S = (12/N) * (sum of the path's pixels). A comparison tree
// finds the best value Mc of the 12 paths through the centre; 16 comparators
// test each path that avoids the centre against Mc, and a 16-input NOR of the
// "greater" results tells whether the centre path is unbeaten. The centre is
// a border pixel (on_o = 1) when no other path reaches Mc. When the best other
// path equals Mc exactly (a tie between the two best paths), the tie is
// broken by position: the pixel is kept if the three pixels of the
// upper-right corner, (0,1)+(0,2)+(1,2), add up to more than the three of the
// lower-left corner, (1,0)+(2,0)+(2,1). This keeps only one pixel of two
// parallel candidates and so gives a one-pixel-wide line.
//
// pix_o: with binary_i = 1 it is 1 for a border pixel and 0 otherwise (the
// final, binary border image); with binary_i = 0 it is the centre value for a
// border pixel and 0 otherwise (a cleaning pass that keeps grey levels).
module pathfinder2
  import bd_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] win [3][3],
  input  logic         binary_i,
  output logic         on_o,
  output logic         tie_o,        // Mc == Mo, tie-break rule applied
  output logic [W-1:0] pix_o
);

  localparam int unsigned NUM_OTHER = NUM_LONG_PATHS - NUM_CENTRE;  // 16

  logic [W+3:0]         s [NUM_LONG_PATHS];
  logic [W+3:0]         mc;
  logic [NUM_OTHER-1:0] gt, eq;
  logic                 unbeaten;
  logic [W+1:0]         ur, ll;

  always_comb begin
    for (int p = 0; p < NUM_LONG_PATHS; p++) begin
      logic [W+1:0] acc;
      acc = '0;
      for (int i = 0; i < 9; i++)
        if (PATH_MASK[p][i]) acc = acc + (W+2)'(win[i/3][i%3]);
      s[p] = (W+4)'(acc * path_weight(PATH_MASK[p]));
    end
    mc = s[0];
    for (int p = 1; p < NUM_CENTRE; p++)
      if (s[p] > mc) mc = s[p];
    for (int i = 0; i < NUM_OTHER; i++) begin
      gt[i] = s[NUM_CENTRE + i] >  mc;
      eq[i] = s[NUM_CENTRE + i] == mc;
    end
    unbeaten = ~|gt;
    ur    = (W+2)'(win[0][1]) + (W+2)'(win[0][2]) + (W+2)'(win[1][2]);
    ll    = (W+2)'(win[1][0]) + (W+2)'(win[2][0]) + (W+2)'(win[2][1]);
    tie_o = unbeaten && (|eq);
    on_o  = unbeaten && (!tie_o || (ur > ll));
    if (!on_o)         pix_o = '0;
    else if (binary_i) pix_o = W'(1);
    else               pix_o = win[1][1];
  end

endmodule
