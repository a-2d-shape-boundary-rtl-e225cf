// local_max - local maximum criterion on a 5x5 window (combinational).
//
// The criterion holds when the centre pixel exceeds THRESH_PCT percent of the
// full-scale value 2^W-1 and is among the TOP_N biggest values of the window.
// As in the comparator structure it is built from, each of the 24 peripheral
// pixels is compared with the centre ("greater than or equal"), the 24 result
// bits are added, and the count is compared with TOP_N: the centre is among
// the TOP_N biggest when fewer than TOP_N neighbours are >= it. Ties thus count
// against the centre, so a flat patch never passes.
module local_max #(
  parameter int unsigned W          = 8,
  parameter int unsigned TOP_N      = 5,
  parameter int unsigned THRESH_PCT = 10
) (
  input  logic [W-1:0] win [5][5],
  output logic         ok_o,
  output logic         above_thresh_o,  // centre > THRESH_PCT % of full scale
  output logic [4:0]   count_ge_o       // neighbours >= centre
);

  localparam int unsigned FULL = (1 << W) - 1;

  always_comb begin
    count_ge_o = '0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        if (!(r == 2 && c == 2) && (win[r][c] >= win[2][2]))
          count_ge_o = count_ge_o + 5'd1;
    // centre / (2^W-1) > THRESH_PCT / 100, in integers
    above_thresh_o = (32'(win[2][2]) * 100) > (FULL * THRESH_PCT);
    ok_o = above_thresh_o && (count_ge_o < 5'(TOP_N));
  end

endmodule
