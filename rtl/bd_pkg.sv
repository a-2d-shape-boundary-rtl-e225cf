// bd_pkg - shared constants of the boundary detector.
//
// A "path" is a set of pixels of the 3x3 neighbourhood that a continuous,
// corner-free border line can occupy while crossing the window. Each path is
// stored as a 9-bit mask, bit (3*r + c) for row r (0 = top) and column c
// (0 = left). The set is the closure, under the 8 rotations/mirrorings of the
// square, of nine primitive shapes:
//   1 pixel : a corner pixel
//   2 pixels: two pixels down one edge from a corner; the two edge-centre
//             pixels next to a corner (corner cut)
//   3 pixels: centre column; main diagonal; corner-centre-edge knee;
//             edge-edge-knee (0,0)(1,0)(2,1); a whole edge column
//   4 pixels: the arc (0,0)(0,1)(1,2)(2,2) around a corner
// This gives 44 distinct paths. They are ordered so that the 12 paths through
// the centre pixel come first (indices 0..11), then the 16 paths of three or
// more pixels that avoid the centre (12..27), then the 16 shorter ones
// (28..43). Pathfinder I uses all 44, pathfinder II the first 28.
//
// Each path's value is S = (12/N) * (sum of its pixels), N its pixel count, so
// the weights are 12, 6, 4 and 3 for N = 1..4.
package bd_pkg;

  localparam int unsigned NUM_PATHS      = 44;  // pathfinder I paths
  localparam int unsigned NUM_LONG_PATHS = 28;  // pathfinder II paths (N >= 3)
  localparam int unsigned NUM_CENTRE     = 12;  // paths through the centre

  typedef logic [8:0] path_mask_t;

  localparam path_mask_t PATH_MASK [NUM_PATHS] = '{
    // through the centre: 2 straight lines, 2 diagonals, 8 knees
    9'b000111000, 9'b010010010, 9'b100010001, 9'b001010100,
    9'b000011100, 9'b000110001, 9'b001010010, 9'b001110000,
    9'b010010001, 9'b010010100, 9'b100010010, 9'b100011000,
    // around the centre, 4 pixels: corner arcs
    9'b001001110, 9'b011100100, 9'b100100011, 9'b110001001,
    // around the centre, 3 pixels: edge columns/rows and edge knees
    9'b000000111, 9'b001001001, 9'b100100100, 9'b111000000,
    9'b000001110, 9'b000100011, 9'b001001010, 9'b010001001,
    9'b010100100, 9'b011100000, 9'b100100010, 9'b110001000,
    // 2 pixels: along an edge from a corner, and corner cuts
    9'b000000011, 9'b000000110, 9'b000001001, 9'b000100100,
    9'b001001000, 9'b011000000, 9'b100100000, 9'b110000000,
    9'b000001010, 9'b000100010, 9'b010001000, 9'b010100000,
    // 1 pixel: the corners
    9'b000000001, 9'b000000100, 9'b001000000, 9'b100000000
  };

  // Weight 12/N of a path.
  function automatic int unsigned path_weight(path_mask_t m);
    return 12 / $countones(m);
  endfunction

endpackage
