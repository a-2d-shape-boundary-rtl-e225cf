// boundary_detector - data-flow 2D shape boundary detector.
//
// Turns a grey-level raster image into a one-pixel-wide binary border image,
// one pixel per accepted cycle, with three kinds of processing stage in a row:
//   1. gradient_stage : Roberts cross gradient (2x2 window)
//   2. max_pf1_stage  : local maximum (5x5) and pathfinder I (3x3); keeps the
//                       gradient value of pixels that pass both, else 0
//                       ("first border image")
//   3. pf2_stage      : pathfinder II (3x3); NUM_PF2 of them in a chain. All
//                       but the last only clear non-border pixels; the last
//                       one produces the binary border image.
// One pathfinder II stage is the basic configuration; a low-contrast image may
// need two (NUM_PF2 = 2).
//
// Interface: pix_i/valid_i is the input raster stream, frames of LINES lines
// of LINE pixels, back to back, starting with pixel (0,0) after reset. Each
// intermediate image leaves on its own valid-qualified port so that it can be
// observed. No handshake back-pressure: the stream pauses when valid_i is 0.
//
// Timing: every stage delays the image by a whole number of pixels and all
// registers advance only on accepted pixels, so the output for input pixel k
// leaves after pixel k + DELAY has been accepted, with
//   DELAY = 1 + (2*LINE + 4) + NUM_PF2*(LINE + 2),
// plus one clock cycle per stage boundary. The last lines of a frame are
// therefore pushed out by the first lines of the next one.
module boundary_detector #(
  parameter int unsigned W          = 8,    // bits per pixel
  parameter int unsigned LINE       = 512,  // pixels per line
  parameter int unsigned LINES      = 512,  // lines per frame
  parameter int unsigned TOP_N      = 5,    // local maximum: rank of centre
  parameter int unsigned THRESH_PCT = 10,   // local maximum: threshold, % of full scale
  parameter int unsigned RANK       = 6,    // pathfinder I: number of best paths
  parameter int unsigned NUM_PF2    = 1     // chained pathfinder II stages
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] pix_i,
  // gradient image
  output logic         grad_valid_o,
  output logic [W-1:0] grad_o,
  // first border image (local maximum & pathfinder I)
  output logic         border1_valid_o,
  output logic [W-1:0] border1_o,
  // final border image (last pathfinder II stage, binary)
  output logic         border_valid_o,
  output logic         border_o
);

  gradient_stage #(.W(W), .LINE(LINE), .LINES(LINES)) u_grad (
    .clk, .rst_n, .valid_i, .pix_i,
    .valid_o(grad_valid_o), .grad_o(grad_o)
  );

  max_pf1_stage #(
    .W(W), .LINE(LINE), .LINES(LINES),
    .TOP_N(TOP_N), .THRESH_PCT(THRESH_PCT), .RANK(RANK)
  ) u_max_pf1 (
    .clk, .rst_n,
    .valid_i(grad_valid_o), .pix_i(grad_o),
    .valid_o(border1_valid_o), .pix_o(border1_o),
    .lm_ok_o(), .pf_ok_o()
  );

  logic         v   [NUM_PF2+1];
  logic [W-1:0] p   [NUM_PF2+1];
  logic         e   [NUM_PF2+1];

  assign v[0] = border1_valid_o;
  assign p[0] = border1_o;
  assign e[0] = 1'b0;

  for (genvar s = 0; s < NUM_PF2; s++) begin : g_pf2
    pf2_stage #(.W(W), .LINE(LINE), .LINES(LINES)) u_pf2 (
      .clk, .rst_n,
      .binary_i(s == NUM_PF2 - 1),
      .valid_i(v[s]), .pix_i(p[s]),
      .valid_o(v[s+1]), .pix_o(p[s+1]), .edge_o(e[s+1]), .tie_o()
    );
  end

  assign border_valid_o = v[NUM_PF2];
  assign border_o       = e[NUM_PF2];

endmodule
