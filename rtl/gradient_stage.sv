// gradient_stage - Roberts cross gradient of a raster pixel stream.
//
// For every input pixel P(m,n) it produces
//   G(m,n) = |P(m-1,n-1) - P(m,n)| + |P(m-1,n) - P(m,n-1)|
// from a 2x2 window (one line buffer plus two pixels). Two subtractors form the
// differences and one adder sums their magnitudes. The sum can reach
// 2*(2^W-1); this design saturates it to W bits so that the gradient image
// keeps the pixel width of the original image, and gives pixels in the first
// row or column, whose window leaves the image, a gradient of 0.
//
// Timing: one pixel per accepted cycle. The result for pixel k is registered
// at the clock edge that accepts pixel k+1 (a delay of one pixel) and valid_o
// pulses for one cycle after that edge.
module gradient_stage #(
  parameter int unsigned W     = 8,
  parameter int unsigned LINE  = 512,
  parameter int unsigned LINES = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] pix_i,
  output logic         valid_o,
  output logic [W-1:0] grad_o
);

  logic [W-1:0] win    [2][2];
  logic         in_img [2][2];
  logic         primed;

  window_gen #(.W(W), .K(2), .C(1), .LINE(LINE), .LINES(LINES)) u_win (
    .clk, .rst_n, .valid_i, .pix_i,
    .win_o(win), .inside_o(in_img), .primed_o(primed),
    .crow_o(), .ccol_o()
  );

  logic [W-1:0] d0, d1;
  logic [W:0]   sum;
  logic [W-1:0] grad;

  always_comb begin
    d0   = (win[0][0] > win[1][1]) ? win[0][0] - win[1][1] : win[1][1] - win[0][0];
    d1   = (win[0][1] > win[1][0]) ? win[0][1] - win[1][0] : win[1][0] - win[0][1];
    sum  = {1'b0, d0} + {1'b0, d1};
    grad = sum[W] ? '1 : sum[W-1:0];
    if (!in_img[0][0]) grad = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      grad_o  <= '0;
    end else begin
      valid_o <= valid_i && primed;
      if (valid_i) grad_o <= grad;
    end
  end

  // Stream rule: a result leaves only on the cycle after an accepted pixel.
  a_valid_follows_input: assert property (
    @(posedge clk) disable iff (!rst_n) valid_o |-> $past(valid_i));

endmodule
