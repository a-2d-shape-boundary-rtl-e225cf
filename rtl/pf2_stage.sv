// pf2_stage - pathfinder II processing stage.
//
// Forms a 3x3 window around each pixel of its input image (2 line buffers +
// 3 pixels) and applies the pathfinder II criterion. With binary_i = 1 the
// output is the binary border image (1 = border pixel); with binary_i = 0 the
// stage only clears non-border pixels and passes border pixels unchanged, so
// that several stages can be chained, the last one binary.
//
// Timing: one pixel per accepted cycle. The window centre lags the newest
// pixel by 1 line + 1 pixel and one output register adds one more pixel: the
// result for pixel k is registered at the edge that accepts pixel
// k + LINE + 2, and valid_o pulses for one cycle after that edge. binary_i is
// expected to stay constant during a frame.
module pf2_stage #(
  parameter int unsigned W     = 8,
  parameter int unsigned LINE  = 512,
  parameter int unsigned LINES = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         binary_i,
  input  logic         valid_i,
  input  logic [W-1:0] pix_i,
  output logic         valid_o,
  output logic [W-1:0] pix_o,
  output logic         edge_o,    // border pixel
  output logic         tie_o      // decided by the tie-break rule
);

  logic [W-1:0] win    [3][3];
  logic         primed;
  logic         on, tie;
  logic [W-1:0] pix;

  window_gen #(.W(W), .K(3), .C(1), .LINE(LINE), .LINES(LINES)) u_win (
    .clk, .rst_n, .valid_i, .pix_i,
    .win_o(win), .inside_o(), .primed_o(primed),
    .crow_o(), .ccol_o()
  );

  pathfinder2 #(.W(W)) u_pf2 (
    .win(win), .binary_i(binary_i), .on_o(on), .tie_o(tie), .pix_o(pix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      pix_o   <= '0;
      edge_o  <= 1'b0;
      tie_o   <= 1'b0;
    end else begin
      valid_o <= valid_i && primed;
      if (valid_i) begin
        pix_o  <= pix;
        edge_o <= on;
        tie_o  <= tie;
      end
    end
  end

  // Stream rule: a result leaves only on the cycle after an accepted pixel.
  a_valid_follows_input: assert property (
    @(posedge clk) disable iff (!rst_n) valid_o |-> $past(valid_i));

endmodule
