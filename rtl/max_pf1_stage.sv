// max_pf1_stage - second processing stage: local maximum and pathfinder I.
//
// Takes the gradient image as a raster stream and forms a 5x5 window around
// each pixel (4 line buffers + 5 pixels). The local-maximum criterion is
// evaluated on the whole window and the pathfinder I criterion on its inner
// 3x3 part; when both hold the output is the centre (gradient) value,
// otherwise 0. The output image therefore keeps the grey levels of the input.
//
// Timing: one pixel per accepted cycle. The centre of the window lags the
// newest pixel by 2 lines + 2 pixels; two register stages (criteria, then the
// output selection) bring the delay to 2 lines + 4 pixels: the result for
// pixel k is registered at the edge that accepts pixel k + 2*LINE + 4, and
// valid_o pulses for one cycle after that edge. All registers advance only on
// accepted pixels.
module max_pf1_stage #(
  parameter int unsigned W          = 8,
  parameter int unsigned LINE       = 512,
  parameter int unsigned LINES      = 512,
  parameter int unsigned TOP_N      = 5,
  parameter int unsigned THRESH_PCT = 10,
  parameter int unsigned RANK       = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] pix_i,
  output logic         valid_o,
  output logic [W-1:0] pix_o,
  // per-result status, aligned with pix_o
  output logic         lm_ok_o,     // local maximum criterion held
  output logic         pf_ok_o      // pathfinder I criterion held
);

  logic [W-1:0] win5   [5][5];
  logic         primed;
  logic [W-1:0] win3   [3][3];
  logic         lm_ok, pf_ok;

  window_gen #(.W(W), .K(5), .C(2), .LINE(LINE), .LINES(LINES)) u_win (
    .clk, .rst_n, .valid_i, .pix_i,
    .win_o(win5), .inside_o(), .primed_o(primed),
    .crow_o(), .ccol_o()
  );

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win3[r][c] = win5[r+1][c+1];

  local_max #(.W(W), .TOP_N(TOP_N), .THRESH_PCT(THRESH_PCT)) u_lm (
    .win(win5), .ok_o(lm_ok), .above_thresh_o(), .count_ge_o()
  );

  pathfinder1 #(.W(W), .RANK(RANK)) u_pf1 (
    .win(win3), .ok_o(pf_ok), .best_centre_o(), .beaten_o()
  );

  // stage A: criteria
  logic         a_valid, a_lm, a_pf;
  logic [W-1:0] a_centre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid  <= 1'b0;
      a_lm     <= 1'b0;
      a_pf     <= 1'b0;
      a_centre <= '0;
      valid_o  <= 1'b0;
      pix_o    <= '0;
      lm_ok_o  <= 1'b0;
      pf_ok_o  <= 1'b0;
    end else begin
      valid_o <= valid_i && a_valid;
      if (valid_i) begin
        a_valid  <= primed;
        a_lm     <= lm_ok;
        a_pf     <= pf_ok;
        a_centre <= win5[2][2];
        // stage B: output selection
        pix_o    <= (a_lm && a_pf) ? a_centre : '0;
        lm_ok_o  <= a_lm;
        pf_ok_o  <= a_pf;
      end
    end
  end

  // Stream rule: a result leaves only on the cycle after an accepted pixel.
  a_valid_follows_input: assert property (
    @(posedge clk) disable iff (!rst_n) valid_o |-> $past(valid_i));

endmodule
