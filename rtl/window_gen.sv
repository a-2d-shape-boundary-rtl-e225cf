// window_gen - KxK neighbourhood former for a raster pixel stream.
//
// Pixels arrive one per accepted cycle (valid_i), line after line, LINE pixels
// per line and LINES lines per frame, frames back to back; the first pixel
// after reset is pixel (0,0) of a frame. K-1 line buffers hold the previous
// lines and a KxK register array holds the window: (K-1) lines + K pixels of
// storage, the storage figures of the data-flow window sizes this detector
// uses (2x2, 3x3, 5x5).
//
// win_o[r][c] is the window as it stands after the last accepted pixel. Row
// K-1, column K-1 is the newest pixel; element (r,c) lies at offset (r-C, c-C)
// from the window's reference ("centre") pixel, so C = (K-1)/2 gives a
// centred window and C = K-1 a window whose reference is the newest pixel.
// The former tracks the image coordinates of the reference pixel; any window
// element that falls outside the image (above, below, left or right of it,
// including pixels that wrapped in from the neighbouring line or frame) is
// presented as 0 and flagged 0 in inside_o. This zero padding at the image
// border is a choice of this design.
//
// primed_o is 1 once the reference pixel of the window is a real pixel, i.e.
// after D+1 pixels, D = (K-1-C)*(LINE+1). The reference lags the newest pixel
// by D pixels. crow_o/ccol_o give its row and column. All state advances only
// in cycles with valid_i = 1, so the stream may pause at any time.
module window_gen #(
  parameter int unsigned W     = 8,
  parameter int unsigned K     = 3,
  parameter int unsigned C     = 1,
  parameter int unsigned LINE  = 512,
  parameter int unsigned LINES = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid_i,
  input  logic [W-1:0]             pix_i,
  output logic [W-1:0]             win_o    [K][K],
  output logic                     inside_o [K][K],
  output logic                     primed_o,
  output logic [$clog2(LINES)-1:0] crow_o,
  output logic [$clog2(LINE)-1:0]  ccol_o
);

  localparam int unsigned A  = K - 1 - C;          // rows/cols from reference to newest
  localparam int unsigned D  = A * (LINE + 1);     // lag of the reference pixel
  localparam int unsigned CW = $clog2(LINE);
  localparam int unsigned RW = $clog2(LINES);
  localparam int unsigned PW = $clog2(D + 2);

  // Reset position of the reference pixel: stream index -(D+1) modulo the frame.
  localparam logic [RW-1:0] CROW_INIT = RW'(LINES - 1 - A);
  localparam logic [CW-1:0] CCOL_INIT = CW'(LINE - (A + 1));

  logic [W-1:0]    win_q [K][K];
  logic [W-1:0]    new_col [K];
  logic [CW-1:0]   wcol_q;
  logic [RW-1:0]   crow_q;
  logic [CW-1:0]   ccol_q;
  logic [PW-1:0]   fill_q;

  // Line memories: buffer j holds line "newest row - 1 - j".
  if (K > 1) begin : g_lines
    logic [W-1:0] rd [K-1];
    for (genvar j = 0; j < K - 1; j++) begin : g_lb
      line_buffer #(.W(W), .LINE(LINE)) u_lb (
        .clk   (clk),
        .we    (valid_i),
        .addr  (wcol_q),
        .wdata (j == 0 ? pix_i : rd[j == 0 ? 0 : j - 1]),
        .rdata (rd[j])
      );
    end
    always_comb begin
      new_col[K-1] = pix_i;
      for (int j = 0; j < K - 1; j++) new_col[K-2-j] = rd[j];
    end
  end else begin : g_nolines
    always_comb new_col[0] = pix_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) win_q[r][c] <= '0;
      wcol_q <= '0;
      crow_q <= CROW_INIT;
      ccol_q <= CCOL_INIT;
      fill_q <= '0;
    end else if (valid_i) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win_q[r][c] <= win_q[r][c+1];
        win_q[r][K-1] <= new_col[r];
      end
      wcol_q <= (wcol_q == CW'(LINE - 1)) ? '0 : wcol_q + 1'b1;
      if (ccol_q == CW'(LINE - 1)) begin
        ccol_q <= '0;
        crow_q <= (crow_q == RW'(LINES - 1)) ? '0 : crow_q + 1'b1;
      end else begin
        ccol_q <= ccol_q + 1'b1;
      end
      if (fill_q != PW'(D + 1)) fill_q <= fill_q + 1'b1;
    end
  end

  // Border masking relative to the reference pixel.
  always_comb begin
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        automatic int row = int'(crow_q) + r - int'(C);
        automatic int col = int'(ccol_q) + c - int'(C);
        inside_o[r][c] = (row >= 0) && (row < int'(LINES)) &&
                         (col >= 0) && (col < int'(LINE));
        win_o[r][c]    = inside_o[r][c] ? win_q[r][c] : '0;
      end
    end
  end

  assign primed_o = (fill_q == PW'(D + 1));
  assign crow_o   = crow_q;
  assign ccol_o   = ccol_q;

  // The write column and the reference coordinates stay inside the frame.
  a_counters_in_range: assert property (
    @(posedge clk) disable iff (!rst_n)
      (int'(wcol_q) < int'(LINE)) && (int'(ccol_q) < int'(LINE)) && (int'(crow_q) < int'(LINES)));

endmodule
