// tb_window_gen - checks the window former in its three shapes (2x2 anchored
// at the newest pixel, centred 3x3 and centred 5x5) on a small frame. A random
// pixel stream with pauses runs over three frames; after every accepted pixel
// each window element is compared with the stream history: the pixel at the
// element's image position, or 0 when that position is outside the image.
// primed_o and the reference coordinates are checked as well.
module tb_window_gen;
  localparam int W = 6, LINE = 7, LINES = 5;
  logic clk = 0, rst_n = 0, valid_i = 0;
  logic [W-1:0] pix_i = 0;
  int checks = 0, failures = 0;
  int hist [$];

  logic [W-1:0] w2 [2][2]; logic i2 [2][2]; logic p2; logic [2:0] r2; logic [2:0] c2;
  logic [W-1:0] w3 [3][3]; logic i3 [3][3]; logic p3; logic [2:0] r3; logic [2:0] c3;
  logic [W-1:0] w5 [5][5]; logic i5 [5][5]; logic p5; logic [2:0] r5; logic [2:0] c5;

  window_gen #(.W(W), .K(2), .C(1), .LINE(LINE), .LINES(LINES)) u2 (
    .clk, .rst_n, .valid_i, .pix_i, .win_o(w2), .inside_o(i2), .primed_o(p2), .crow_o(r2), .ccol_o(c2));
  window_gen #(.W(W), .K(3), .C(1), .LINE(LINE), .LINES(LINES)) u3 (
    .clk, .rst_n, .valid_i, .pix_i, .win_o(w3), .inside_o(i3), .primed_o(p3), .crow_o(r3), .ccol_o(c3));
  window_gen #(.W(W), .K(5), .C(2), .LINE(LINE), .LINES(LINES)) u5 (
    .clk, .rst_n, .valid_i, .pix_i, .win_o(w5), .inside_o(i5), .primed_o(p5), .crow_o(r5), .ccol_o(c5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected element (r,c) of a KxK window with reference offset C
  function automatic int expect_px(int K, int C, int r, int c, output bit in_img, output bit primed,
                                   output int crow, output int ccol);
    int n = hist.size();
    int D = (K - 1 - C) * (LINE + 1);
    int centre = n - 1 - D;
    int fr = LINE * LINES;
    int cm = ((centre % fr) + fr) % fr;
    int row, col;
    primed = centre >= 0;
    crow = cm / LINE; ccol = cm % LINE;
    row = crow + r - C; col = ccol + c - C;
    in_img = row >= 0 && row < LINES && col >= 0 && col < LINE;
    if (!in_img) return 0;
    return hist[centre + (r - C) * LINE + (c - C)];
  endfunction

  task automatic check_all();
    bit in_img, primed; int crow, ccol, e;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        e = expect_px(5, 2, r, c, in_img, primed, crow, ccol);
        if (primed) checks++;
        if (primed && (w5[r][c] != W'(e) || i5[r][c] != in_img)) begin
          failures++; $display("5x5 [%0d][%0d] n=%0d got %0d/%0d exp %0d/%0d", r, c, hist.size(), w5[r][c], i5[r][c], e, in_img);
        end
        if (r == 0 && c == 0) begin
          checks++;
          if (p5 != primed || (primed && (int'(r5) != crow || int'(c5) != ccol))) begin
            failures++; $display("5x5 primed/coords wrong n=%0d", hist.size());
          end
        end
      end
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        e = expect_px(3, 1, r, c, in_img, primed, crow, ccol);
        if (primed) checks++;
        if (primed && (w3[r][c] != W'(e) || i3[r][c] != in_img)) begin
          failures++; $display("3x3 [%0d][%0d] n=%0d got %0d exp %0d", r, c, hist.size(), w3[r][c], e);
        end
        if (r == 0 && c == 0) begin
          checks++;
          if (p3 != primed || (primed && (int'(r3) != crow || int'(c3) != ccol))) failures++;
        end
      end
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        e = expect_px(2, 1, r, c, in_img, primed, crow, ccol);
        if (primed) checks++;
        if (primed && (w2[r][c] != W'(e) || i2[r][c] != in_img)) begin
          failures++; $display("2x2 [%0d][%0d] n=%0d got %0d exp %0d", r, c, hist.size(), w2[r][c], e);
        end
        if (r == 0 && c == 0) begin
          checks++;
          if (p2 != primed || (primed && (int'(r2) != crow || int'(c2) != ccol))) failures++;
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (hist.size() < 3 * LINE * LINES + 5) begin
      @(negedge clk);
      valid_i = ($urandom % 5) != 0;
      pix_i   = W'($urandom);
      @(posedge clk);
      if (valid_i) hist.push_back(int'(pix_i));
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
