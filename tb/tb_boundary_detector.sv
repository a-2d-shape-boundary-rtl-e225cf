// tb_boundary_detector - end-to-end test of the detector on small frames.
//
// Two detectors run side by side on the same input stream: the basic one with
// a single pathfinder II stage, and one with two chained stages (the first in
// pass-through mode). Frames of test shapes and of random pixels follow each
// other back to back; pauses in valid_i are inserted during part of the run.
// Every pixel of the gradient, first-border and final border images of both
// detectors is compared with the reference model. While the input has not yet
// paused, each output must leave exactly
//   sum of stage delays (in pixels) + one cycle per stage
// after its input; after pauses the pixel delay must still be the sum of the
// stage delays, while the cycle offset may be anything from 1 to the number
// of stages.
// The mechanisms of the design are counted and each must occur at least once:
// gradient saturation, rejection by the threshold, by the rank test and by
// pathfinder I, pixels kept and cleared by pathfinder II, tie-break decisions
// both ways, a pass-through stage keeping grey values, input pauses, frame
// wrap-around and zero padding at the image border.
module tb_boundary_detector;
  import bd_ref_pkg::*;
  localparam int W = 8, LINE = 24, LINES = 16, NFR = 5;
  localparam int D1 = 1, D2 = 2 * LINE + 4, D3 = LINE + 2;

  logic clk = 0, rst_n = 0, valid_i = 0;
  logic [W-1:0] pix_i = 0;
  logic gv1, bv1, ov1, o1, gv2, bv2, ov2, o2;
  logic [W-1:0] g1, b1, g2, b2;

  boundary_detector #(.W(W), .LINE(LINE), .LINES(LINES)) dut1 (
    .clk, .rst_n, .valid_i, .pix_i,
    .grad_valid_o(gv1), .grad_o(g1), .border1_valid_o(bv1), .border1_o(b1),
    .border_valid_o(ov1), .border_o(o1));
  boundary_detector #(.W(W), .LINE(LINE), .LINES(LINES), .NUM_PF2(2)) dut2 (
    .clk, .rst_n, .valid_i, .pix_i,
    .grad_valid_o(gv2), .grad_o(g2), .border1_valid_o(bv2), .border1_o(b2),
    .border_valid_o(ov2), .border_o(o2));

  int checks = 0, failures = 0, accepted = 0, n_stall = 0;
  int ng = 0, nb = 0, no1 = 0, no2 = 0, ng2 = 0, nb2 = 0;
  int stream [$], eg [$], eb [$], eo1 [$], eo2 [$], epass [$];
  // mechanism counters
  int m_sat = 0, m_thresh = 0, m_rank = 0, m_pf1 = 0, m_keep = 0, m_clear = 0;
  int m_tie_keep = 0, m_tie_clear = 0, m_pass = 0, m_wrap = 0, m_pad = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lat(int k, int dsum, int stages, string what);
    int want = k + dsum + stages;
    checks++;
    if ((n_stall == 0 && accepted != want) || accepted < k + dsum + 1 || accepted > want) begin
      failures++; $display("%s pixel %0d left after %0d inputs, expected %0d", what, k, accepted, want);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (gv1) begin
      checks++;
      if (int'(g1) != eg[ng]) begin failures++; $display("grad %0d: %0d exp %0d", ng, g1, eg[ng]); end
      check_lat(ng, D1, 1, "grad");
      ng++;
    end
    if (gv2) begin
      checks++;
      if (int'(g2) != eg[ng2]) failures++;
      ng2++;
    end
    if (bv1) begin
      checks++;
      if (int'(b1) != eb[nb]) begin failures++; $display("border1 %0d: %0d exp %0d", nb, b1, eb[nb]); end
      check_lat(nb, D1 + D2, 2, "border1");
      nb++;
    end
    if (bv2) begin
      checks++;
      if (int'(b2) != eb[nb2]) failures++;
      nb2++;
    end
    if (ov1) begin
      checks++;
      if (int'(o1) != eo1[no1]) begin failures++; $display("border %0d: %0d exp %0d", no1, o1, eo1[no1]); end
      check_lat(no1, D1 + D2 + D3, 3, "border");
      if (no1 >= LINE * LINES) m_wrap++;
      no1++;
    end
    if (ov2) begin
      checks++;
      if (int'(o2) != eo2[no2]) begin failures++; $display("border(2 stages) %0d: %0d exp %0d", no2, o2, eo2[no2]); end
      check_lat(no2, D1 + D2 + 2 * D3, 4, "border(2 stages)");
      no2++;
    end
  end

  // classify every pixel of a frame with the reference criteria
  task automatic classify(const ref int img[], const ref int g[], const ref int s1[], const ref int p1[]);
    for (int r = 0; r < LINES; r++)
      for (int c = 0; c < LINE; c++) begin
        int w5[25]; int w[9]; bit tie, on;
        int v = g[r*LINE + c];
        if (v == (1 << W) - 1) m_sat++;
        for (int i = 0; i < 25; i++) w5[i] = px(g, LINE, LINES, r - 2 + i/5, c - 2 + i%5);
        win3(g, LINE, LINES, r, c, w);
        if (v * 100 <= ((1 << W) - 1) * 10) begin if (v > 0) m_thresh++; end
        else if (!lm_ok(w5, W)) m_rank++;
        else if (!pf1_ok(w)) m_pf1++;
        win3(s1, LINE, LINES, r, c, w);
        on = pf2_on(w, tie);
        if (tie && (w[1] + w[2] + w[3] + w[5] + w[6] + w[7]) > 0) begin
          if (on) m_tie_keep++; else m_tie_clear++;
        end
        if (on) m_keep++; else if (s1[r*LINE + c] != 0) m_clear++;
        if (p1[r*LINE + c] > 1) m_pass++;
        if ((r == 0 || c == 0 || r == LINES - 1 || c == LINE - 1) && v != 0) m_pad++;
      end
  endtask

  initial begin
    int img[], g[], s1[], f1[], p1[], f2[];
    for (int f = 0; f < NFR; f++) begin
      if (f == 2) make_random(LINE, LINES, W, img);
      else make_shape(LINE, LINES, W, f + 1, img);
      ref_gradient(img, LINE, LINES, W, g);
      ref_stage2(g, LINE, LINES, W, s1);
      ref_pf2(s1, LINE, LINES, 1, f1);
      ref_pf2(s1, LINE, LINES, 0, p1);
      ref_pf2(p1, LINE, LINES, 1, f2);
      if (f < NFR - 1) classify(img, g, s1, p1);
      foreach (img[i]) begin
        stream.push_back(img[i]); eg.push_back(g[i]); eb.push_back(s1[i]);
        eo1.push_back(f1[i]); eo2.push_back(f2[i]);
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (accepted < stream.size()) begin
      @(negedge clk);
      // pauses only during the third and fourth frames
      valid_i = !(accepted >= 2 * LINE * LINES && accepted < 4 * LINE * LINES && ($urandom % 5) == 0);
      if (!valid_i) n_stall++;
      pix_i = W'(stream[accepted]);
      @(posedge clk);
      if (valid_i) accepted++;
    end
    @(negedge clk) valid_i = 0;
    repeat (6) @(negedge clk);
    checks += 2;
    if (no1 != stream.size() - (D1 + D2 + D3)) begin failures++; $display("final outputs %0d", no1); end
    if (no2 != stream.size() - (D1 + D2 + 2 * D3)) begin failures++; $display("final outputs (2) %0d", no2); end
    $display("mechanisms: pauses=%0d saturation=%0d below-threshold=%0d not-top5=%0d pf1-reject=%0d",
             n_stall, m_sat, m_thresh, m_rank, m_pf1);
    $display("            pf2-keep=%0d pf2-clear=%0d tie-kept=%0d tie-cleared=%0d pass-grey=%0d wrap=%0d border-pad=%0d",
             m_keep, m_clear, m_tie_keep, m_tie_clear, m_pass, m_wrap, m_pad);
    checks++;
    if (n_stall == 0 || m_sat == 0 || m_thresh == 0 || m_rank == 0 || m_pf1 == 0 || m_keep == 0 ||
        m_clear == 0 || m_tie_keep == 0 || m_tie_clear == 0 || m_pass == 0 || m_wrap == 0 || m_pad == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("outputs: border=%0d border(2 stages)=%0d", no1, no2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
