// tb_max_pf1_stage - streams small gradient images (gradients of test shapes,
// a random frame, and a frame of patterns that pass the local maximum but
// fail pathfinder I) through the local maximum & pathfinder I stage with
// random pauses and checks every output pixel, and its two criterion flags,
// against the reference model, and that each result leaves 2 lines + 4 pixels
// after its own input pixel. Counts pixels kept, rejected by the threshold,
// by the rank test and by pathfinder I.
module tb_max_pf1_stage;
  import bd_ref_pkg::*;
  localparam int W = 8, LINE = 12, LINES = 9, DELAY = 2 * LINE + 4;
  logic clk = 0, rst_n = 0, valid_i = 0, valid_o, lm_ok_o, pf_ok_o;
  logic [W-1:0] pix_i = 0, pix_o;
  int checks = 0, failures = 0, accepted = 0, outs = 0, n_stall = 0;
  int n_keep = 0, n_lm = 0, n_pf = 0;
  int stream [$], expect_q [$], exp_lm [$], exp_pf [$];

  max_pf1_stage #(.W(W), .LINE(LINE), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && valid_o) begin
    checks += 4;
    if (int'(pix_o) != expect_q[outs]) begin
      failures++; $display("pixel %0d: got %0d exp %0d", outs, pix_o, expect_q[outs]);
    end
    if (lm_ok_o != exp_lm[outs] || pf_ok_o != exp_pf[outs]) begin
      failures++; $display("pixel %0d: flags %0d%0d exp %0d%0d", outs, lm_ok_o, pf_ok_o, exp_lm[outs], exp_pf[outs]);
    end
    if (accepted != outs + DELAY + 1) begin
      failures++; $display("pixel %0d left after %0d inputs", outs, accepted);
    end
    if (lm_ok_o && pf_ok_o) n_keep++;
    else if (!lm_ok_o) n_lm++;
    else n_pf++;
    outs++;
  end

  initial begin
    int img[], g[], o[];
    for (int f = 0; f < 5; f++) begin
      if (f == 2) make_random(LINE, LINES, W, g);
      else if (f == 3) begin
        // tiles that pass the local maximum but fail pathfinder I: a centre of
        // 150 under a stronger 3-pixel row (200), on a background of 20
        g = new[LINE * LINES];
        foreach (g[i]) g[i] = 20;
        for (int r = 1; r + 1 < LINES; r += 4)
          for (int c = 1; c + 1 < LINE; c += 4) begin
            g[r*LINE + c] = 150 + $urandom % 20;
            for (int d = -1; d <= 1; d++) g[(r-1)*LINE + c + d] = 200;
          end
      end
      else begin make_shape(LINE, LINES, W, f + 1, img); ref_gradient(img, LINE, LINES, W, g); end
      ref_stage2(g, LINE, LINES, W, o);
      for (int r = 0; r < LINES; r++)
        for (int c = 0; c < LINE; c++) begin
          int w5[25]; int w[9];
          for (int i = 0; i < 25; i++) w5[i] = px(g, LINE, LINES, r - 2 + i/5, c - 2 + i%5);
          win3(g, LINE, LINES, r, c, w);
          exp_lm.push_back(lm_ok(w5, W));
          exp_pf.push_back(pf1_ok(w));
        end
      foreach (g[i]) begin stream.push_back(g[i]); expect_q.push_back(o[i]); end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (accepted < stream.size()) begin
      @(negedge clk);
      valid_i = ($urandom % 4) != 0;
      if (!valid_i) n_stall++;
      pix_i = W'(stream[accepted]);
      @(posedge clk);
      if (valid_i) accepted++;
    end
    @(negedge clk) valid_i = 0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (outs != stream.size() - DELAY) begin failures++; $display("outputs %0d", outs); end
    if (n_keep == 0 || n_lm == 0 || n_pf == 0 || n_stall == 0) begin
      failures++; $display("outcome not exercised");
    end
    $display("outputs=%0d kept=%0d lm-rejected=%0d pf1-rejected=%0d pauses=%0d", outs, n_keep, n_lm, n_pf, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
