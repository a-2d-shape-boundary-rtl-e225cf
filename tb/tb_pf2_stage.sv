// tb_pf2_stage - streams small "first border" images (outputs of the
// reference local maximum & pathfinder I stage on test shapes, and a random
// frame) through the pathfinder II stage with random pauses, in binary mode
// and in pass-through mode (two instances), and checks every output pixel and
// border flag against the reference model, and that each result leaves
// 1 line + 2 pixels after its own input pixel. Counts tie-break decisions.
module tb_pf2_stage;
  import bd_ref_pkg::*;
  localparam int W = 8, LINE = 10, LINES = 8, DELAY = LINE + 2;
  logic clk = 0, rst_n = 0, valid_i = 0;
  logic [W-1:0] pix_i = 0;
  logic vb, eb, tb_, vp, ep, tp;
  logic [W-1:0] pb, pp;
  int checks = 0, failures = 0, accepted = 0, outs = 0, n_stall = 0, n_tie = 0, n_edge = 0;
  int stream [$], exp_b [$], exp_p [$];

  pf2_stage #(.W(W), .LINE(LINE), .LINES(LINES)) dut_bin (
    .clk, .rst_n, .binary_i(1'b1), .valid_i, .pix_i, .valid_o(vb), .pix_o(pb), .edge_o(eb), .tie_o(tb_));
  pf2_stage #(.W(W), .LINE(LINE), .LINES(LINES)) dut_pass (
    .clk, .rst_n, .binary_i(1'b0), .valid_i, .pix_i, .valid_o(vp), .pix_o(pp), .edge_o(ep), .tie_o(tp));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && (vb || vp)) begin
    checks += 5;
    if (vb != vp) begin failures++; $display("valid differs"); end
    if (int'(pb) != exp_b[outs] || eb != (exp_b[outs] != 0)) begin
      failures++; $display("binary pixel %0d: got %0d exp %0d", outs, pb, exp_b[outs]);
    end
    if (int'(pp) != exp_p[outs]) begin
      failures++; $display("pass pixel %0d: got %0d exp %0d", outs, pp, exp_p[outs]);
    end
    if (accepted != outs + DELAY + 1) begin
      failures++; $display("pixel %0d left after %0d inputs", outs, accepted);
    end
    if (tb_ && stream[outs] != 0) n_tie++;
    if (eb) n_edge++;
    outs++;
  end

  initial begin
    int img[], g[], s1[], ob[], op[];
    for (int f = 0; f < 4; f++) begin
      if (f == 2) make_random(LINE, LINES, W, s1);
      else begin
        make_shape(LINE, LINES, W, f + 1, img);
        ref_gradient(img, LINE, LINES, W, g);
        ref_stage2(g, LINE, LINES, W, s1);
      end
      ref_pf2(s1, LINE, LINES, 1, ob);
      ref_pf2(s1, LINE, LINES, 0, op);
      foreach (s1[i]) begin stream.push_back(s1[i]); exp_b.push_back(ob[i]); exp_p.push_back(op[i]); end
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
    if (n_edge == 0 || n_stall == 0) begin failures++; $display("outcome not exercised"); end
    $display("outputs=%0d border=%0d ties=%0d pauses=%0d", outs, n_edge, n_tie, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
