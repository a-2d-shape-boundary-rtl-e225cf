// tb_pathfinder1 - checks the pathfinder I criterion against the reference
// model (paths rebuilt from the primitives by symmetry). Windows are random,
// or hold a random straight/diagonal/knee line of strong pixels over a weak
// background, optionally with extra strong pixels beside it, so that both
// outcomes occur often. Also checks that the reference has 44 paths, 12 of
// them through the centre.
module tb_pathfinder1;
  import bd_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0] win [3][3];
  logic ok;
  logic [W+3:0] best;
  logic [5:0] beaten;
  int checks = 0, failures = 0, n_ok = 0, n_rej = 0;

  pathfinder1 #(.W(W)) dut (.win(win), .ok_o(ok), .best_centre_o(best), .beaten_o(beaten));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int w[9]);
    bit e; int bc = -1;
    for (int i = 0; i < 9; i++) win[i/3][i%3] = W'(w[i]);
    #1;
    e = pf1_ok(w);
    foreach (path_mask[i]) if (path_mask[i][4] && path_value(path_mask[i], w) > bc) bc = path_value(path_mask[i], w);
    checks += 2;
    if (ok !== e) begin failures++; $display("ok mismatch got %0d exp %0d", ok, e); end
    if (int'(best) != bc) begin failures++; $display("best mismatch got %0d exp %0d", best, bc); end
    if (e) n_ok++; else n_rej++;
  endtask

  initial begin
    int w[9]; int nc = 0;
    build_paths();
    foreach (path_mask[i]) nc += path_mask[i][4];
    checks++;
    if (path_mask.size() != 44 || nc != 12) begin
      failures++; $display("reference path set: %0d paths, %0d through centre", path_mask.size(), nc);
    end
    for (int t = 0; t < 3000; t++) begin
      int m;
      foreach (w[i]) w[i] = $urandom % 40;
      if (t % 2 == 0) begin
        m = path_mask[$urandom % path_mask.size()];
        for (int i = 0; i < 9; i++) if (m[i]) w[i] = 150 + $urandom % 106;
        if (t % 4 == 0) w[$urandom % 9] = $urandom % 256;
      end else if (t % 5 == 1) begin
        foreach (w[i]) w[i] = $urandom % 256;
      end
      apply(w);
    end
    checks++;
    if (n_ok == 0 || n_rej == 0) begin failures++; $display("outcome missing"); end
    $display("outcomes: pass=%0d reject=%0d", n_ok, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
