// tb_local_max - checks the local maximum criterion against the reference
// model on random and on hand-made 5x5 windows: a clear peak, a peak below the
// 10 % threshold, a centre with exactly 4 and exactly 5 neighbours >= it, and
// a flat patch. Counts the windows that exercised each outcome.
module tb_local_max;
  import bd_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0] win [5][5];
  logic ok, above;
  logic [4:0] cnt;
  int checks = 0, failures = 0;
  int n_ok = 0, n_thresh = 0, n_rank = 0;

  local_max #(.W(W)) dut (.win(win), .ok_o(ok), .above_thresh_o(above), .count_ge_o(cnt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int w[25]);
    bit e; int ge = 0;
    for (int i = 0; i < 25; i++) win[i/5][i%5] = W'(w[i]);
    #1;
    e = lm_ok(w, W);
    for (int i = 0; i < 25; i++) if (i != 12 && w[i] >= w[12]) ge++;
    checks += 2;
    if (ok !== e) begin failures++; $display("ok mismatch: got %0d exp %0d centre %0d ge %0d", ok, e, w[12], ge); end
    if (int'(cnt) != ge) begin failures++; $display("count mismatch: got %0d exp %0d", cnt, ge); end
    if (e) n_ok++;
    else if (w[12] * 100 <= 255 * 10) n_thresh++;
    else n_rank++;
  endtask

  initial begin
    int w[25];
    // clear peak
    foreach (w[i]) w[i] = 10; w[12] = 200; apply(w);
    // peak below threshold (25 <= 25.5)
    foreach (w[i]) w[i] = 0;  w[12] = 25; apply(w);
    foreach (w[i]) w[i] = 0;  w[12] = 26; apply(w);
    // exactly 4 and exactly 5 neighbours >= centre
    foreach (w[i]) w[i] = 30; w[12] = 100; w[0] = 100; w[6] = 150; w[18] = 101; w[24] = 255; apply(w);
    w[7] = 100; apply(w);
    // flat patch
    foreach (w[i]) w[i] = 90; apply(w);
    // random windows, with a spread of values
    for (int t = 0; t < 4000; t++) begin
      int sh = $urandom % 8;
      foreach (w[i]) w[i] = ($urandom % 256) >> sh;
      if (t % 3 == 0) w[12] = 255 - ($urandom % 64);
      apply(w);
    end
    checks++;
    if (n_ok == 0 || n_thresh == 0 || n_rank == 0) begin
      failures++; $display("outcome not exercised: ok=%0d thresh=%0d rank=%0d", n_ok, n_thresh, n_rank);
    end
    $display("outcomes: pass=%0d below-threshold=%0d not-top5=%0d", n_ok, n_thresh, n_rank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
