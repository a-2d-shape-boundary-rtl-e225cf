// tb_pathfinder2 - checks the pathfinder II criterion against the reference
// model in both output modes: random windows, lines through or beside the
// centre, and constructed ties between the best centre path and the best
// other path, with the corner-triple rule going either way. Counts how often
// the tie rule decided and how often it kept or cleared the pixel.
module tb_pathfinder2;
  import bd_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0] win [3][3];
  logic binary_i, on, tie;
  logic [W-1:0] pix;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_tie_keep = 0, n_tie_drop = 0;

  pathfinder2 #(.W(W)) dut (.win(win), .binary_i(binary_i), .on_o(on), .tie_o(tie), .pix_o(pix));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int w[9]);
    bit e, et; int ep;
    for (int i = 0; i < 9; i++) win[i/3][i%3] = W'(w[i]);
    binary_i = $urandom % 2;
    #1;
    e  = pf2_on(w, et);
    ep = !e ? 0 : (binary_i ? 1 : w[4]);
    checks += 3;
    if (on !== e)  begin failures++; $display("on mismatch got %0d exp %0d", on, e); end
    if (tie !== et) begin failures++; $display("tie mismatch"); end
    if (int'(pix) != ep) begin failures++; $display("pix mismatch got %0d exp %0d (binary %0d)", pix, ep, binary_i); end
    if (et && w[1] + w[2] + w[5] + w[3] + w[6] + w[7] > 0) begin
      if (e) n_tie_keep++; else n_tie_drop++;
    end else if (e) n_on++; else n_off++;
  endtask

  initial begin
    int w[9];
    build_paths();
    for (int t = 0; t < 4000; t++) begin
      int m;
      case (t % 4)
        0: foreach (w[i]) w[i] = $urandom % 256;
        1: begin
             foreach (w[i]) w[i] = $urandom % 30;
             m = path_mask[$urandom % path_mask.size()];
             for (int i = 0; i < 9; i++) if (m[i]) w[i] = 200;
           end
        2: begin
             // tie: vertical line through the centre against the left or right column
             int v = 20 + $urandom % 200;
             foreach (w[i]) w[i] = 0;
             w[1] = v; w[4] = v; w[7] = v;
             if ($urandom % 2) begin w[0] = v; w[3] = v; w[6] = v; end   // lower-left heavier
             else              begin w[2] = v; w[5] = v; w[8] = v; end   // upper-right heavier
           end
        default: begin
             // tie: horizontal line through the centre against the bottom row
             int v = 20 + $urandom % 200;
             foreach (w[i]) w[i] = 0;
             w[3] = v; w[4] = v; w[5] = v; w[6] = v; w[7] = v; w[8] = v;
             if ($urandom % 2) w[2] = 7;
           end
      endcase
      apply(w);
    end
    checks++;
    if (n_on == 0 || n_off == 0 || n_tie_keep == 0 || n_tie_drop == 0) begin
      failures++; $display("outcome missing");
    end
    $display("outcomes: on=%0d off=%0d tie-kept=%0d tie-cleared=%0d", n_on, n_off, n_tie_keep, n_tie_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
