// wl_run - test helper: runs one detector configuration on one synthetic
// image and checks the binary border image, and the first border image,
// against the reference model. SHAPE 0 is an arch-shaped block, SHAPE 1 a
// tilted bar. The frame is followed by the first lines of a second frame that
// push its last lines out. Reports through done/checks/failures/edges.
module wl_run #(
  parameter int W = 8, LINE = 64, LINES = 64, NUM_PF2 = 1, SHAPE = 0
) (
  output bit done,
  output int checks,
  output int failures,
  output int edges
);
  import bd_ref_pkg::*;
  localparam int NPIX = LINE * LINES;
  logic clk = 0, rst_n = 0, valid_i = 0;
  logic [W-1:0] pix_i = 0;
  logic gv, bv, ov, o;
  logic [W-1:0] g, b;
  int img[], eg[], eb[], ep[], eo[], tmp[];
  int accepted = 0, nb = 0, no = 0;

  boundary_detector #(.W(W), .LINE(LINE), .LINES(LINES), .NUM_PF2(NUM_PF2)) dut (
    .clk, .rst_n, .valid_i, .pix_i,
    .grad_valid_o(gv), .grad_o(g), .border1_valid_o(bv), .border1_o(b),
    .border_valid_o(ov), .border_o(o));

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if (bv) begin
      if (nb < NPIX) begin
        checks++;
        if (int'(b) != eb[nb]) failures++;
      end
      nb++;
    end
    if (ov) begin
      if (no < NPIX) begin
        checks++;
        if (int'(o) != eo[no]) failures++;
        edges += int'(o);
      end
      no++;
    end
  end

  initial begin
    done = 0; checks = 0; failures = 0; edges = 0;
    if (SHAPE == 0) make_arch(LINE, LINES, W, img); else make_shape(LINE, LINES, W, 2, img);
    ref_gradient(img, LINE, LINES, W, eg);
    ref_stage2(eg, LINE, LINES, W, eb);
    ep = eb;
    for (int s = 0; s < NUM_PF2; s++) begin
      ref_pf2(ep, LINE, LINES, s == NUM_PF2 - 1, tmp);
      ep = tmp;
    end
    eo = ep;
    // how many border pixels the tie rule decided (last stage)
    begin
      int last_in[], w[9], nt = 0, nbp = 0; bit tie, on;
      last_in = eb;
      for (int s = 0; s < NUM_PF2 - 1; s++) begin ref_pf2(last_in, LINE, LINES, 0, tmp); last_in = tmp; end
      for (int r = 0; r < LINES; r++)
        for (int c = 0; c < LINE; c++) begin
          win3(last_in, LINE, LINES, r, c, w);
          on = pf2_on(w, tie);
          nbp += on; nt += (on && tie);
        end
      $display("%0dx%0d: %0d of %0d border pixels decided by the tie rule", LINE, LINES, nt, nbp);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (no < NPIX) begin
      @(negedge clk);
      valid_i = 1;
      pix_i = W'(accepted < NPIX ? img[accepted] : img[accepted - NPIX]);
      @(posedge clk);
      accepted++;
    end
    @(negedge clk) valid_i = 0;
    done = 1;
  end
endmodule
