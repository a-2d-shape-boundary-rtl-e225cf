// tb_full_size - one complete frame through the detector at its default size
// (512 x 512 pixels of 8 bits, one pathfinder II stage). The frame holds a
// test shape; the first lines of a second frame follow to push the end of
// the first one out. Every pixel of the gradient, first-border and final
// border images is compared with the reference model, and with the input
// never pausing each output must leave exactly (sum of stage delays in
// pixels) + (one cycle per stage) after its input.
module tb_full_size;
  import bd_ref_pkg::*;
  localparam int W = 8, LINE = 512, LINES = 512;
  localparam int D1 = 1, D2 = 2 * LINE + 4, D3 = LINE + 2;
  localparam int NPIX = LINE * LINES;

  logic clk = 0, rst_n = 0, valid_i = 0;
  logic [W-1:0] pix_i = 0;
  logic gv, bv, ov, o;
  logic [W-1:0] g, b;

  boundary_detector dut (
    .clk, .rst_n, .valid_i, .pix_i,
    .grad_valid_o(gv), .grad_o(g), .border1_valid_o(bv), .border1_o(b),
    .border_valid_o(ov), .border_o(o));

  int checks = 0, failures = 0, accepted = 0, ng = 0, nb = 0, no = 0, nedge = 0;
  int img[], img2[], eg[], eb[], eo[], t1[], t2[], t3[];

  always #5 clk = ~clk;

  initial begin
    repeat (2 * NPIX) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int k, int got, int exp_v, int dsum, int stages, string what);
    checks += 2;
    if (got != exp_v) begin
      failures++; if (failures < 20) $display("%s pixel %0d: got %0d exp %0d", what, k, got, exp_v);
    end
    if (accepted != k + dsum + stages) begin
      failures++; if (failures < 20) $display("%s pixel %0d left after %0d inputs", what, k, accepted);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (gv) begin if (ng < NPIX) chk(ng, int'(g), eg[ng], D1, 1, "grad");              ng++; end
    if (bv) begin if (nb < NPIX) chk(nb, int'(b), eb[nb], D1 + D2, 2, "border1");      nb++; end
    if (ov) begin if (no < NPIX) begin chk(no, int'(o), eo[no], D1 + D2 + D3, 3, "border"); nedge += o; end no++; end
  end

  initial begin
    make_shape(LINE, LINES, W, 1, img);
    make_shape(LINE, LINES, W, 2, img2);
    ref_gradient(img, LINE, LINES, W, eg);
    ref_stage2(eg, LINE, LINES, W, eb);
    ref_pf2(eb, LINE, LINES, 1, eo);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (no < NPIX) begin
      @(negedge clk);
      valid_i = 1;
      pix_i = W'(accepted < NPIX ? img[accepted] : img2[accepted - NPIX]);
      @(posedge clk);
      accepted++;
    end
    @(negedge clk) valid_i = 0;
    checks++;
    if (nedge == 0) begin failures++; $display("no border pixels found"); end
    $display("frame %0dx%0d: border pixels=%0d, inputs accepted=%0d", LINE, LINES, nedge, accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
