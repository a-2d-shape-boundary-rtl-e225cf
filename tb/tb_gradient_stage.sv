// tb_gradient_stage - streams three small frames (a test shape, random
// pixels, the shape again) through the gradient stage with random pauses in
// valid_i and checks every output pixel against the reference Roberts
// gradient, including saturation and the zero first row/column, and checks
// that each result leaves exactly one pixel after its own input pixel.
module tb_gradient_stage;
  import bd_ref_pkg::*;
  localparam int W = 8, LINE = 11, LINES = 7, DELAY = 1;
  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic [W-1:0] pix_i = 0, grad_o;
  int checks = 0, failures = 0, accepted = 0, outs = 0, n_sat = 0, n_stall = 0;
  int stream [$], expect_q [$];

  gradient_stage #(.W(W), .LINE(LINE), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && valid_o) begin
    checks += 2;
    if (outs < expect_q.size() && int'(grad_o) != expect_q[outs]) begin
      failures++; $display("pixel %0d: got %0d exp %0d", outs, grad_o, expect_q[outs]);
    end
    if (accepted != outs + DELAY + 1) begin
      failures++; $display("pixel %0d left after %0d inputs", outs, accepted);
    end
    if (int'(grad_o) == (1 << W) - 1) n_sat++;
    outs++;
  end

  initial begin
    int img[], g[];
    for (int f = 0; f < 3; f++) begin
      if (f == 1) begin
        make_random(LINE, LINES, W, img);
        img[2*LINE + 4] = 255; img[3*LINE + 5] = 0; img[2*LINE + 5] = 0; img[3*LINE + 4] = 255;
      end else make_shape(LINE, LINES, W, 1 + f, img);
      ref_gradient(img, LINE, LINES, W, g);
      foreach (img[i]) begin stream.push_back(img[i]); expect_q.push_back(g[i]); end
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
    if (n_sat == 0 || n_stall == 0) begin failures++; $display("saturation/pause not exercised"); end
    $display("outputs=%0d saturated=%0d pauses=%0d", outs, n_sat, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
