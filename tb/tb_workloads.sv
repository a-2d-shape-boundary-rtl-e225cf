// tb_workloads - runs the two image sizes the detector was evaluated on:
// a 64 x 64 image of 4-bit pixels (an arch-shaped toy block, one pathfinder II
// stage) and a 220 x 128 image of 5-bit pixels (a long tilted object, two
// pathfinder II stages, the first in pass-through mode). The images are
// synthetic stand-ins of those shapes. Every first-border and final border
// pixel is checked against the reference model, and each run must find a
// border.
module tb_workloads;
  bit d0, d1;
  int c0, c1, f0, f1, e0, e1;
  int checks = 0, failures = 0;

  wl_run #(.W(4), .LINE(64),  .LINES(64),  .NUM_PF2(1), .SHAPE(0)) toy   (.done(d0), .checks(c0), .failures(f0), .edges(e0));
  wl_run #(.W(5), .LINE(220), .LINES(128), .NUM_PF2(2), .SHAPE(1)) screw (.done(d1), .checks(c1), .failures(f1), .edges(e1));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    checks = c0 + c1 + 2;
    failures = f0 + f1 + (e0 == 0) + (e1 == 0);
    $display("toy block 64x64x4: %0d border pixels, %0d failures", e0, f0);
    $display("screwdriver 220x128x5, two pathfinder II stages: %0d border pixels, %0d failures", e1, f1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
