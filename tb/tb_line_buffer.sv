// tb_line_buffer - checks one line memory: words written at a column are read
// back there one line later, and a read in the cycle of a write to the same
// column still returns the old word.
module tb_line_buffer;
  localparam int W = 8, LINE = 12;
  logic clk = 0, we;
  logic [$clog2(LINE)-1:0] addr;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  int model [LINE];

  line_buffer #(.W(W), .LINE(LINE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    // fill
    for (int i = 0; i < LINE; i++) begin
      @(negedge clk); we = 1; addr = i[$clog2(LINE)-1:0]; wdata = W'($urandom); model[i] = int'(wdata);
    end
    @(negedge clk); we = 0;
    // several lines of read-before-write, some cycles without write
    for (int l = 0; l < 6; l++)
      for (int i = 0; i < LINE; i++) begin
        @(negedge clk);
        addr = i[$clog2(LINE)-1:0]; we = ($urandom % 4) != 0; wdata = W'($urandom);
        #1;
        checks++;
        if (int'(rdata) != model[i]) begin
          failures++; $display("mismatch col %0d: got %0d exp %0d", i, rdata, model[i]);
        end
        if (we) model[i] = int'(wdata);
      end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
