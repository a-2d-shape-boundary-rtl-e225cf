// line_buffer - storage for one image line of pixels.
//
// A LINE-deep, W-bit memory addressed by pixel column. In a cycle with we=1
// the word at addr is replaced by wdata at the clock edge; rdata shows the word
// currently stored at addr (asynchronous read), so reading and writing the same
// column in one cycle returns the pixel of the previous line. The detector
// keeps one of these per buffered line, as the line memories of its window
// formers. Contents are not reset: a window former never uses a word before
// it has been written (it masks pixels that lie outside the image).
module line_buffer #(
  parameter int unsigned W    = 8,    // bits per pixel
  parameter int unsigned LINE = 512   // pixels per line
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(LINE)-1:0] addr,
  input  logic [W-1:0]            wdata,
  output logic [W-1:0]            rdata
);

  logic [W-1:0] mem [LINE];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
