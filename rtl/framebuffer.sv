// framebuffer: one bit per pixel display memory, 64 x 32 pixels.
//
// 2048 bits, stored as 256 bytes so that the writer (the display DMA, which
// receives one byte per 1802 DMA-OUT cycle) writes eight horizontally
// adjacent pixels at once. Byte b holds pixels b*8 .. b*8+7 of the raster in
// row-major order, most significant bit leftmost; a row of 64 pixels is 8
// bytes. The read port is addressed by pixel, {row, column}, and returns the
// pixel one clock after the address (registered read).
//
// The size and the one-bit pixels follow the document; the byte organisation
// and bit order are this design's choice.
module framebuffer #(
  parameter int unsigned COLS = 64,
  parameter int unsigned ROWS = 32
) (
  input  logic                               clk,
  // write port: bytes
  input  logic [$clog2(COLS*ROWS/8)-1:0]     waddr,
  input  logic [7:0]                         wdata,
  input  logic                               we,
  // read port: pixels
  input  logic [$clog2(COLS*ROWS)-1:0]       raddr,
  output logic                               pixel
);

  localparam int unsigned BYTES = COLS * ROWS / 8;

  logic [7:0] mem [BYTES];
  logic [7:0] rbyte;
  logic [2:0] rbit;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rbyte <= mem[raddr[$clog2(COLS*ROWS)-1:3]];
    rbit  <= raddr[2:0];
  end

  assign pixel = rbyte[3'd7 - rbit];

endmodule
