// ram_dp: dual-port byte memory shared by the host and the CPU.
//
// 4096 x 8 by default (4 KB, enough for a CHIP-8 interpreter in the first
// 512 bytes and a CHIP-8 program above it). Port A belongs to the host
// loader, port B to the 1802. Both ports are synchronous: an address
// presented before a rising edge gives its data after that edge (one clock
// read latency), and a write takes effect at the edge. A read of the word
// being written on the same port returns the old contents. Writing the same
// address from both ports in one clock is undefined; port B wins here.
//
// The size follows the document; the registered read ports are this
// design's choice (an FPGA block RAM with registered outputs).
module ram_dp #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  // port A: host
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [DATA_W-1:0] wdata_a,
  input  logic              we_a,
  output logic [DATA_W-1:0] rdata_a,
  // port B: CPU
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [DATA_W-1:0] wdata_b,
  input  logic              we_b,
  output logic [DATA_W-1:0] rdata_b
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
  end

endmodule
