// host_ctrl: the host's window onto the 1802 system.
//
// An Avalon memory-mapped slave with 8-bit data and 12-bit byte address, one
// clock of read latency. Reads and writes go to the host port of the shared
// RAM, except for two reserved addresses that the 1802 program does not
// use:
//   CTRL_RUN   (0x010) any write toggles between LOAD (core frozen, host
//                      loads memory) and RUN;
//   CTRL_RESET (0x014) any write puts the core in RESET for one clock, after
//                      which it waits in LOAD.
// Writes to these two addresses do not reach the RAM. System reset also
// passes through RESET into LOAD. The mode is presented as the 1802's
// active-low CLEAR and WAIT lines ({clear_n, wait_n} = mode).
//
// The two reserved addresses and the toggle/reset behaviour follow the
// document; keeping control writes out of the RAM is this design's choice.
module host_ctrl
  import cdp1802_pkg::*;
#(
  parameter int unsigned   ADDR_W     = 12,
  parameter logic [11:0]   CTRL_RUN   = 12'h010,
  parameter logic [11:0]   CTRL_RESET = 12'h014
) (
  input  logic              clk,
  input  logic              rst,
  // Avalon-MM slave
  input  logic [ADDR_W-1:0] avs_address,
  input  logic [7:0]        avs_writedata,
  input  logic              avs_write,
  input  logic              avs_chipselect,
  output logic [7:0]        avs_readdata,
  // RAM host port
  output logic [ADDR_W-1:0] ram_addr,
  output logic [7:0]        ram_wdata,
  output logic              ram_we,
  input  logic [7:0]        ram_rdata,
  // CPU control
  output mode_e             mode,
  output logic              clear_n,
  output logic              wait_n
);

  logic wr, hit_run, hit_reset;
  assign wr        = avs_write && avs_chipselect;
  assign hit_run   = (ADDR_W'(CTRL_RUN)   == avs_address);
  assign hit_reset = (ADDR_W'(CTRL_RESET) == avs_address);

  assign ram_addr     = avs_address;
  assign ram_wdata    = avs_writedata;
  assign ram_we       = wr && !hit_run && !hit_reset;
  assign avs_readdata = ram_rdata;

  assign {clear_n, wait_n} = mode;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode <= M_RESET;
    end else if (wr && hit_reset) begin
      mode <= M_RESET;
    end else if (wr && hit_run) begin
      mode <= (mode == M_LOAD) ? M_RUN : M_LOAD;
    end else if (mode == M_RESET) begin
      mode <= M_LOAD;
    end
  end

endmodule
