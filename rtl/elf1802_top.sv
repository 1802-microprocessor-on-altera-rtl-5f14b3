// elf1802_top: a complete 1802 computer for an FPGA board with a host CPU.
//
// The 1802 core runs from a 4 KB dual-port RAM. The host loads programs
// through the other RAM port over an Avalon-MM slave and starts, stops and
// resets the core through two reserved addresses (host_ctrl). Six
// seven-segment displays show, from left to right, D (HEX5,HEX4), the low
// byte of the program counter R(P) (HEX3,HEX2) and the low byte of the
// memory address (HEX1,HEX0). The red LEDs show the mode, DF, Q, IE, the
// idle flag and the state code. A 64 x 32 one-bit framebuffer is shown on
// VGA; it is filled from 1802 memory once per frame by an interrupt and 256
// DMA-OUT cycles (display_dma), so an 1802 program draws by writing its
// 256-byte picture in memory.
//
// The core's external I/O (N lines, output bus and strobe, input bus, EF
// flags, Q, state code, external interrupt and DMA requests) is brought out
// as ports for devices outside this design. External interrupt and DMA-OUT
// requests are combined (wired-AND of the active-low lines) with those of
// the display.
//
// The core addresses 64 KB; the RAM decodes the low 12 address bits, so the
// 4 KB image repeats through the address space. The high address bits and
// the debug fields that no display shows are left unused on purpose (lint
// reports them as unused signals).
//
// From the original system: the 4 KB RAM, host loading through a second
// RAM port, the two control addresses, the use of the six hex displays and
// a 64 x 32 one-bit display. This design's own choices: the display
// handshake and VGA mode, the LED assignment beyond mode/DF/Q/IE/idle, and
// one clock of host read latency.
module elf1802_top
  import cdp1802_pkg::*;
#(
  parameter int unsigned RAM_ADDR_W = 12,
  parameter int unsigned DMA_DELAY  = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  // host Avalon-MM slave
  input  logic [RAM_ADDR_W-1:0] avs_address,
  input  logic [7:0]            avs_writedata,
  input  logic                  avs_write,
  input  logic                  avs_chipselect,
  output logic [7:0]            avs_readdata,
  // 1802 I/O
  input  logic [3:0]            ef_n,
  input  logic                  ext_int_n,
  input  logic                  ext_dma_in_n,
  input  logic                  ext_dma_out_n,
  input  logic [7:0]            bus_in,
  output logic [7:0]            bus_out,
  output logic                  out_valid,
  output logic [2:0]            n_lines,
  output logic                  q,
  output sc_e                   sc,
  output logic                  tpb,
  // VGA
  output logic [7:0]            vga_r,
  output logic [7:0]            vga_g,
  output logic [7:0]            vga_b,
  output logic                  vga_clk,
  output logic                  vga_hs,
  output logic                  vga_vs,
  output logic                  vga_blank_n,
  output logic                  vga_sync_n,
  // board displays
  output logic [6:0]            hex0,
  output logic [6:0]            hex1,
  output logic [6:0]            hex2,
  output logic [6:0]            hex3,
  output logic [6:0]            hex4,
  output logic [6:0]            hex5,
  output logic [9:0]            ledr
);

  // host port
  logic [RAM_ADDR_W-1:0] ram_a_addr;
  logic [7:0]            ram_a_wdata, ram_a_rdata;
  logic                  ram_a_we;
  mode_e                 mode;
  logic                  clear_n, wait_n;

  host_ctrl #(.ADDR_W(RAM_ADDR_W)) u_host (
    .clk            (clk),
    .rst            (rst),
    .avs_address    (avs_address),
    .avs_writedata  (avs_writedata),
    .avs_write      (avs_write),
    .avs_chipselect (avs_chipselect),
    .avs_readdata   (avs_readdata),
    .ram_addr       (ram_a_addr),
    .ram_wdata      (ram_a_wdata),
    .ram_we         (ram_a_we),
    .ram_rdata      (ram_a_rdata),
    .mode           (mode),
    .clear_n        (clear_n),
    .wait_n         (wait_n)
  );

  // core
  logic [15:0] ma;
  logic [7:0]  cpu_wdata, cpu_rdata;
  logic        cpu_we, cpu_rd;
  logic        int_n, dma_out_n, disp_int_n, disp_dma_out_n;
  cpu_debug_t  dbg;

  assign int_n     = ext_int_n & disp_int_n;
  assign dma_out_n = ext_dma_out_n & disp_dma_out_n;

  cdp1802_cpu u_cpu (
    .clk       (clk),
    .rst       (rst),
    .clear_n   (clear_n),
    .wait_n    (wait_n),
    .ma        (ma),
    .mem_wdata (cpu_wdata),
    .mem_we    (cpu_we),
    .mem_rd    (cpu_rd),
    .mem_rdata (cpu_rdata),
    .ef_n      (ef_n),
    .int_n     (int_n),
    .dma_in_n  (ext_dma_in_n),
    .dma_out_n (dma_out_n),
    .n_lines   (n_lines),
    .bus_out   (bus_out),
    .out_valid (out_valid),
    .bus_in    (bus_in),
    .q         (q),
    .sc        (sc),
    .tpb       (tpb),
    .dbg       (dbg)
  );

  ram_dp #(.ADDR_W(RAM_ADDR_W), .DATA_W(8)) u_ram (
    .clk     (clk),
    .addr_a  (ram_a_addr),
    .wdata_a (ram_a_wdata),
    .we_a    (ram_a_we),
    .rdata_a (ram_a_rdata),
    .addr_b  (ma[RAM_ADDR_W-1:0]),
    .wdata_b (cpu_wdata),
    .we_b    (cpu_we),
    .rdata_b (cpu_rdata)
  );

  // display
  logic [7:0] fb_waddr, fb_wdata;
  logic       fb_we, frame_start, display_on;

  display_dma #(.BYTES(256), .DMA_DELAY(DMA_DELAY)) u_ddma (
    .clk         (clk),
    .rst         (rst || mode == M_RESET),
    .frame_start (frame_start),
    .sc          (sc),
    .tpb         (tpb),
    .n_lines     (n_lines),
    .out_valid   (out_valid),
    .bus_out     (bus_out),
    .int_n       (disp_int_n),
    .dma_out_n   (disp_dma_out_n),
    .fb_waddr    (fb_waddr),
    .fb_wdata    (fb_wdata),
    .fb_we       (fb_we),
    .display_on  (display_on)
  );

  vga_display u_vga (
    .clk         (clk),
    .rst         (rst),
    .fb_waddr    (fb_waddr),
    .fb_wdata    (fb_wdata),
    .fb_we       (fb_we),
    .vga_r       (vga_r),
    .vga_g       (vga_g),
    .vga_b       (vga_b),
    .vga_clk     (vga_clk),
    .vga_hs      (vga_hs),
    .vga_vs      (vga_vs),
    .vga_blank_n (vga_blank_n),
    .vga_sync_n  (vga_sync_n),
    .frame_start (frame_start)
  );

  // debug displays
  hex7seg u_h0 (.digit(ma[3:0]),      .seg_n(hex0));
  hex7seg u_h1 (.digit(ma[7:4]),      .seg_n(hex1));
  hex7seg u_h2 (.digit(dbg.pc[3:0]),  .seg_n(hex2));
  hex7seg u_h3 (.digit(dbg.pc[7:4]),  .seg_n(hex3));
  hex7seg u_h4 (.digit(dbg.d[3:0]),   .seg_n(hex4));
  hex7seg u_h5 (.digit(dbg.d[7:4]),   .seg_n(hex5));

  assign ledr = {mode, dbg.df, dbg.q, dbg.ie, dbg.idle, display_on, cpu_rd, sc};

endmodule
