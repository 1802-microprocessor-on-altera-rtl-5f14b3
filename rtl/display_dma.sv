// display_dma: loads the framebuffer from 1802 memory, once per frame, in
// the manner of the CDP1861 video controller.
//
// The display is switched on by an input instruction addressed to it
// (n_lines == IO_N with the core in its execute cycle and not driving an
// output: INP 1, opcode 69 at the default) and off by an output instruction
// to the same N (OUT 1, opcode 61). While on, each frame_start does this:
//   1. int_n goes low, requesting an interrupt;
//   2. when the core takes it (state code INT at tpb), int_n is released and
//      DMA_DELAY machine cycles are counted, in which the interrupt routine
//      points R(0) at the picture in memory;
//   3. dma_out_n goes low until BYTES DMA-OUT cycles have each delivered a
//      byte (state code DMA, out_valid at tpb); byte k is written to
//      framebuffer byte k.
// dma_out_n is released combinationally in the machine cycle that delivers
// the last byte, so the core takes exactly BYTES DMA cycles.
//
// The interrupt-then-DMA handshake follows the document's description of
// the CDP1861 and the 1802's DMA-OUT cycle; the on/off instructions, the
// fixed delay and the once-per-frame whole-picture transfer are this
// design's choices.
module display_dma
  import cdp1802_pkg::*;
#(
  parameter int unsigned BYTES     = 256,
  parameter int unsigned DMA_DELAY = 32,
  parameter logic [2:0]  IO_N      = 3'd1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     frame_start,
  // from the core
  input  sc_e                      sc,
  input  logic                     tpb,
  input  logic [2:0]               n_lines,
  input  logic                     out_valid,
  input  logic [7:0]               bus_out,
  // to the core
  output logic                     int_n,
  output logic                     dma_out_n,
  // framebuffer write port
  output logic [$clog2(BYTES)-1:0] fb_waddr,
  output logic [7:0]               fb_wdata,
  output logic                     fb_we,
  output logic                     display_on
);

  typedef enum logic [1:0] {D_IDLE, D_INT, D_WAIT, D_DMA} dstate_e;
  dstate_e st;

  logic [$clog2(BYTES)-1:0]     cnt;
  logic [$clog2(DMA_DELAY+1)-1:0] dly;
  logic take_byte, last_byte;

  assign take_byte = (st == D_DMA) && (sc == SC_DMA) && tpb && out_valid;
  assign last_byte = take_byte && (cnt == ($clog2(BYTES))'(BYTES - 1));

  assign int_n     = !(st == D_INT);
  assign dma_out_n = !((st == D_DMA) && !last_byte);

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= D_IDLE;
      cnt        <= '0;
      dly        <= '0;
      fb_we      <= 1'b0;
      fb_waddr   <= '0;
      fb_wdata   <= '0;
      display_on <= 1'b0;
    end else begin
      fb_we <= 1'b0;
      // on/off by I/O instruction, sampled at the end of its execute cycle
      if (tpb && sc == SC_EXECUTE && n_lines == IO_N) display_on <= !out_valid;

      unique case (st)
        D_IDLE: if (frame_start && display_on) st <= D_INT;
        D_INT: if (tpb && sc == SC_INT) begin
          st  <= D_WAIT;
          dly <= '0;
        end
        D_WAIT: if (tpb) begin
          if (dly == ($clog2(DMA_DELAY+1))'(DMA_DELAY - 1)) begin
            st  <= D_DMA;
            cnt <= '0;
          end else begin
            dly <= dly + 1'b1;
          end
        end
        default: if (take_byte) begin
          fb_we    <= 1'b1;
          fb_waddr <= cnt;
          fb_wdata <= bus_out;
          cnt      <= cnt + 1'b1;
          if (last_byte) st <= D_IDLE;
        end
      endcase
    end
  end

  // Handshake rule: the interrupt request and the DMA request are never
  // raised together, and the framebuffer is written once per accepted byte.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (int_n || dma_out_n)
        else $error("display_dma: interrupt and DMA-OUT requested together");
      assert (!fb_we || cnt != '0 || st == D_IDLE)
        else $error("display_dma: framebuffer write without an accepted byte");
    end
  end

endmodule
