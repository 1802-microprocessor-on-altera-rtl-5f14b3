// vga_display: scans the 64 x 32 framebuffer out as a 640 x 480 VGA picture.
//
// The system clock (50 MHz on the target board) is divided by two to give
// the 25 MHz pixel rate; VGA_CLK is that divided clock. A horizontal pixel
// counter and a line counter run through the standard 640x480 @ 60 Hz
// timing (800 x 525 including blanking, negative sync pulses). Each
// framebuffer pixel is shown as a block of PIX_W x PIX_H screen pixels
// (10 x 15 at the default sizes), white when its bit is 1 and black when it
// is 0. Sub-counters step through the block, so no division is needed.
//
// Timing: the framebuffer address for a screen pixel is presented in the
// first clock of its pixel period, the bit returns in the second, and all
// VGA outputs change together at the end of the second clock; the picture
// is therefore delayed by one pixel period relative to the counters, and
// sync is delayed by the same amount. frame_start pulses for one clock when
// the first blank line after the visible picture begins.
//
// The 64 x 32 resolution and the one-bit framebuffer follow the document;
// the VGA mode, the pixel replication and the colours are this design's
// choice. The framebuffer write port is passed through for the DMA writer.
module vga_display #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned COLS     = 64,
  parameter int unsigned ROWS     = 32
) (
  input  logic                           clk,
  input  logic                           rst,
  // framebuffer write port
  input  logic [$clog2(COLS*ROWS/8)-1:0] fb_waddr,
  input  logic [7:0]                     fb_wdata,
  input  logic                           fb_we,
  // VGA
  output logic [7:0]                     vga_r,
  output logic [7:0]                     vga_g,
  output logic [7:0]                     vga_b,
  output logic                           vga_clk,
  output logic                           vga_hs,
  output logic                           vga_vs,
  output logic                           vga_blank_n,
  output logic                           vga_sync_n,
  output logic                           frame_start
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned PIX_W   = H_ACTIVE / COLS;
  localparam int unsigned PIX_H   = V_ACTIVE / ROWS;
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);
  localparam int unsigned CW      = $clog2(COLS);
  localparam int unsigned RW      = $clog2(ROWS);
  localparam int unsigned SXW     = $clog2(PIX_W + 1);
  localparam int unsigned SYW     = $clog2(PIX_H + 1);

  logic          ph;          // 0: address phase, 1: data phase
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic [SXW-1:0] subx;
  logic [SYW-1:0] suby;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          pixel;

  logic h_active, v_active, line_end, frame_end;
  assign h_active  = hcount < HW'(H_ACTIVE);
  assign v_active  = vcount < VW'(V_ACTIVE);
  assign line_end  = hcount == HW'(H_TOTAL - 1);
  assign frame_end = vcount == VW'(V_TOTAL - 1);

  framebuffer #(.COLS(COLS), .ROWS(ROWS)) u_fb (
    .clk   (clk),
    .waddr (fb_waddr),
    .wdata (fb_wdata),
    .we    (fb_we),
    .raddr ({row, col}),
    .pixel (pixel)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ph          <= 1'b0;
      hcount      <= '0;
      vcount      <= '0;
      subx        <= '0;
      suby        <= '0;
      col         <= '0;
      row         <= '0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      ph          <= ~ph;
      frame_start <= 1'b0;
      if (ph) begin
        // outputs for the pixel at (hcount, vcount)
        vga_blank_n <= h_active && v_active;
        vga_hs <= !(hcount >= HW'(H_ACTIVE + H_FP) && hcount < HW'(H_ACTIVE + H_FP + H_SYNC));
        vga_vs <= !(vcount >= VW'(V_ACTIVE + V_FP) && vcount < VW'(V_ACTIVE + V_FP + V_SYNC));
        {vga_r, vga_g, vga_b} <= (h_active && v_active && pixel) ? {24{1'b1}} : 24'h0;

        // advance the counters
        if (line_end) begin
          hcount <= '0;
          subx   <= '0;
          col    <= '0;
          if (frame_end) begin
            vcount <= '0;
            suby   <= '0;
            row    <= '0;
          end else begin
            vcount <= vcount + 1'b1;
            if (vcount == VW'(V_ACTIVE - 1)) frame_start <= 1'b1;
            if (suby == SYW'(PIX_H - 1)) begin
              suby <= '0;
              row  <= row + 1'b1;
            end else begin
              suby <= suby + 1'b1;
            end
          end
        end else begin
          hcount <= hcount + 1'b1;
          if (subx == SXW'(PIX_W - 1)) begin
            subx <= '0;
            col  <= col + 1'b1;
          end else begin
            subx <= subx + 1'b1;
          end
        end
      end
    end
  end

  assign vga_clk    = ph;
  assign vga_sync_n = 1'b0;

endmodule
