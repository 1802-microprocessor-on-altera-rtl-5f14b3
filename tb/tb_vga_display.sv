// tb_vga_display: two full 640x480 frames checked pixel by pixel.
//
// A random picture is written into the framebuffer first. The testbench
// then counts pixel periods itself (one per VGA_CLK period, i.e. two system
// clocks) and, for screen pixel (h, v), expects: blank_n high only inside
// 640 x 480; HS low for h in 656..751 and VS low for v in 490..491 (standard
// 640x480 @ 60 Hz timing); white where the picture bit of framebuffer pixel
// (v / 15, h / 10) is 1 and black elsewhere. frame_start must pulse once
// per frame.
module tb_vga_display;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst;
  logic [7:0] fb_waddr, fb_wdata;
  logic       fb_we;
  logic [7:0] vga_r, vga_g, vga_b;
  logic       vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n, frame_start;

  vga_display dut (.*);

  logic [7:0] img [256];
  int checks = 0, failures = 0;
  int k = -1, frames_started = 0;
  bit run = 0;

  task automatic fail(input string what, input int h, input int v);
    failures++;
    if (failures < 10) $display("FAIL %s at h=%0d v=%0d", what, h, v);
  endtask

  always @(posedge clk) if (frame_start) frames_started++;

  always @(negedge clk) begin
    if (run && !vga_clk) begin
      if (k >= 0) begin
        int h, v;
        bit act, bitv;
        h = k % 800; v = (k / 800) % 525;
        act = (h < 640) && (v < 480);
        bitv = act ? img[(v / 15) * 8 + (h / 10) / 8][7 - ((h / 10) % 8)] : 1'b0;
        checks++;
        if (vga_blank_n != act) fail("blank", h, v);
        if (vga_hs != !(h >= 656 && h < 752)) fail("hsync", h, v);
        if (vga_vs != !(v >= 490 && v < 492)) fail("vsync", h, v);
        if ({vga_r, vga_g, vga_b} != (bitv ? 24'hFFFFFF : 24'h0)) fail("colour", h, v);
      end
      k++;
    end
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; fb_we = 0;
    for (int b = 0; b < 256; b++) begin
      @(negedge clk);
      fb_waddr = b[7:0]; fb_wdata = 8'($urandom); fb_we = 1; img[b] = fb_wdata;
    end
    @(negedge clk); fb_we = 0;
    rst = 0; run = 1;
    wait (k == 2 * 800 * 525);
    checks++;
    if (frames_started != 2) begin
      failures++; $display("FAIL frame_start count %0d", frames_started);
    end
    checks++;
    if (vga_sync_n != 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
