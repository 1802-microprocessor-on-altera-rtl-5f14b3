// tb_framebuffer: writes random bytes and reads every pixel back.
//
// Pixel (row, col) must equal bit 7 - (col mod 8) of byte row*8 + col/8,
// one clock after its address is presented.
module tb_framebuffer;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  waddr, wdata;
  logic        we, pixel;
  logic [10:0] raddr;

  framebuffer dut (.*);

  logic [7:0] img [256];
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int b = 0; b < 256; b++) begin
        @(negedge clk);
        waddr = b[7:0]; wdata = 8'($urandom); we = 1; img[b] = wdata;
      end
      @(negedge clk); we = 0;
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 64; c++) begin
          @(negedge clk);
          raddr = {r[4:0], c[5:0]};
          @(posedge clk); #1;
          checks++;
          if (pixel != img[r * 8 + c / 8][7 - (c % 8)]) begin
            failures++;
            if (failures < 10) $display("FAIL pixel %0d,%0d", r, c);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
