// tb_display_dma: the display handshake against a machine-cycle level
// stand-in for the 1802 bus.
//
// The stand-in produces one machine cycle per four clocks with tpb in the
// last, and picks its next cycle as the 1802 does: DMA while dma_out_n is
// low (putting the next byte of a test picture on bus_out with out_valid),
// otherwise an interrupt cycle when int_n is low, otherwise an execute
// cycle. It can also issue the display's on/off I/O instructions.
// Checked: no interrupt while the display is off; INP 1 turns it on and
// OUT 1 off; after frame_start the interrupt is requested, released once
// taken, DMA starts exactly DMA_DELAY machine cycles after the interrupt
// cycle, exactly 256 DMA cycles follow, and every byte lands at its address
// in the framebuffer port, for three frames with different pictures.
module tb_display_dma;
  import cdp1802_pkg::*;
  localparam int DELAY = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, frame_start, tpb, out_valid, int_n, dma_out_n, fb_we, display_on;
  sc_e        sc;
  logic [2:0] n_lines;
  logic [7:0] bus_out, fb_waddr, fb_wdata;

  display_dma #(.BYTES(256), .DMA_DELAY(DELAY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // bus stand-in
  logic [1:0] cc = 0;
  int   mc = 0;                    // machine cycle count
  int   dma_count = 0, int_mc = -1, first_dma_mc = -1;
  logic [7:0] picture [256];
  logic [2:0] io_n_req = 0;
  bit         io_is_out = 0;
  assign tpb = (cc == 2'd3);

  always @(posedge clk) begin
    if (rst) begin
      cc <= 0; sc <= SC_EXECUTE; out_valid <= 0; n_lines <= 0;
    end else begin
      cc <= cc + 1;
      if (cc == 2'd2) begin
        out_valid <= (sc == SC_DMA) || (sc == SC_EXECUTE && io_is_out && n_lines != 0);
        if (sc == SC_DMA) bus_out <= picture[dma_count % 256];
      end
      if (cc == 2'd3) begin
        out_valid <= 0;
        mc++;
        if (sc == SC_DMA) dma_count++;
        n_lines <= 0;
        if (!dma_out_n) begin
          sc <= SC_DMA;
          if (first_dma_mc < 0) first_dma_mc = mc;
        end else if (!int_n) begin
          sc <= SC_INT; int_mc = mc;
        end else begin
          sc <= SC_EXECUTE;
          n_lines <= io_n_req; io_n_req <= 0;
        end
      end
    end
  end

  // framebuffer port model
  logic [7:0] fb [256];
  int fb_writes = 0;
  always @(posedge clk) if (fb_we) begin fb[fb_waddr] <= fb_wdata; fb_writes++; end

  task automatic io(input logic [2:0] n, input bit is_out);
    @(negedge clk); io_n_req = n; io_is_out = is_out;
    repeat (12) @(negedge clk);
  endtask

  task automatic pulse_frame();
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_start = 0; rst = 1;
    foreach (picture[b]) picture[b] = 8'($urandom);
    repeat (3) @(negedge clk); rst = 0;
    // display off: a frame start causes nothing
    pulse_frame();
    repeat (200) @(negedge clk);
    check(int_mc < 0 && dma_count == 0 && int_n && dma_out_n, "no request while off");
    // an unrelated input instruction (N=2) does not turn it on
    io(3'd2, 1'b0);
    check(!display_on, "INP 2 ignored");
    io(3'd1, 1'b0);
    check(display_on, "INP 1 turns display on");
    // three frames, each with a new picture
    for (int f = 0; f < 3; f++) begin
      foreach (picture[b]) picture[b] = 8'($urandom);
      dma_count = 0; fb_writes = 0; int_mc = -1; first_dma_mc = -1;
      pulse_frame();
      repeat (3) @(negedge clk);
      check(!int_n, "interrupt requested at frame start");
      wait (dma_count >= 256 && sc != SC_DMA);
      repeat (40) @(negedge clk);
      check(int_mc > 0, "interrupt taken");
      // the difference counts the interrupt cycle itself plus DELAY cycles
      check(first_dma_mc - int_mc == DELAY + 1,
            "exactly DMA_DELAY machine cycles between the interrupt and DMA cycles");
      check(dma_count == 256, "exactly 256 DMA cycles");
      check(fb_writes == 256, "256 framebuffer writes");
      foreach (fb[b]) check(fb[b] == picture[b], $sformatf("framebuffer byte %0d", b));
    end
    check(int_n && dma_out_n, "requests released");
    // OUT 1 turns it off again
    io(3'd1, 1'b1);
    check(!display_on, "OUT 1 turns display off");
    int_mc = -1;
    pulse_frame();
    repeat (100) @(negedge clk);
    check(int_mc < 0 && int_n, "no request after switching off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
