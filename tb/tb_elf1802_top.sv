// tb_elf1802_top: end-to-end run of the whole system at its default sizes.
//
// The host loads an 1802 program through the Avalon port, reads part of it
// back, and starts the core with a write to 0x010. The program
//   - moves its program counter to R(5) (SEP 5) so that R(0) is free for DMA;
//   - sets up a stack in R(2) and an interrupt routine address in R(1);
//   - turns the display on with INP 1;
//   - draws a 256-byte picture at 0x0300, byte k = k XOR 0x5A;
//   - computes 0x37 + 0x4C = 0x83, shifts it left through DF (SHLC gives
//     0x06, DF = 1), stores it, and sends it out with OUT 4;
//   - sets Q and waits in a BN1 loop until EF1 is pulled low;
//   - long-branches to 0x0200 and idles (IDL, BR back to the IDL).
// Each frame the display interrupts; the routine saves T and D on the
// stack, points R(0) at 0x0300, counts the frame in R(4) and returns; 32
// machine cycles later the display takes the picture by 256 DMA-OUT cycles.
// The second frame on the VGA output is then checked pixel by pixel
// against the picture. The testbench also performs one external DMA-IN,
// stops the core (LOAD) and resets it through the host port, and checks the
// hex displays.
//
// The number of clocks from RUN to Q going high is checked against
// 4 (initialisation cycle) + 8 per instruction. Each mechanism (interrupt,
// DMA-OUT, DMA-IN, IDL wake-up, OUT, INP, EF branch, long branch, Q, LOAD
// stop, RESET) is counted, and one that never happened is a failure.
module tb_elf1802_top;
  import cdp1802_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;     // 50 MHz

  logic        rst;
  logic [11:0] avs_address;
  logic [7:0]  avs_writedata, avs_readdata;
  logic        avs_write, avs_chipselect;
  logic [3:0]  ef_n;
  logic        ext_int_n, ext_dma_in_n, ext_dma_out_n;
  logic [7:0]  bus_in, bus_out;
  logic        out_valid, q, tpb;
  logic [2:0]  n_lines;
  sc_e         sc;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [6:0]  hex0, hex1, hex2, hex3, hex4, hex5;
  logic [9:0]  ledr;

  elf1802_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ program
  // {address, bytes...} segments
  typedef struct { int addr; int len; logic [7:0] b [64]; } seg_t;
  seg_t prog [4];

  task automatic put(input int s, input int addr, input logic [7:0] bytes [$]);
    prog[s].addr = addr;
    prog[s].len  = bytes.size();
    foreach (bytes[k]) prog[s].b[k] = bytes[k];
  endtask

  localparam int N_INSTR_TO_SEQ = 5 + 14 + 256 * 6 + 4 + 3 + 4 + 1;

  initial begin
    // 0x0000: R5 = 0x0020, SEP 5
    put(0, 'h0000, '{8'hF8, 8'h00, 8'hB5, 8'hF8, 8'h20, 8'hA5, 8'hD5});
    put(1, 'h0020, '{
      8'hF8, 8'h0F, 8'hB2, 8'hF8, 8'hF0, 8'hA2,   // R2 = 0x0FF0
      8'hF8, 8'h01, 8'hB1, 8'hF8, 8'h02, 8'hA1,   // R1 = 0x0102
      8'hE2,                                      // SEX 2
      8'h69,                                      // INP 1: display on
      8'hF8, 8'h03, 8'hB3, 8'hF8, 8'h00, 8'hA3,   // R3 = 0x0300
      // 0x0034: loop
      8'h83, 8'hFB, 8'h5A, 8'h53, 8'h13, 8'h83, 8'h3A, 8'h34,
      // 0x003C
      8'hF8, 8'h04, 8'hB6, 8'hF8, 8'h80, 8'hA6,   // R6 = 0x0480
      8'hF8, 8'h37, 8'hFC, 8'h4C, 8'h7E,          // LDI 37, ADI 4C, SHLC
      8'h56, 8'hE6, 8'h64, 8'hE2,                 // STR R6, SEX 6, OUT 4, SEX 2
      8'h7B,                                      // SEQ
      // 0x004C
      8'h3C, 8'h4C,                               // BN1 0x4C
      8'hC0, 8'h02, 8'h00});                      // LBR 0x0200
    put(2, 'h0100, '{
      8'h72, 8'h70,                               // 0x0100: LDXA, RET
      8'h22, 8'h78, 8'h22, 8'h52,                 // 0x0102: DEC R2, SAV, DEC R2, STR R2
      8'hF8, 8'h03, 8'hB0, 8'hF8, 8'h00, 8'hA0,   // R0 = 0x0300
      8'h14,                                      // INC R4
      8'h30, 8'h00});                             // BR 0x0100
    put(3, 'h0200, '{8'h00, 8'h30, 8'h00});       // IDL, BR 0x0200
  end

  // ------------------------------------------------------------ host port
  task automatic host_write(input logic [11:0] a, input logic [7:0] v);
    @(negedge clk);
    avs_address = a; avs_writedata = v; avs_write = 1; avs_chipselect = 1;
    @(negedge clk);
    avs_write = 0; avs_chipselect = 0;
  endtask

  task automatic host_read(input logic [11:0] a, output logic [7:0] v);
    @(negedge clk);
    avs_address = a; avs_chipselect = 1;
    @(negedge clk);
    v = avs_readdata;     // one clock read latency
    avs_chipselect = 0;
  endtask

  // ------------------------------------------------------------ monitors
  int n_int = 0, n_dma_out = 0, n_dma_in = 0, n_idle_wake = 0, n_out4 = 0;
  int n_lbr = 0, n_frames = 0;
  logic [7:0] out4_data;
  bit prev_idle = 0;
  logic [15:0] prev_pc;

  always @(posedge clk) begin
    if (tpb && sc == SC_INT) n_int++;
    if (tpb && sc == SC_DMA && out_valid) n_dma_out++;
    if (tpb && sc == SC_DMA && !out_valid) n_dma_in++;
    if (tpb && sc == SC_EXECUTE && n_lines == 3'd4 && out_valid) begin
      n_out4++; out4_data = bus_out;
    end
    if (prev_idle && !ledr[4]) n_idle_wake++;
    prev_idle = ledr[4];
    if (prev_pc == 16'h0050 && dut.u_cpu.dbg.pc == 16'h0200) n_lbr++;
    prev_pc = dut.u_cpu.dbg.pc;
    if (dut.frame_start) n_frames++;
  end

  // VGA pixel checker for one frame, enabled by check_frame
  bit check_frame = 0, frame_done = 0;
  int k = -1, pix_bad = 0, pix_lit = 0;
  function automatic bit picture_bit(input int h, input int v);
    int b;
    b = (v / 15) * 8 + (h / 10) / 8;
    return ((b[7:0] ^ 8'h5A) >> (7 - (h / 10) % 8)) & 1;
  endfunction
  // frame boundary: the first pixel period after VS ends is line 492
  always @(negedge clk) begin
    if (check_frame && !frame_done && !vga_clk) begin
      if (k >= 0) begin
        int h, v;
        bit act, e;
        h = k % 800; v = k / 800;
        act = (h < 640) && (v < 480);
        e = act && picture_bit(h, v);
        if (e) pix_lit++;
        if (vga_blank_n != act || {vga_r, vga_g, vga_b} != (e ? 24'hFFFFFF : 24'h0)) begin
          pix_bad++;
          if (pix_bad < 5) $display("pixel mismatch h=%0d v=%0d", h, v);
        end
        if (k == 800 * 525 - 1) frame_done = 1;
        k++;
      end
    end
  end

  // hex digit decode, independent of the RTL table
  function automatic logic [6:0] seg_of(input logic [3:0] v);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    logic [6:0] s;
    s = 7'h7F;
    foreach (lit[v][j]) s[lit[v][j] - "a"] = 1'b0;
    return s;
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    logic [7:0] v;
    int t_run, t_q, bad;
    rst = 1;
    avs_address = 0; avs_writedata = 0; avs_write = 0; avs_chipselect = 0;
    ef_n = 4'hF; ext_int_n = 1; ext_dma_in_n = 1; ext_dma_out_n = 1; bus_in = 8'hA5;
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(ledr[9:8] == M_LOAD, "host control starts in LOAD");

    // load and verify
    foreach (prog[s]) for (int j = 0; j < prog[s].len; j++) host_write(12'(prog[s].addr + j), prog[s].b[j]);
    bad = 0;
    foreach (prog[s]) for (int j = 0; j < prog[s].len; j++) begin
      host_read(12'(prog[s].addr + j), v);
      if (v != prog[s].b[j]) bad++;
    end
    check(bad == 0, "program reads back through the host port");
    check(dut.u_cpu.dbg.pc == 16'h0000 && sc == SC_EXECUTE, "core held while loading");

    // run
    host_write(12'h010, 8'h00);
    t_run = $time;
    check(ledr[9:8] == M_RUN, "0x010 starts the core");
    wait (q == 1'b1);
    t_q = $time;
    // t_run is half a clock after the edge that entered RUN; then come the
    // 4-clock initialisation cycle and 8 clocks per instruction, and q
    // rises at the end of the third clock of the SEQ execute cycle
    check(t_q - t_run == (4 + 8 * N_INSTR_TO_SEQ - 1) * 20 - 10,
          $sformatf("clocks from RUN to SEQ (%0d ns, expected %0d)", t_q - t_run,
                    (4 + 8 * N_INSTR_TO_SEQ - 1) * 20 - 10));
    check(n_out4 == 1 && out4_data == 8'h06, "OUT 4 sends 0x37+0x4C shifted left through DF");
    check(ledr[7] == 1'b1, "DF set by SHLC");
    check(ledr[3] == 1'b1, "INP 1 turned the display on");
    repeat (200) @(negedge clk);
    check(dut.u_cpu.dbg.pc >= 16'h004C && dut.u_cpu.dbg.pc <= 16'h004E,
          "waiting on EF1");
    ef_n[0] = 1'b0;                  // EF1 asserted
    wait (ledr[4] == 1'b1);           // idling
    check(n_lbr == 1, "long branch to 0x0200 taken");
    ef_n[0] = 1'b1;

    // first frame: interrupt + 256 DMA-OUT, then check the second frame
    wait (n_frames == 1);
    wait (n_dma_out == 256);
    repeat (20) @(negedge clk);
    check(n_int == 1, "one interrupt per frame");
    check(dut.u_cpu.r[4] == 16'd1, "interrupt routine counted the frame");
    check(dut.u_cpu.r[0] == 16'h0400, "R(0) advanced by 256 DMA-OUT cycles");
    check(dut.u_cpu.r[2] == 16'h0FF0, "stack balanced after the interrupt routine");
    // align to the start of the next frame (vcount wraps to 0)
    // the outputs for pixel (0,0) change at the end of its second clock
    wait (dut.u_vga.vcount == 0 && dut.u_vga.hcount == 0 && dut.u_vga.ph == 1'b1);
    @(posedge clk);
    k = 0; check_frame = 1;
    wait (frame_done);
    check(pix_bad == 0, $sformatf("VGA frame shows the picture (%0d bad pixels)", pix_bad));
    check(pix_lit > 0, "picture has lit pixels");

    // external DMA-IN of one byte at R(0) = 0x0400 (after this frame's DMA-OUT)
    wait (n_dma_out == 512);
    repeat (20) @(negedge clk);
    bus_in = 8'h3C;
    ext_dma_in_n = 0;
    wait (sc == SC_DMA && !out_valid);
    @(negedge clk);
    ext_dma_in_n = 1;
    repeat (40) @(negedge clk);
    check(n_dma_in == 1, "one DMA-IN cycle");
    check(n_idle_wake > 0, "IDL woken by interrupt or DMA");

    // stop (LOAD) and read results through the host port
    host_write(12'h010, 8'h00);
    check(ledr[9:8] == M_LOAD, "0x010 stops the core");
    begin
      logic [15:0] pc0;
      pc0 = dut.u_cpu.dbg.pc;
      repeat (100) @(negedge clk);
      check(dut.u_cpu.dbg.pc == pc0, "core frozen in LOAD");
    end
    host_read(12'h400, v); check(v == 8'h3C, "DMA-IN byte in memory at 0x0400");
    host_read(12'h480, v); check(v == 8'h06, "stored result at 0x0480");
    bad = 0;
    for (int j = 0; j < 256; j++) begin
      host_read(12'(12'h300 + j), v);
      if (v != (8'(j) ^ 8'h5A)) bad++;
    end
    check(bad == 0, "picture in memory");
    // hex displays: D on HEX5/4, R(P) low byte on HEX3/2, address on HEX1/0
    check(hex5 == seg_of(dut.u_cpu.dbg.d[7:4]) && hex4 == seg_of(dut.u_cpu.dbg.d[3:0]), "HEX5/4 show D");
    check(hex3 == seg_of(dut.u_cpu.dbg.pc[7:4]) && hex2 == seg_of(dut.u_cpu.dbg.pc[3:0]), "HEX3/2 show R(P)");
    check(hex1 == seg_of(dut.u_cpu.ma[7:4]) && hex0 == seg_of(dut.u_cpu.ma[3:0]), "HEX1/0 show the address");
    check(dut.u_cpu.dbg.d == 8'h06, "D restored by the interrupt routine");

    // reset through the host port
    host_write(12'h014, 8'h00);
    @(negedge clk);
    check(ledr[9:8] == M_LOAD && q == 1'b0 && dut.u_cpu.dbg.pc == 16'h0000 && ledr[3] == 1'b0,
          "0x014 resets the core and waits in LOAD");

    check(n_int >= 2,      "interrupts happened");
    check(n_dma_out >= 512, "DMA-OUT cycles happened");
    $display("mechanisms: int=%0d dma_out=%0d dma_in=%0d idle_wake=%0d out=%0d lbr=%0d frames=%0d",
             n_int, n_dma_out, n_dma_in, n_idle_wake, n_out4, n_lbr, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
