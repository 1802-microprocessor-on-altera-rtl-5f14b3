// tb_workload_test_programs: the two small hardware test programs of the
// original bring-up, run on the whole system at its default sizes.
//
// Each program is loaded through the host port exactly as the host software
// would do it: a write to 0x014 resets the core (it then waits in LOAD),
// the bytes are written from address 0, the rest of the first 32 bytes is
// cleared, and a write to 0x010 starts the core. The testbench waits for
// the idle flag on the LEDs (the programs end in IDL), stops the core with a
// second write to 0x010 and reads the memory back through the host port.
//
//   LDN test:  PLO 1; LDN 1; INC 1; STR 1; IDL    = A1 01 11 51 00
//     R1 <- 0, D <- M(0) (the PLO 1 opcode, A1), R1 <- 1, M(1) <- A1.
//   LDX test:  PLO 1; LDX; STR 1; IDL             = A1 F0 51 00
//     after reset X = P = 0, so LDX reads through the program counter,
//     which points at the next opcode (STR 1, 51); STR 1 stores it at M(0).
//
// The expected memory, D and R1 are worked out above by hand from the
// instruction definitions. The clocks from RUN to the idle flag are
// checked against 4 (initialisation cycle) + 8 per instruction, IDL
// included (the idle flag rises at the end of the IDL execute cycle).
module tb_workload_test_programs;
  import cdp1802_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

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

  localparam int LED_IDLE = 4;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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
    v = avs_readdata;
    avs_chipselect = 0;
  endtask

  // Load, run to IDL, stop. Returns the clocks from RUN to the idle flag.
  task automatic run_program(input logic [7:0] code [$], output int clocks);
    host_write(12'h014, 8'h00);
    check(ledr[9:8] == M_RESET, "0x014 resets the core for one clock");
    @(negedge clk);
    check(ledr[9:8] == M_LOAD, "0x014 leaves the core in LOAD");
    for (int a = 0; a < 32; a++)
      host_write(12'(a), (a < code.size()) ? code[a] : 8'h00);
    host_write(12'h010, 8'h00);
    clocks = 0;
    while (!ledr[LED_IDLE] && clocks < 1000) begin
      @(posedge clk);
      clocks++;
    end
    check(ledr[LED_IDLE], "program reaches IDL");
    repeat (20) @(posedge clk);
    check(ledr[LED_IDLE], "core stays in IDL");
    host_write(12'h010, 8'h00);
    check(ledr[9:8] == M_LOAD, "0x010 stops the core");
  endtask

  initial begin
    logic [7:0] v;
    int clocks;
    rst = 1;
    avs_address = '0; avs_writedata = '0; avs_write = 0; avs_chipselect = 0;
    ef_n = 4'hF; ext_int_n = 1; ext_dma_in_n = 1; ext_dma_out_n = 1;
    bus_in = 8'h00;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---------------------------------------------------------- LDN test
    run_program('{8'hA1, 8'h01, 8'h11, 8'h51, 8'h00}, clocks);
    check(clocks == 4 + 5 * 8, $sformatf("LDN test: %0d clocks to IDL", clocks));
    host_read(12'h000, v); check(v == 8'hA1, "LDN test: M(0) unchanged");
    host_read(12'h001, v); check(v == 8'hA1, "LDN test: M(1) = A1");
    host_read(12'h002, v); check(v == 8'h11, "LDN test: M(2) unchanged");
    check(dut.u_cpu.dbg.d == 8'hA1, "LDN test: D = A1");
    check(dut.u_cpu.r[1] == 16'h0001, "LDN test: R1 = 1");
    check(hex5 == 7'b0001000 && hex4 == 7'b1111001, "LDN test: HEX5/4 show A1");

    // ---------------------------------------------------------- LDX test
    run_program('{8'hA1, 8'hF0, 8'h51, 8'h00}, clocks);
    check(clocks == 4 + 4 * 8, $sformatf("LDX test: %0d clocks to IDL", clocks));
    host_read(12'h000, v); check(v == 8'h51, "LDX test: M(0) = 51");
    host_read(12'h001, v); check(v == 8'hF0, "LDX test: M(1) unchanged");
    check(dut.u_cpu.dbg.d == 8'h51, "LDX test: D = 51");
    check(dut.u_cpu.r[1] == 16'h0000, "LDX test: R1 = 0");
    check(hex5 == 7'b0010010 && hex4 == 7'b1111001, "LDX test: HEX5/4 show 51");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
