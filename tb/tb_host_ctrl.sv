// tb_host_ctrl: checks the host port decoder and the run/reset control.
//
// Checks that ordinary writes reach the RAM port with the host's address
// and data, that the two reserved addresses do not, that system reset and
// a write to 0x014 pass through RESET into LOAD, and that writes to 0x010
// toggle LOAD and RUN, with CLEAR/WAIT following the mode.
module tb_host_ctrl;
  import cdp1802_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst;
  logic [11:0] avs_address, ram_addr;
  logic [7:0]  avs_writedata, avs_readdata, ram_wdata, ram_rdata;
  logic        avs_write, avs_chipselect, ram_we, clear_n, wait_n;
  mode_e       mode;

  host_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (mode %s)", what, mode.name()); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [7:0] v, output logic saw_we);
    @(negedge clk);
    avs_address = a; avs_writedata = v; avs_write = 1; avs_chipselect = 1;
    #1;
    saw_we = ram_we;
    check(ram_addr == a && ram_wdata == v, "address and data to RAM port");
    @(negedge clk);
    avs_write = 0; avs_chipselect = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic w;
    avs_write = 0; avs_chipselect = 0; avs_address = 0; avs_writedata = 0;
    ram_rdata = 8'h5A;
    rst = 1;
    @(negedge clk);
    check(mode == M_RESET && !clear_n && wait_n, "reset -> RESET");
    rst = 0;
    @(negedge clk);
    check(mode == M_LOAD && !clear_n && !wait_n, "RESET -> LOAD");
    #1 check(avs_readdata == 8'h5A, "read data from RAM port");
    wr(12'h200, 8'hAB, w);       check(w, "ordinary write reaches RAM");
    check(mode == M_LOAD, "ordinary write leaves mode");
    wr(12'h010, 8'h00, w);       check(!w, "control write kept from RAM");
    check(mode == M_RUN && clear_n && wait_n, "0x010 toggles LOAD -> RUN");
    // chipselect low: no effect
    @(negedge clk); avs_address = 12'h010; avs_write = 1; avs_chipselect = 0; #1;
    check(!ram_we, "no write without chipselect");
    @(negedge clk); avs_write = 0;
    check(mode == M_RUN, "no toggle without chipselect");
    wr(12'h010, 8'h00, w);
    check(mode == M_LOAD, "0x010 toggles RUN -> LOAD");
    wr(12'h010, 8'h00, w);
    check(mode == M_RUN, "0x010 toggles LOAD -> RUN again");
    @(negedge clk);
    avs_address = 12'h014; avs_write = 1; avs_chipselect = 1; #1;
    check(!ram_we, "reset write kept from RAM");
    @(negedge clk); avs_write = 0; avs_chipselect = 0;
    check(mode == M_RESET && !clear_n && wait_n, "0x014 -> RESET");
    @(negedge clk);
    check(mode == M_LOAD, "then LOAD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
