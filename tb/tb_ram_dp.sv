// tb_ram_dp: random traffic on both ports of the 4 KB dual-port RAM.
//
// A shadow array in the testbench holds the expected contents. Each clock
// both ports get a random address and, randomly, a write; the read data one
// clock later must equal the shadow contents before that clock's writes.
// Same-address writes from both ports are avoided (undefined).
module tb_ram_dp;
  localparam int AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] addr_a, addr_b;
  logic [7:0]    wdata_a, wdata_b, rdata_a, rdata_b;
  logic          we_a, we_b;

  ram_dp dut (.*);

  logic [7:0] shadow [2**AW];
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_a, exp_b;
    // initialise through port A, both ports in parallel halves
    for (int k = 0; k < 2**(AW-1); k++) begin
      @(negedge clk);
      addr_a = AW'(k); addr_b = AW'(k + 2**(AW-1));
      wdata_a = 8'($urandom); wdata_b = 8'($urandom);
      we_a = 1; we_b = 1;
      shadow[addr_a] = wdata_a; shadow[addr_b] = wdata_b;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      addr_a = AW'($urandom); addr_b = AW'($urandom);
      if (k % 50 == 0) addr_b = addr_a;      // same-address read
      we_a = $urandom_range(0, 2) == 0;
      we_b = ($urandom_range(0, 2) == 0) && (addr_b != addr_a);
      wdata_a = 8'($urandom); wdata_b = 8'($urandom);
      exp_a = shadow[addr_a]; exp_b = shadow[addr_b];
      if (we_a) shadow[addr_a] = wdata_a;
      if (we_b) shadow[addr_b] = wdata_b;
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a != exp_a) begin failures++; $display("FAIL port A %h: %h vs %h", addr_a, rdata_a, exp_a); end
      if (rdata_b != exp_b) begin failures++; $display("FAIL port B %h: %h vs %h", addr_b, rdata_b, exp_b); end
    end
    // a written word reads back on the next access
    @(negedge clk); we_a = 0; we_b = 0; addr_a = 12'h123; addr_b = 12'h123;
    @(posedge clk); #1;
    checks++;
    if (rdata_a != shadow[12'h123] || rdata_b != shadow[12'h123]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
