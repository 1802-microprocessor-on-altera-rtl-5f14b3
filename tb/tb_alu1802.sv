// tb_alu1802: exhaustive check of the 1802 ALU.
//
// Every operation is applied to every pair of 8-bit operands with DF = 0
// and DF = 1, with and without the carry/borrow input. Expected values are
// computed with integer arithmetic: a sum above 255 sets DF; a difference
// below zero clears DF (DF = 1 means "no borrow"); logic operations keep DF.
module tb_alu1802;
  import cdp1802_pkg::*;

  alu_op_e    op;
  logic       use_carry, df_in, df_out;
  logic [7:0] d, m, result;

  alu1802 dut (.*);

  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[6] = '{ALU_OR, ALU_AND, ALU_XOR, ALU_ADD, ALU_SD, ALU_SM};
    foreach (ops[o]) begin
      for (int uc = 0; uc < 2; uc++)
        for (int f = 0; f < 2; f++)
          for (int a = 0; a < 256; a++)
            for (int b = 0; b < 256; b++) begin
              int s, er, edf;
              op = ops[o]; use_carry = uc[0]; df_in = f[0]; d = a[7:0]; m = b[7:0];
              #1;
              edf = f;
              case (ops[o])
                ALU_OR:  er = a | b;
                ALU_AND: er = a & b;
                ALU_XOR: er = a ^ b;
                ALU_ADD: begin s = a + b + (uc ? f : 0); er = s & 255; edf = (s > 255); end
                ALU_SD:  begin s = b - a - (uc ? 1 - f : 0); er = s & 255; edf = (s >= 0); end
                default: begin s = a - b - (uc ? 1 - f : 0); er = s & 255; edf = (s >= 0); end
              endcase
              checks++;
              if (result != er[7:0] || df_out != edf[0]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL op=%s uc=%0d df=%0d d=%h m=%h -> %h/%b expected %h/%0d",
                           op.name(), uc, f, a, b, result, df_out, er, edf);
              end
            end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
