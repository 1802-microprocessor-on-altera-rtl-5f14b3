// alu1802: the 1802 arithmetic/logic unit.
//
// Combinational. It combines the accumulator D with a memory operand M and
// produces a new D and a new DF (carry/borrow flag). Addition sets DF to the
// carry out. Subtraction is done as addition of the one's complement, so DF
// after a subtraction is 1 when no borrow occurred and 0 when one did, as on
// the original part. With use_carry set, the old DF enters the sum as the
// carry in (ADC), or as "not borrow" in subtraction (SDB, SMB). Logic
// operations leave DF unchanged.
//
// The operation set and the DF convention follow the 1802 instruction set;
// how the operation is encoded (alu_op_e) is this design's choice.
module alu1802
  import cdp1802_pkg::*;
(
  input  alu_op_e    op,
  input  logic       use_carry,   // ADC/SDB/SMB and their immediate forms
  input  logic [7:0] d,
  input  logic [7:0] m,
  input  logic       df_in,
  output logic [7:0] result,
  output logic       df_out
);

  logic       cin;
  logic [8:0] sum;

  always_comb begin
    cin = use_carry ? df_in : 1'b0;
    sum = '0;
    result = d;
    df_out = df_in;
    unique case (op)
      ALU_OR:  result = d | m;
      ALU_AND: result = d & m;
      ALU_XOR: result = d ^ m;
      ALU_ADD: begin
        sum = {1'b0, d} + {1'b0, m} + {8'd0, cin};
        {df_out, result} = sum;
      end
      ALU_SD: begin
        // M - D: M + ~D + 1, or M + ~D + DF with borrow
        sum = {1'b0, m} + {1'b0, ~d} + {8'd0, use_carry ? df_in : 1'b1};
        {df_out, result} = sum;
      end
      ALU_SM: begin
        // D - M
        sum = {1'b0, d} + {1'b0, ~m} + {8'd0, use_carry ? df_in : 1'b1};
        {df_out, result} = sum;
      end
      default: begin
        result = d;
        df_out = df_in;
      end
    endcase
  end

endmodule
