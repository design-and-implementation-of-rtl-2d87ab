// alu: RV32I integer ALU of the execute stage.
// Computes one of eleven operations on the two execute-stage operands E_OP1 (a) and
// E_OP2 (b). COPY_B passes b through and serves LUI, whose operand 1 is not a register.
// Purely combinational; the result is registered in M_ALU_OUT by the pipeline.
// The operation set is RV32I's; the encoding of alu_op is this design's own.
module alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << b[4:0];
      ALU_SLT:    y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'b0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> b[4:0];
      ALU_SRA:    y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_COPY_B: y = b;
      default:    y = a + b;
    endcase
  end
endmodule
