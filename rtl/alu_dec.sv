// alu_dec: ALU decoder. Maps an instruction's opcode, funct3 and funct7 bit 5 to the
// ALU operation. Register-register ops use funct7[5] to pick SUB/SRA; immediate ops use it
// only for SRAI. Loads, stores, JALR and anything else use ADD (address arithmetic); LUI
// uses COPY_B. Combinational; evaluated in the fetch/decode stage so the choice is
// registered with the instruction into the execute stage.
// The decoder's place in the fetch/decode stage follows the design description; its
// mapping to this design's own ALU encoding is a local choice.
module alu_dec
  import riscv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic       funct7_5,
  output alu_op_e    op
);
  alu_op_e arith;

  always_comb begin
    unique case (funct3)
      3'b000: arith = (opcode == OPC_REG && funct7_5) ? ALU_SUB : ALU_ADD;
      3'b001: arith = ALU_SLL;
      3'b010: arith = ALU_SLT;
      3'b011: arith = ALU_SLTU;
      3'b100: arith = ALU_XOR;
      3'b101: arith = funct7_5 ? ALU_SRA : ALU_SRL;
      3'b110: arith = ALU_OR;
      default: arith = ALU_AND;
    endcase
    unique case (opcode)
      OPC_REG, OPC_IMM: op = arith;
      OPC_LUI:          op = ALU_COPY_B;
      default:          op = ALU_ADD;
    endcase
  end
endmodule
