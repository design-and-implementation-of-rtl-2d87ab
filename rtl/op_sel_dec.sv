// op_sel_dec: operand-2 select decoder of the fetch/decode stage.
// From the opcode it chooses what goes into the execute-stage OP2 register: the register
// operand rs2 (register-register ALU ops) or one of the immediates (I for ALU-immediate,
// loads and JALR, S for stores, B for branches, U for LUI/AUIPC, J for JAL), or zero for
// CSR instructions. Branches and jumps carry their offset in OP2 because the branch/jump
// target adder of the execute stage adds OP2 to the PC (or to OP1 for JALR).
// Combinational.
// The operand-2 mux and its decoder follow the design description; a zero operand for CSR
// instructions is this implementation's own.
module op_sel_dec
  import riscv_pkg::*;
(
  input  logic [6:0] opcode,
  output op2_sel_e   op2_sel,
  output imm_sel_e   imm_sel
);
  always_comb begin
    op2_sel = OP2_IMM;
    imm_sel = IMM_I;
    unique case (opcode)
      OPC_REG:    op2_sel = OP2_RS2;
      OPC_STORE:  imm_sel = IMM_S;
      OPC_BRANCH: imm_sel = IMM_B;
      OPC_LUI, OPC_AUIPC: imm_sel = IMM_U;
      OPC_JAL:    imm_sel = IMM_J;
      OPC_SYSTEM: op2_sel = OP2_ZERO;
      default:    imm_sel = IMM_I;  // OP-IMM, LOAD, JALR
    endcase
  end
endmodule
