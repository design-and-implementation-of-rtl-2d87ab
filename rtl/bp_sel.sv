// bp_sel: bypass select and load-use hazard detection of the fetch/decode stage.
// The core has two bypass paths into the decode-stage operand muxes: the ALU bypass carries
// the execute-stage result, the memory bypass carries the memory/writeback-stage result.
// For the decode instruction, each source register it actually reads (rs1 into OP1, rs2 into
// OP2 when OP2 is not an immediate, rs2 into RS2 for stores and branches) is compared with
// the destination of the execute and memory stages; the younger (execute) match wins.
// A match on an execute-stage load or CSR read cannot be bypassed, because that value only
// exists in the memory stage: stall is raised, the decode instruction is held one cycle and
// a bubble goes to execute. x0 never matches. Combinational.
// The two bypass paths, the three bypass muxes and the load-use bubble follow the design
// description; the priority of the execute-stage match and the exact per-opcode source list
// are this implementation's own.
module bp_sel
  import riscv_pkg::*;
(
  input  logic [6:0] d_opcode,
  input  logic [4:0] d_rs1,
  input  logic [4:0] d_rs2,
  input  logic       d_csr_imm,   // csrrwi: no rs1 read
  input  logic [4:0] e_rd,
  input  logic       e_reg_we,
  input  logic       e_late,      // execute instruction's result is produced in the memory stage
  input  logic [4:0] m_rd,
  input  logic       m_reg_we,
  output bp_sel_e    op1_bp_sel,
  output bp_sel_e    op2_bp_sel,
  output bp_sel_e    rs2_bp_sel,
  output logic       stall
);
  logic uses_rs1, uses_rs2, op2_is_rs2;

  function automatic bp_sel_e pick(input logic uses, input logic [4:0] rs,
                                   input logic [4:0] erd, input logic ewe,
                                   input logic [4:0] mrd, input logic mwe);
    if (!uses || rs == 5'd0)       return BP_NONE;
    else if (ewe && erd == rs)     return BP_ALU;
    else if (mwe && mrd == rs)     return BP_MEM;
    else                           return BP_NONE;
  endfunction

  always_comb begin
    unique case (d_opcode)
      OPC_JALR, OPC_LOAD, OPC_IMM: begin uses_rs1 = 1'b1; uses_rs2 = 1'b0; end
      OPC_BRANCH, OPC_STORE, OPC_REG: begin uses_rs1 = 1'b1; uses_rs2 = 1'b1; end
      OPC_SYSTEM: begin uses_rs1 = !d_csr_imm; uses_rs2 = 1'b0; end
      default: begin uses_rs1 = 1'b0; uses_rs2 = 1'b0; end
    endcase
    op2_is_rs2 = d_opcode == OPC_REG;

    op1_bp_sel = pick(uses_rs1, d_rs1, e_rd, e_reg_we, m_rd, m_reg_we);
    op2_bp_sel = pick(op2_is_rs2, d_rs2, e_rd, e_reg_we, m_rd, m_reg_we);
    rs2_bp_sel = pick(uses_rs2, d_rs2, e_rd, e_reg_we, m_rd, m_reg_we);
    stall = e_late && ((op1_bp_sel == BP_ALU) || (rs2_bp_sel == BP_ALU));
  end
endmodule
