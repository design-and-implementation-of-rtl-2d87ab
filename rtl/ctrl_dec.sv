// ctrl_dec: main instruction decoder of the fetch/decode stage.
// Turns a 32-bit RV32I instruction into the control bundle (ctrl_t) that is registered into
// the execute stage (CTRL register) and then into the memory/writeback stage. The register
// write enable is low for branches, stores and any instruction whose rd is x0. The only
// system instructions decoded are CSRRW/CSRRWI to the tohost CSR; every other unrecognised
// instruction decodes as a no-op. Combinational.
// The register-write rule and the NOP on kill follow the design description; the layout
// of the control bundle and the CSR subset are this implementation's own.
module ctrl_dec
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       rd_nz;

  always_comb begin
    opcode = inst[6:0];
    funct3 = inst[14:12];
    rd_nz  = inst[11:7] != 5'd0;
    ctrl   = CTRL_NOP;
    unique case (opcode)
      OPC_LUI, OPC_IMM, OPC_REG: ctrl.reg_we = rd_nz;
      OPC_AUIPC: begin
        ctrl.reg_we = rd_nz;
        ctrl.ex_sel = EX_TGT;
      end
      OPC_JAL: begin
        ctrl.reg_we = rd_nz;
        ctrl.jal    = 1'b1;
        ctrl.ex_sel = EX_PC4;
      end
      OPC_JALR: begin
        ctrl.reg_we = rd_nz;
        ctrl.jalr   = 1'b1;
        ctrl.ex_sel = EX_PC4;
      end
      OPC_BRANCH: ctrl.branch = 1'b1;
      OPC_LOAD: begin
        ctrl.reg_we = rd_nz;
        ctrl.mem_re = 1'b1;
        ctrl.wb_sel = WB_MEM;
      end
      OPC_STORE: ctrl.mem_we = 1'b1;
      OPC_SYSTEM: begin
        if (inst[31:20] == CSR_TOHOST && (funct3 == 3'b001 || funct3 == 3'b101)) begin
          ctrl.csr_we  = 1'b1;
          ctrl.csr_imm = funct3[2];
          ctrl.reg_we  = rd_nz;
          ctrl.wb_sel  = WB_CSR;
        end
      end
      default: ctrl = CTRL_NOP;
    endcase
  end
endmodule
