// tb_bp_sel: self-checking test of bypass selection and load-use detection. Random
// decode/execute/memory register combinations are checked against the rules: the younger
// (execute) producer wins, x0 never bypasses, only operands the instruction reads are
// bypassed, and an execute-stage load feeding rs1 or rs2 requests a stall.
// The bypass and bubble rules checked follow the design description; the priority of the
// execute-stage match checked here is this design's own rule.
module tb_bp_sel;
  import riscv_pkg::*;
  logic clk = 0;
  logic [6:0] d_opcode;
  logic [4:0] d_rs1, d_rs2, e_rd, m_rd;
  logic d_csr_imm, e_reg_we, e_late, m_reg_we, stall;
  bp_sel_e op1_bp_sel, op2_bp_sel, rs2_bp_sel;
  int checks = 0, failures = 0;

  bp_sel dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bp_sel_e want(logic used, logic [4:0] rs);
    if (!used || rs == 0) return BP_NONE;
    if (e_reg_we && e_rd == rs) return BP_ALU;
    if (m_reg_we && m_rd == rs) return BP_MEM;
    return BP_NONE;
  endfunction

  initial begin
    logic [6:0] ops [10] = '{OPC_LUI, OPC_AUIPC, OPC_JAL, OPC_JALR, OPC_BRANCH, OPC_LOAD,
                             OPC_STORE, OPC_IMM, OPC_REG, OPC_SYSTEM};
    logic u1, u2, o2;
    bp_sel_e e1, e2, e3;
    logic es;
    for (int n = 0; n < 20000; n++) begin
      d_opcode = ops[$urandom % 10];
      d_rs1 = 5'($urandom % 6); d_rs2 = 5'($urandom % 6);
      e_rd = 5'($urandom % 6); m_rd = 5'($urandom % 6);
      e_reg_we = 1'($urandom); m_reg_we = 1'($urandom); e_late = 1'($urandom);
      d_csr_imm = 1'($urandom);
      #1;
      u1 = d_opcode inside {OPC_JALR, OPC_BRANCH, OPC_LOAD, OPC_STORE, OPC_IMM, OPC_REG} ||
           (d_opcode == OPC_SYSTEM && !d_csr_imm);
      u2 = d_opcode inside {OPC_BRANCH, OPC_STORE, OPC_REG};
      o2 = d_opcode == OPC_REG;
      e1 = want(u1, d_rs1); e2 = want(o2, d_rs2); e3 = want(u2, d_rs2);
      es = e_late && e_reg_we && ((u1 && d_rs1 != 0 && d_rs1 == e_rd) ||
                                  (u2 && d_rs2 != 0 && d_rs2 == e_rd));
      checks++;
      if (op1_bp_sel !== e1 || op2_bp_sel !== e2 || rs2_bp_sel !== e3 || stall !== es) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%b rs1=%0d rs2=%0d erd=%0d(%b,%b) mrd=%0d(%b) got %s %s %s %b",
                   d_opcode, d_rs1, d_rs2, e_rd, e_reg_we, e_late, m_rd, m_reg_we,
                   op1_bp_sel.name(), op2_bp_sel.name(), rs2_bp_sel.name(), stall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
