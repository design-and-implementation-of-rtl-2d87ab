// tb_op_sel_dec: self-checking test of the operand-2 select decoder: for each opcode, which
// immediate format (or rs2, or zero) must reach OP2. All 128 opcodes are tried; those that
// are not RV32I fall back to the I immediate.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_op_sel_dec;
  import riscv_pkg::*;
  logic clk = 0;
  logic [6:0] opcode;
  op2_sel_e op2_sel;
  imm_sel_e imm_sel;
  int checks = 0, failures = 0;

  op_sel_dec dut (.opcode, .op2_sel, .imm_sel);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [6:0] oc, op2_sel_e eo, imm_sel_e ei, logic care_imm);
    opcode = oc; #1;
    checks++;
    if (op2_sel !== eo || (care_imm && imm_sel !== ei)) begin
      failures++;
      $display("FAIL opcode=%b op2=%s imm=%s", oc, op2_sel.name(), imm_sel.name());
    end
  endtask

  initial begin
    chk(OPC_REG,    OP2_RS2,  IMM_I, 1'b0);
    chk(OPC_IMM,    OP2_IMM,  IMM_I, 1'b1);
    chk(OPC_LOAD,   OP2_IMM,  IMM_I, 1'b1);
    chk(OPC_JALR,   OP2_IMM,  IMM_I, 1'b1);
    chk(OPC_STORE,  OP2_IMM,  IMM_S, 1'b1);
    chk(OPC_BRANCH, OP2_IMM,  IMM_B, 1'b1);
    chk(OPC_LUI,    OP2_IMM,  IMM_U, 1'b1);
    chk(OPC_AUIPC,  OP2_IMM,  IMM_U, 1'b1);
    chk(OPC_JAL,    OP2_IMM,  IMM_J, 1'b1);
    chk(OPC_SYSTEM, OP2_ZERO, IMM_I, 1'b0);
    // every other opcode falls back to the I immediate
    for (int oc = 0; oc < 128; oc++)
      if (!(7'(oc) inside {OPC_REG, OPC_IMM, OPC_LOAD, OPC_JALR, OPC_STORE, OPC_BRANCH, OPC_LUI,
                           OPC_AUIPC, OPC_JAL, OPC_SYSTEM}))
        chk(7'(oc), OP2_IMM, IMM_I, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
