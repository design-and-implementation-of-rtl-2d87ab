// tb_alu_dec: self-checking test of the ALU decoder. Walks every RV32I arithmetic encoding
// (register and immediate forms) plus LUI, loads, stores, branches and jumps, and checks the
// ALU operation chosen for each.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_alu_dec;
  import riscv_pkg::*;
  logic clk = 0;
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       funct7_5;
  alu_op_e    op;
  int checks = 0, failures = 0;

  alu_dec dut (.opcode, .funct3, .funct7_5, .op);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(logic [6:0] oc, logic [2:0] f3, logic f7, alu_op_e e);
    opcode = oc; funct3 = f3; funct7_5 = f7;
    #1;
    checks++;
    if (op !== e) begin
      failures++;
      $display("FAIL opcode=%b f3=%0d f7=%b got %s exp %s", oc, f3, f7, op.name(), e.name());
    end
  endtask

  initial begin
    // register-register
    expect_op(OPC_REG, 3'd0, 1'b0, ALU_ADD);
    expect_op(OPC_REG, 3'd0, 1'b1, ALU_SUB);
    expect_op(OPC_REG, 3'd1, 1'b0, ALU_SLL);
    expect_op(OPC_REG, 3'd2, 1'b0, ALU_SLT);
    expect_op(OPC_REG, 3'd3, 1'b0, ALU_SLTU);
    expect_op(OPC_REG, 3'd4, 1'b0, ALU_XOR);
    expect_op(OPC_REG, 3'd5, 1'b0, ALU_SRL);
    expect_op(OPC_REG, 3'd5, 1'b1, ALU_SRA);
    expect_op(OPC_REG, 3'd6, 1'b0, ALU_OR);
    expect_op(OPC_REG, 3'd7, 1'b0, ALU_AND);
    // immediate: bit 30 is part of the immediate except for shifts
    expect_op(OPC_IMM, 3'd0, 1'b1, ALU_ADD);
    expect_op(OPC_IMM, 3'd1, 1'b0, ALU_SLL);
    expect_op(OPC_IMM, 3'd2, 1'b1, ALU_SLT);
    expect_op(OPC_IMM, 3'd3, 1'b0, ALU_SLTU);
    expect_op(OPC_IMM, 3'd4, 1'b1, ALU_XOR);
    expect_op(OPC_IMM, 3'd5, 1'b0, ALU_SRL);
    expect_op(OPC_IMM, 3'd5, 1'b1, ALU_SRA);
    expect_op(OPC_IMM, 3'd6, 1'b1, ALU_OR);
    expect_op(OPC_IMM, 3'd7, 1'b0, ALU_AND);
    expect_op(OPC_LUI, 3'd3, 1'b1, ALU_COPY_B);
    for (int f = 0; f < 8; f++) begin
      expect_op(OPC_LOAD,   3'(f), 1'b1, ALU_ADD);
      expect_op(OPC_STORE,  3'(f), 1'b0, ALU_ADD);
      expect_op(OPC_BRANCH, 3'(f), 1'b1, ALU_ADD);
      expect_op(OPC_JALR,   3'(f), 1'b0, ALU_ADD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
