// tb_ctrl_dec: self-checking test of the main decoder. For random instructions of every
// class it checks the control bundle against the RV32I meaning of the instruction,
// including rd = x0 suppressing the register write and the tohost CSR instructions.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_ctrl_dec;
  import riscv_pkg::*;
  logic clk = 0;
  logic [31:0] inst;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  ctrl_dec dut (.inst, .ctrl);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] i, logic we, logic re, logic wr, logic br, logic j, logic jr,
                     logic csr, ex_sel_e ex, wb_sel_e wb);
    inst = i; #1;
    checks++;
    if (ctrl.reg_we !== we || ctrl.mem_re !== re || ctrl.mem_we !== wr || ctrl.branch !== br ||
        ctrl.jal !== j || ctrl.jalr !== jr || ctrl.csr_we !== csr ||
        (we && ctrl.ex_sel !== ex) || (we && ctrl.wb_sel !== wb)) begin
      failures++;
      if (failures < 10) $display("FAIL inst=%h ctrl=%p", i, ctrl);
    end
  endtask

  initial begin
    logic [31:0] r;
    logic nz;
    for (int n = 0; n < 300; n++) begin
      r = $urandom;
      nz = r[11:7] != 0;
      chk({r[31:7], OPC_LUI},   nz, 0, 0, 0, 0, 0, 0, EX_ALU, WB_EXE);
      chk({r[31:7], OPC_AUIPC}, nz, 0, 0, 0, 0, 0, 0, EX_TGT, WB_EXE);
      chk({r[31:7], OPC_JAL},   nz, 0, 0, 0, 1, 0, 0, EX_PC4, WB_EXE);
      chk({r[31:7], OPC_JALR},  nz, 0, 0, 0, 0, 1, 0, EX_PC4, WB_EXE);
      chk({r[31:7], OPC_BRANCH}, 0, 0, 0, 1, 0, 0, 0, EX_ALU, WB_EXE);
      chk({r[31:7], OPC_LOAD},  nz, 1, 0, 0, 0, 0, 0, EX_ALU, WB_MEM);
      chk({r[31:7], OPC_STORE},  0, 0, 1, 0, 0, 0, 0, EX_ALU, WB_EXE);
      chk({r[31:7], OPC_IMM},   nz, 0, 0, 0, 0, 0, 0, EX_ALU, WB_EXE);
      chk({r[31:7], OPC_REG},   nz, 0, 0, 0, 0, 0, 0, EX_ALU, WB_EXE);
      // csrrw / csrrwi tohost
      chk({CSR_TOHOST, r[19:15], 3'b001, r[11:7], OPC_SYSTEM}, nz, 0, 0, 0, 0, 0, 1, EX_ALU, WB_CSR);
      chk({CSR_TOHOST, r[19:15], 3'b101, r[11:7], OPC_SYSTEM}, nz, 0, 0, 0, 0, 0, 1, EX_ALU, WB_CSR);
      // another CSR address or ecall: no effect
      chk({12'h300, r[19:15], 3'b001, r[11:7], OPC_SYSTEM}, 0, 0, 0, 0, 0, 0, 0, EX_ALU, WB_EXE);
      chk(32'h0000_0073, 0, 0, 0, 0, 0, 0, 0, EX_ALU, WB_EXE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
