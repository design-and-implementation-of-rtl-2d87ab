// cpu: the 3-stage pipelined RV32I core (fetch/decode, execute, memory/writeback).
// Instantiates the register file, the ALU and its decoder, the operand-select decoder, the
// bypass-select logic and pipeline_control, which holds the PC, the pipeline registers and
// the stage-local logic. It has two cache ports (instruction and data) that use a
// valid/ready request handshake with 30-bit word addresses, a 4-bit byte write mask and a
// one-cycle read response; and it exposes the tohost CSR (htif_tohost) that test programs
// write to report completion. A fetch is requested in the cycle after the PC changes and
// answered at the earliest one cycle later, so with cache hits the core completes one
// instruction every two cycles; misses and busy caches stretch that through mem_stall.
// The split into these units follows the design's module hierarchy; the port protocol and
// the two-cycle fetch timing are this implementation's own.
module cpu
  import riscv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic        ic_req_valid,
  input  logic        ic_req_ready,
  output logic [29:0] ic_req_addr,
  input  logic        ic_resp_valid,
  input  logic [31:0] ic_resp_data,
  output logic        dc_req_valid,
  input  logic        dc_req_ready,
  output logic [29:0] dc_req_addr,
  output logic [31:0] dc_req_data,
  output logic [3:0]  dc_req_write,
  input  logic        dc_resp_valid,
  input  logic [31:0] dc_resp_data,
  output logic [31:0] htif_tohost
);
  logic [4:0]  rf_ra1, rf_ra2, rf_wa, e_rd, m_rd;
  logic [31:0] rf_rd1, rf_rd2, rf_wd, d_inst, e_op1, e_op2, alu_y, d_pc;
  logic        rf_we, e_reg_we, e_late, m_reg_we, bp_stall, d_csr_imm, mem_stall, redirect;
  alu_op_e     d_alu_op, e_alu_op;
  op2_sel_e    d_op2_sel;
  imm_sel_e    d_imm_sel;
  bp_sel_e     op1_bp_sel, op2_bp_sel, rs2_bp_sel;

  reg_file u_reg_file (
    .clk, .rst, .we(rf_we), .wa(rf_wa), .wd(rf_wd),
    .ra1(rf_ra1), .ra2(rf_ra2), .rd1(rf_rd1), .rd2(rf_rd2)
  );

  alu_dec u_alu_dec (
    .opcode(d_inst[6:0]), .funct3(d_inst[14:12]), .funct7_5(d_inst[30]), .op(d_alu_op)
  );

  op_sel_dec u_op_sel_dec (.opcode(d_inst[6:0]), .op2_sel(d_op2_sel), .imm_sel(d_imm_sel));

  bp_sel u_bp_sel (
    .d_opcode(d_inst[6:0]), .d_rs1(d_inst[19:15]), .d_rs2(d_inst[24:20]), .d_csr_imm,
    .e_rd, .e_reg_we, .e_late, .m_rd, .m_reg_we,
    .op1_bp_sel, .op2_bp_sel, .rs2_bp_sel, .stall(bp_stall)
  );

  alu u_alu (.a(e_op1), .b(e_op2), .op(e_alu_op), .y(alu_y));

  pipeline_control u_pipeline_control (
    .clk, .rst,
    .ic_req_valid, .ic_req_ready, .ic_req_addr, .ic_resp_valid, .ic_resp_data,
    .dc_req_valid, .dc_req_ready, .dc_req_addr, .dc_req_data, .dc_req_write,
    .dc_resp_valid, .dc_resp_data,
    .rf_ra1, .rf_ra2, .rf_rd1, .rf_rd2, .rf_we, .rf_wa, .rf_wd,
    .d_inst, .d_alu_op, .d_op2_sel, .d_imm_sel,
    .op1_bp_sel, .op2_bp_sel, .rs2_bp_sel, .bp_stall, .d_csr_imm,
    .e_rd, .e_reg_we, .e_late, .m_rd, .m_reg_we,
    .e_op1, .e_op2, .e_alu_op, .alu_y,
    .htif_tohost, .mem_stall, .redirect, .d_pc
  );
endmodule
