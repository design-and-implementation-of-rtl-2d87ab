// pipeline_control: PC logic, pipeline registers and stage-local datapath of the 3-stage core.
//
// Stages: fetch/decode (D), execute (E), memory/writeback (M).
//  * D: the PC register (reset 0x2000) addresses the instruction cache. The fetched word is
//    held in ir_q until the instruction leaves D. Immediates, the control bundle and the
//    operand muxes are evaluated here; OP1, OP2 and RS2 each pass through a bypass mux whose
//    select comes from bp_sel (execute-stage result = ALU bypass, memory-stage result =
//    memory bypass).
//  * E: the ALU works on E_OP1/E_OP2; branch_comp compares E_OP1 with E_RS2; the branch and
//    jump target adder adds E_OP2 to the PC (or to E_OP1 for JALR). Branches are predicted
//    not taken: a taken branch, JAL or JALR in E redirects the PC and kills the D instruction
//    (a NOP enters E). A mux picks ALU result, target (AUIPC) or PC+4 (JAL/JALR links).
//  * M: loads and stores go to the data cache with the address from M_ALU_OUT; store data
//    and byte mask come from store_align, load data is extracted by load_parse. The
//    writeback mux picks the execute result, load data or the tohost CSR, and the register
//    file is written at the end of the stage.
// Stalls: every pipeline register advances only when mem_stall is low; mem_stall is high
// while D still waits for its instruction or M still waits for its data-cache access. A
// load (or CSR read) in E followed by a dependent instruction in D holds D for one cycle and
// sends a bubble to E (no memory-to-execute bypass).
// Cache port protocol (both caches): req_valid/req_ready handshake with a word address;
// reads answer with a one-cycle resp_valid pulse; writes need no answer.
// The stage split, predict-not-taken, kill and bubble muxes, bypass paths, reset PC and
// tohost register follow the design description; the fetch/data handshake bookkeeping is
// this implementation's own.
module pipeline_control
  import riscv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // instruction cache
  output logic        ic_req_valid,
  input  logic        ic_req_ready,
  output logic [29:0] ic_req_addr,
  input  logic        ic_resp_valid,
  input  logic [31:0] ic_resp_data,
  // data cache
  output logic        dc_req_valid,
  input  logic        dc_req_ready,
  output logic [29:0] dc_req_addr,
  output logic [31:0] dc_req_data,
  output logic [3:0]  dc_req_write,
  input  logic        dc_resp_valid,
  input  logic [31:0] dc_resp_data,
  // register file
  output logic [4:0]  rf_ra1,
  output logic [4:0]  rf_ra2,
  input  logic [31:0] rf_rd1,
  input  logic [31:0] rf_rd2,
  output logic        rf_we,
  output logic [4:0]  rf_wa,
  output logic [31:0] rf_wd,
  // decode-stage helpers (ALU decoder, operand select decoder, bypass select)
  output logic [31:0] d_inst,
  input  alu_op_e     d_alu_op,
  input  op2_sel_e    d_op2_sel,
  input  imm_sel_e    d_imm_sel,
  input  bp_sel_e     op1_bp_sel,
  input  bp_sel_e     op2_bp_sel,
  input  bp_sel_e     rs2_bp_sel,
  input  logic        bp_stall,
  output logic        d_csr_imm,
  output logic [4:0]  e_rd,
  output logic        e_reg_we,
  output logic        e_late,
  output logic [4:0]  m_rd,
  output logic        m_reg_we,
  // ALU
  output logic [31:0] e_op1,
  output logic [31:0] e_op2,
  output alu_op_e     e_alu_op,
  input  logic [31:0] alu_y,
  // status
  output logic [31:0] htif_tohost,
  output logic        mem_stall,
  output logic        redirect,
  output logic [31:0] d_pc
);
  // ---------------- fetch / decode ----------------
  logic [31:0] ir_q;
  logic        if_sent, if_have, d_ready;
  logic [31:0] d_imm, d_op1, d_op2, d_op2_base, d_rs2;
  ctrl_t       d_ctrl;

  // ---------------- execute ----------------
  logic [31:0] e_pc, e_inst, e_rs2;
  ctrl_t       e_ctrl;
  logic [31:0] e_target, e_result;
  logic        br_eq, br_lt, br_ltu, br_out;

  // ---------------- memory / writeback ----------------
  logic [31:0] m_inst, m_alu_out, m_rs2, m_rs1;
  ctrl_t       m_ctrl;
  logic        dm_sent, dm_done, m_ready, m_mem;
  logic [31:0] dm_rdata_q, m_word, m_load, m_wb;
  logic        adv;
  logic [3:0]  st_mask;

  // Fetch: one request per PC value, answer captured in ir_q.
  assign ic_req_valid = !if_sent && !if_have;
  assign ic_req_addr  = d_pc[31:2];
  assign d_ready      = if_have || ic_resp_valid;
  assign d_inst       = if_have ? ir_q : ic_resp_data;

  ctrl_dec  u_ctrl_dec  (.inst(d_inst), .ctrl(d_ctrl));
  imm_parse u_imm_parse (.inst(d_inst), .sel(d_imm_sel), .imm(d_imm));

  assign rf_ra1    = d_inst[19:15];
  assign rf_ra2    = d_inst[24:20];
  assign d_csr_imm = d_ctrl.csr_imm;

  always_comb begin
    unique case (op1_bp_sel)
      BP_ALU:  d_op1 = e_result;
      BP_MEM:  d_op1 = m_wb;
      default: d_op1 = d_ctrl.csr_imm ? {27'b0, d_inst[19:15]} : rf_rd1;
    endcase
    unique case (d_op2_sel)
      OP2_RS2: d_op2_base = rf_rd2;
      OP2_IMM: d_op2_base = d_imm;
      default: d_op2_base = '0;
    endcase
    unique case (op2_bp_sel)
      BP_ALU:  d_op2 = e_result;
      BP_MEM:  d_op2 = m_wb;
      default: d_op2 = d_op2_base;
    endcase
    unique case (rs2_bp_sel)
      BP_ALU:  d_rs2 = e_result;
      BP_MEM:  d_rs2 = m_wb;
      default: d_rs2 = rf_rd2;
    endcase
  end

  // ---------------- execute ----------------
  branch_comp u_branch_comp (
    .a(e_op1), .b(e_rs2), .funct3(e_inst[14:12]),
    .br_eq(br_eq), .br_lt(br_lt), .br_ltu(br_ltu), .br_out(br_out)
  );

  always_comb begin
    e_target = (e_ctrl.jalr ? e_op1 : e_pc) + e_op2;
    if (e_ctrl.jalr) e_target[0] = 1'b0;
    unique case (e_ctrl.ex_sel)
      EX_TGT:  e_result = e_target;
      EX_PC4:  e_result = e_pc + 32'd4;
      default: e_result = alu_y;
    endcase
  end

  assign redirect = (e_ctrl.branch && br_out) || e_ctrl.jal || e_ctrl.jalr;
  assign e_rd     = e_inst[11:7];
  assign e_reg_we = e_ctrl.reg_we;
  assign e_late   = e_ctrl.mem_re || e_ctrl.csr_we;

  // ---------------- memory / writeback ----------------
  assign m_mem = m_ctrl.mem_re || m_ctrl.mem_we;

  store_align u_store_align (
    .data(m_rs2), .addr_lo(m_alu_out[1:0]), .funct3(m_inst[14:12]),
    .wdata(dc_req_data), .mask(st_mask)
  );
  // loads never raise a write mask
  assign dc_req_write = m_ctrl.mem_we ? st_mask : 4'b0000;

  always_comb begin
    dc_req_valid = m_mem && !dm_sent;
    dc_req_addr  = m_alu_out[31:2];
    m_ready = !m_mem || dm_done
           || (m_ctrl.mem_we && dc_req_ready && !dm_sent)
           || (m_ctrl.mem_re && dc_resp_valid);
  end
  assign m_word = dm_done ? dm_rdata_q : dc_resp_data;

  load_parse u_load_parse (
    .word(m_word), .addr_lo(m_alu_out[1:0]), .funct3(m_inst[14:12]), .data(m_load)
  );

  always_comb begin
    unique case (m_ctrl.wb_sel)
      WB_MEM:  m_wb = m_load;
      WB_CSR:  m_wb = htif_tohost;
      default: m_wb = m_alu_out;
    endcase
  end

  assign m_rd     = m_inst[11:7];
  assign m_reg_we = m_ctrl.reg_we;

  assign mem_stall = !d_ready || !m_ready;
  assign adv       = !mem_stall;

  assign rf_we = m_ctrl.reg_we && adv;
  assign rf_wa = m_rd;
  assign rf_wd = m_wb;

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      d_pc        <= RESET_PC;
      ir_q        <= NOP;
      if_sent     <= 1'b0;
      if_have     <= 1'b0;
      e_pc        <= '0;
      e_inst      <= NOP;
      e_ctrl      <= CTRL_NOP;
      e_alu_op    <= ALU_ADD;
      e_op1       <= '0;
      e_op2       <= '0;
      e_rs2       <= '0;
      m_inst      <= NOP;
      m_ctrl      <= CTRL_NOP;
      m_alu_out   <= '0;
      m_rs2       <= '0;
      m_rs1       <= '0;
      dm_sent     <= 1'b0;
      dm_done     <= 1'b0;
      dm_rdata_q  <= '0;
      htif_tohost <= '0;
    end else if (adv) begin
      // M <- E
      m_inst    <= e_inst;
      m_ctrl    <= e_ctrl;
      m_alu_out <= e_result;
      m_rs2     <= e_rs2;
      m_rs1     <= e_op1;
      dm_sent   <= 1'b0;
      dm_done   <= 1'b0;
      if (m_ctrl.csr_we) htif_tohost <= m_rs1;
      // E <- D, or a bubble
      if (redirect || bp_stall) begin
        e_inst <= NOP;
        e_ctrl <= CTRL_NOP;
      end else begin
        e_inst <= d_inst;
        e_ctrl <= d_ctrl;
      end
      e_pc     <= d_pc;
      e_alu_op <= d_alu_op;
      e_op1    <= d_op1;
      e_op2    <= d_op2;
      e_rs2    <= d_rs2;
      // PC
      if (redirect) begin
        d_pc    <= e_target;
        if_sent <= 1'b0;
        if_have <= 1'b0;
      end else if (bp_stall) begin
        ir_q    <= d_inst;
        if_have <= 1'b1;
      end else begin
        d_pc    <= d_pc + 32'd4;
        if_sent <= 1'b0;
        if_have <= 1'b0;
      end
    end else begin
      if (ic_req_valid && ic_req_ready) if_sent <= 1'b1;
      if (ic_resp_valid && !if_have) begin
        ir_q    <= ic_resp_data;
        if_have <= 1'b1;
      end
      if (dc_req_valid && dc_req_ready) begin
        dm_sent <= 1'b1;
        if (m_ctrl.mem_we) dm_done <= 1'b1;
      end
      if (m_ctrl.mem_re && dc_resp_valid && !dm_done) begin
        dm_rdata_q <= dc_resp_data;
        dm_done    <= 1'b1;
      end
    end
  end

endmodule
