// tb_isa_suite: per-instruction assembly test suite for the whole design at its default size.
// One small self-checking program per test name: addi ... xor, one per instruction, plus
// "simple", which only reports a pass. Before each program the design is reset, so both
// caches start cold. Each program exercises one instruction in isolation:
//   - random and corner-case operands;
//   - back-to-back use of its result, which goes through the bypasses;
//   - rd = x0 for instructions that write a register;
//   - for loads: a data region preloaded with random bytes;
//   - for stores: every byte offset, read back with LW.
// Programs report through tohost, as in the other core testbenches. Per test, the testbench
// checks that:
//   - the program passes;
//   - the memory written by stores matches a shadow copy;
//   - the test took at least two cycles per instruction it retired.
// The two-cycle minimum follows from the cache read-hit latency. The testbench prints the
// cycle count of each test.
// The test names are those of the RV32I assembly suite; the programs themselves are
// written for this design.
module tb_isa_suite;
  import rv_asm_pkg::*;
  logic clk = 0, rst = 1;
  logic         mem_req_valid, mem_req_ready, mem_req_rw, mem_req_data_valid, mem_req_data_ready;
  logic         mem_resp_valid;
  logic [27:0]  mem_req_addr;
  logic [127:0] mem_req_data_bits, mem_resp_data;
  logic [15:0]  mem_req_data_mask;
  logic [31:0]  htif_tohost;
  int checks = 0, failures = 0;

  riscv_top dut (.*);
  ext_mem_model #(.BEATS_LOG2(14), .LAT(1)) u_mem (.*);

  always #5 clk = ~clk;

  // cycles and retired (non-NOP) instructions of the running test
  int cyc = 0, retired = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (dut.u_cpu.u_pipeline_control.adv && dut.u_cpu.u_pipeline_control.m_inst != riscv_pkg::NOP)
      retired++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: tohost=%h", htif_tohost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // Program generator: one instruction under test per program.
  class isa_prog extends rv_prog;
    logic [31:0] corner[8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                               32'h0000_001F, 32'hFFFF_F800, 32'h0000_07FF};

    function logic [31:0] operand(int k);
      return (k < 8) ? corner[k] : (($urandom % 4 == 0) ? corner[$urandom % 8] : $urandom);
    endfunction

    logic [7:0] init[int unsigned];   // initial contents of the data region

    // random preload of the data region; the testbench copies init into memory
    function void preload(int nbytes);
      for (int i = 0; i < nbytes; i++) begin
        init[DATA_BASE + i] = 8'($urandom);
        shadow[DATA_BASE + i] = init[DATA_BASE + i];
      end
    endfunction

    // register-register or register-immediate ALU instruction
    function void t_alu(logic [2:0] f3, logic f7b, logic is_reg);
      logic [31:0] a, b, r;
      logic [11:0] imm;
      for (int k = 0; k < 24; k++) begin
        a = operand(k);
        b = operand((k * 5 + 3) % 24);
        if (is_reg) begin
          li(5'd5, a); li(5'd6, b);
          emit(enc_r({1'b0, f7b, 5'd0}, 5'd6, 5'd5, f3, 5'd7, OPR));
        end else begin
          imm = (f3 == 3'd1 || f3 == 3'd5) ? {1'b0, f7b, 5'd0, b[4:0]} : b[11:0];
          b = 32'($signed(imm));
          li(5'd5, a);
          emit(enc_i(imm, 5'd5, f3, 5'd7, OPI));
        end
        r = alu_ref(f3, f7b, is_reg, a, b);
        // feed the result straight back as the first operand (ALU bypass), then again two
        // instructions later (memory bypass)
        if (is_reg) begin
          emit(enc_r({1'b0, f7b, 5'd0}, 5'd6, 5'd7, f3, 5'd8, OPR));
          emit(enc_i(12'd0, 5'd0, 3'd0, 5'd0, OPI));
          emit(enc_r({1'b0, f7b, 5'd0}, 5'd6, 5'd8, f3, 5'd9, OPR));
        end else begin
          emit(enc_i(imm, 5'd7, f3, 5'd8, OPI));
          emit(enc_i(12'd0, 5'd0, 3'd0, 5'd0, OPI));
          emit(enc_i(imm, 5'd8, f3, 5'd9, OPI));
        end
        check(5'd7, r);
        r = alu_ref(f3, f7b, is_reg, r, b);
        check(5'd8, r);
        check(5'd9, alu_ref(f3, f7b, is_reg, r, b));
      end
      // writes to x0 are dropped
      li(5'd5, 32'h1234_5678);
      if (is_reg) emit(enc_r({1'b0, f7b, 5'd0}, 5'd5, 5'd5, f3, 5'd0, OPR));
      else        emit(enc_i(12'd3, 5'd5, f3, 5'd0, OPI));
      check(5'd0, 32'd0);
    endfunction

    function void t_branch(logic [2:0] f3);
      logic [31:0] a, b;
      logic taken;
      int unsigned top;
      for (int k = 0; k < 24; k++) begin
        a = operand(k);
        b = (k % 3 == 0) ? a : operand(23 - k);
        case (f3)
          3'd0: taken = a == b;
          3'd1: taken = a != b;
          3'd4: taken = $signed(a) < $signed(b);
          3'd5: taken = $signed(a) >= $signed(b);
          3'd6: taken = a < b;
          default: taken = a >= b;
        endcase
        li(5'd5, a); li(5'd6, b);
        emit(enc_i(12'd0, 5'd0, 3'd0, 5'd7, OPI));
        emit(enc_b(13'd12, 5'd6, 5'd5, f3));            // over two instructions
        emit(enc_i(12'd1, 5'd7, 3'd0, 5'd7, OPI));
        emit(enc_i(12'd2, 5'd7, 3'd0, 5'd7, OPI));
        check(5'd7, taken ? 32'd0 : 32'd3);
      end
      // backward taken branch: a loop that runs until the branch falls through
      li(5'd5, 32'd0);
      li(5'd6, 32'd5);
      top = pc();
      emit(enc_i(12'd1, 5'd5, 3'd0, 5'd5, OPI));          // x5++
      case (f3)
        3'd0: begin   // beq x5, x0 never true here: loop once
          emit(enc_b(13'(top - pc()), 5'd0, 5'd5, f3));
          check(5'd5, 32'd1);
        end
        3'd1, 3'd4, 3'd6: begin   // bne/blt/bltu x5, x6: loop until x5 == 5
          emit(enc_b(13'(top - pc()), 5'd6, 5'd5, f3));
          check(5'd5, 32'd5);
        end
        default: begin   // bge/bgeu x6, x5: loop until x5 > 5
          emit(enc_b(13'(top - pc()), 5'd5, 5'd6, f3));
          check(5'd5, 32'd6);
        end
      endcase
    endfunction

    function void t_load(logic [2:0] f3);
      logic [31:0] e;
      int unsigned off, addr;
      int n = 1 << f3[1:0];
      preload(512);
      li(5'd10, DATA_BASE + 256);
      for (int k = 0; k < 32; k++) begin
        off = ($urandom % 512) & ~(n - 1);
        addr = DATA_BASE + off;
        e = '0;
        for (int i = 0; i < n; i++) e[8*i +: 8] = shadow[addr + i];
        if (!f3[2] && f3[1:0] == 2'd0) e = 32'($signed(e[7:0]));
        if (!f3[2] && f3[1:0] == 2'd1) e = 32'($signed(e[15:0]));
        emit(enc_i(12'(int'(off) - 256), 5'd10, f3, 5'd7, LD));   // negative and positive offsets
        if (k % 2) emit(enc_i(12'd0, 5'd7, 3'd0, 5'd8, OPI));      // load-use
        else begin
          emit(enc_i(12'd0, 5'd0, 3'd0, 5'd0, OPI));
          emit(enc_i(12'd0, 5'd7, 3'd0, 5'd8, OPI));
        end
        check(5'd8, e);
      end
      // load whose base register was written just before (bypass into the address)
      li(5'd11, DATA_BASE);
      emit(enc_i(12'd0, 5'd11, f3, 5'd7, LD));
      e = '0;
      for (int i = 0; i < n; i++) e[8*i +: 8] = shadow[DATA_BASE + i];
      if (!f3[2] && f3[1:0] == 2'd0) e = 32'($signed(e[7:0]));
      if (!f3[2] && f3[1:0] == 2'd1) e = 32'($signed(e[15:0]));
      check(5'd7, e);
    endfunction

    function void t_store(logic [2:0] f3);
      logic [31:0] v, e;
      int unsigned off, addr;
      int n = 1 << f3[1:0];
      preload(256);
      li(5'd10, DATA_BASE);
      // first pass touches the line through a load so the stores hit; the later ones miss
      emit(enc_i(12'd0, 5'd10, 3'd2, 5'd12, LD));
      for (int k = 0; k < 40; k++) begin
        off = (k < 16) ? ((k * n) % 64) : (($urandom % 256) & ~(n - 1));
        addr = DATA_BASE + off;
        v = $urandom;
        li(5'd6, v);
        emit(enc_s(12'(off), 5'd6, 5'd10, f3));
        for (int i = 0; i < n; i++) shadow[addr + i] = v[8*i +: 8];
        for (int i = 0; i < 4; i++) e[8*i +: 8] = shadow[(addr & ~3) + i];
        emit(enc_i(12'(off & ~3), 5'd10, 3'd2, 5'd7, LD));
        check(5'd7, e);
      end
    endfunction

    function void t_jal();
      int unsigned p, fwd;
      for (int k = 0; k < 8; k++) begin
        p = pc();
        emit(enc_j(21'd12, 5'd1));                          // jal ra, +12
        emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));
        emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));
        check(5'd1, p + 4);
      end
      // backward jump: jump ahead, then back into a block that jumps forward past itself
      emit(enc_i(12'd0, 5'd0, 3'd0, 5'd7, OPI));
      emit(enc_j(21'd12, 5'd0));                            // to "back"
      emit(enc_i(12'd5, 5'd7, 3'd0, 5'd7, OPI));            // target of the backward jump
      emit(enc_j(21'd8, 5'd0));                             // past "back"
      p = pc();
      emit(enc_j(21'(-8), 5'd2));                           // back: jal sp, -8
      check(5'd7, 32'd5);
      check(5'd2, p + 4);
      fwd = pc();
      emit(enc_j(21'd8, 5'd0));                             // rd = x0: no link
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd0, OPI));
      check(5'd0, 32'd0);
    endfunction

    function void t_jalr();
      int unsigned p;
      for (int k = 0; k < 8; k++) begin
        p = pc();
        emit(enc_u(20'd0, 5'd5, AUIPC));                    // x5 = p
        emit(enc_i(12'(12 + (k % 2)), 5'd5, 3'd0, 5'd1, JALR));   // to p + 12, bit 0 cleared
        emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));
        check(5'd1, p + 8);
      end
      // rd == rs1: the old value forms the target
      p = pc();
      emit(enc_u(20'd0, 5'd5, AUIPC));
      emit(enc_i(12'd12, 5'd5, 3'd0, 5'd5, JALR));
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));
      check(5'd5, p + 8);
      // negative offset
      p = pc();
      emit(enc_u(20'd0, 5'd5, AUIPC));
      emit(enc_i(12'd32, 5'd5, 3'd0, 5'd5, OPI));           // x5 = p + 32
      emit(enc_i(12'hFF4, 5'd5, 3'd0, 5'd1, JALR));         // to p + 20
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));
      check(5'd1, p + 12);
    endfunction

    function void t_upper(logic [6:0] op);
      logic [19:0] imm;
      int unsigned p;
      for (int k = 0; k < 16; k++) begin
        imm = (k < 2) ? {k[0], 19'd0} : 20'($urandom);
        p = pc();
        emit(enc_u(imm, 5'd7, op));
        emit(enc_i(12'd0, 5'd7, 3'd0, 5'd8, OPI));          // used at once
        check(5'd8, (op == LUI) ? {imm, 12'd0} : p + {imm, 12'd0});
      end
    endfunction

    function void build(string name);
      prologue();
      case (name)
        "addi":  t_alu(3'd0, 1'b0, 1'b0);
        "add":   t_alu(3'd0, 1'b0, 1'b1);
        "sub":   t_alu(3'd0, 1'b1, 1'b1);
        "slli":  t_alu(3'd1, 1'b0, 1'b0);
        "sll":   t_alu(3'd1, 1'b0, 1'b1);
        "slti":  t_alu(3'd2, 1'b0, 1'b0);
        "slt":   t_alu(3'd2, 1'b0, 1'b1);
        "sltiu": t_alu(3'd3, 1'b0, 1'b0);
        "sltu":  t_alu(3'd3, 1'b0, 1'b1);
        "xori":  t_alu(3'd4, 1'b0, 1'b0);
        "xor":   t_alu(3'd4, 1'b0, 1'b1);
        "srli":  t_alu(3'd5, 1'b0, 1'b0);
        "srl":   t_alu(3'd5, 1'b0, 1'b1);
        "srai":  t_alu(3'd5, 1'b1, 1'b0);
        "sra":   t_alu(3'd5, 1'b1, 1'b1);
        "ori":   t_alu(3'd6, 1'b0, 1'b0);
        "or":    t_alu(3'd6, 1'b0, 1'b1);
        "andi":  t_alu(3'd7, 1'b0, 1'b0);
        "and":   t_alu(3'd7, 1'b0, 1'b1);
        "beq":   t_branch(3'd0);
        "bne":   t_branch(3'd1);
        "blt":   t_branch(3'd4);
        "bge":   t_branch(3'd5);
        "bltu":  t_branch(3'd6);
        "bgeu":  t_branch(3'd7);
        "lb":    t_load(3'd0);
        "lh":    t_load(3'd1);
        "lw":    t_load(3'd2);
        "lbu":   t_load(3'd4);
        "lhu":   t_load(3'd5);
        "sb":    t_store(3'd0);
        "sh":    t_store(3'd1);
        "sw":    t_store(3'd2);
        "jal":   t_jal();
        "jalr":  t_jalr();
        "lui":   t_upper(LUI);
        "auipc": t_upper(AUIPC);
        default: ;   // "simple": pass at once
      endcase
      epilogue();
    endfunction
  endclass

  string tests[38] = '{"addi", "add", "andi", "and", "auipc", "beq", "bge", "bgeu", "blt",
                       "bltu", "bne", "jal", "jalr", "lb", "lbu", "lh", "lhu", "lui", "lw",
                       "ori", "or", "sb", "sh", "simple", "slli", "sll", "slti", "sltiu",
                       "slt", "sltu", "srai", "sra", "srli", "srl", "sub", "sw", "xori", "xor"};

  initial begin
    isa_prog p;
    int unsigned w;
    int total_cycles = 0;
    foreach (tests[t]) begin
      p = new();
      p.build(tests[t]);
      rst = 1;
      for (int i = 0; i < 2**14; i++) u_mem.mem[i] = '0;
      foreach (p.init[a]) u_mem.mem[a >> 4][8*(a%16) +: 8] = p.init[a];
      foreach (p.code[i]) u_mem.mem[(p.base >> 4) + i / 4][32*(i%4) +: 32] = p.code[i];
      repeat (3) @(negedge clk);
      cyc = 0; retired = 0;
      rst = 0;
      while (!htif_tohost[0] && cyc < 100000) @(negedge clk);
      checks += p.test_id;
      chk(htif_tohost == 1, $sformatf("%s: tohost=%0d (failed check %0d)", tests[t],
                                      htif_tohost, htif_tohost >> 1));
      chk(cyc >= 2 * retired - 2,
          $sformatf("%s: %0d cycles for %0d instructions", tests[t], cyc, retired));
      repeat (10) @(negedge clk);
      foreach (p.shadow[a]) begin
        w = a >> 4;
        chk(u_mem.mem[w][8*(a%16) +: 8] == p.shadow[a], $sformatf("%s: byte %h", tests[t], a));
      end
      $display("%-7s cycles=%0d retired=%0d checks=%0d", tests[t], cyc, retired, p.test_id);
      total_cycles += cyc;
    end
    $display("total cycles=%0d", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
