// rv_asm_pkg: test-program builder for the core testbenches.
// Encodes RV32I instructions and builds a self-checking program in a word queue, starting at
// 0x2000. Every check loads the expected value (computed here with plain SystemVerilog
// arithmetic, independently of the design) into x28 and branches past a jump to the fail
// handler when the register under test matches. The fail handler writes
// (test_id << 1) | 1 to tohost; a passing program writes 1. Stores are mirrored in a byte
// shadow so the testbench can compare main memory at the end.
// The start address 0x2000 and the use of tohost follow the design description; the
// program layout, the pass/fail convention and the CSR address are this design's own.
package rv_asm_pkg;

  localparam logic [6:0] LUI = 7'h37, AUIPC = 7'h17, JAL = 7'h6F, JALR = 7'h67, BR = 7'h63,
                         LD = 7'h03, ST = 7'h23, OPI = 7'h13, OPR = 7'h33, SYS = 7'h73;
  localparam logic [11:0] TOHOST = 12'h51E;
  localparam int unsigned DATA_BASE = 32'h0001_0000;

  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_i(logic [11:0] imm, logic [4:0] rs1, logic [2:0] f3,
                                        logic [4:0] rd, logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_s(logic [11:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], ST};
  endfunction
  function automatic logic [31:0] enc_b(logic [12:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], BR};
  endfunction
  function automatic logic [31:0] enc_u(logic [19:0] imm, logic [4:0] rd, logic [6:0] op);
    return {imm, rd, op};
  endfunction
  function automatic logic [31:0] enc_j(logic [20:0] imm, logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, JAL};
  endfunction

  // Reference semantics of the ALU instructions (f7b = instruction bit 30)
  function automatic logic [31:0] alu_ref(logic [2:0] f3, logic f7b, logic is_reg,
                                          logic [31:0] a, logic [31:0] b);
    case (f3)
      3'd0: return (is_reg && f7b) ? a - b : a + b;
      3'd1: return a << b[4:0];
      3'd2: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      3'd3: return (a < b) ? 32'd1 : 32'd0;
      3'd4: return a ^ b;
      3'd5: return f7b ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      3'd6: return a | b;
      default: return a & b;
    endcase
  endfunction

  class rv_prog;
    logic [31:0] code[$];
    logic [7:0]  shadow[int unsigned];   // bytes stored by the program
    int          test_id = 0;
    int unsigned base = 32'h2000;
    int unsigned fail_pc;

    function int unsigned pc();
      return base + 4 * code.size();
    endfunction

    function void emit(logic [31:0] w);
      code.push_back(w);
    endfunction

    function void li(logic [4:0] rd, logic [31:0] v);
      logic [31:0] hi = v + 32'h800;
      emit(enc_u(hi[31:12], rd, LUI));
      emit(enc_i(v[11:0], rd, 3'd0, rd, OPI));
    endfunction

    function void jal_to(logic [4:0] rd, int unsigned target);
      emit(enc_j(21'(target - pc()), rd));
    endfunction

    // fail if x[rd] != v
    function void check(logic [4:0] rd, logic [31:0] v);
      test_id++;
      emit(enc_i(12'(test_id), 5'd0, 3'd0, 5'd3, OPI));   // gp = test id
      li(5'd28, v);
      emit(enc_b(13'd8, 5'd28, rd, 3'd0));                // beq rd, x28, +8
      jal_to(5'd0, fail_pc);
    endfunction

    function void prologue();
      code.delete();
      emit(enc_j(21'd20, 5'd0));                          // jump over the fail handler
      fail_pc = pc();
      emit(enc_i(12'd1, 5'd3, 3'd1, 5'd3, OPI));          // slli gp, gp, 1
      emit(enc_i(12'd1, 5'd3, 3'd6, 5'd3, OPI));          // ori  gp, gp, 1
      emit(enc_i(TOHOST, 5'd3, 3'd1, 5'd0, SYS));         // csrrw x0, tohost, gp
      emit(enc_j(21'd0, 5'd0));                           // spin
    endfunction

    function void epilogue();
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd3, OPI));
      emit(enc_i(TOHOST, 5'd3, 3'd1, 5'd0, SYS));
      emit(enc_j(21'd0, 5'd0));
    endfunction

    // Register-register and register-immediate ALU operations on random operands. The second
    // operand is produced by the instruction right before the operation (ALU bypass), the
    // first two instructions earlier (memory bypass).
    function void gen_alu(int n);
      logic [31:0] a, b, r;
      logic [2:0] f3;
      logic f7b;
      logic [11:0] imm;
      for (int k = 0; k < n; k++) begin
        a = $urandom; b = $urandom;
        if (k % 5 == 0) b = b & 32'h1F;
        f3 = 3'($urandom);
        f7b = (f3 == 3'd0 || f3 == 3'd5) ? 1'($urandom) : 1'b0;
        li(5'd5, a);
        li(5'd6, b);
        emit(enc_r({1'b0, f7b, 5'd0}, 5'd6, 5'd5, f3, 5'd7, OPR));
        check(5'd7, alu_ref(f3, f7b, 1'b1, a, b));
        // immediate form
        imm = 12'($urandom);
        if (f3 == 3'd1 || f3 == 3'd5) imm = {1'b0, f7b, 5'd0, imm[4:0]};
        li(5'd5, a);
        emit(enc_i(imm, 5'd5, f3, 5'd7, OPI));
        check(5'd7, alu_ref(f3, (f3 == 3'd5) ? f7b : 1'b0, 1'b0, a, 32'($signed(imm))));
      end
    endfunction

    // Stores of random width and offset, followed by loads of random width, some of them
    // used by the very next instruction (load-use bubble). Two base registers 4 KiB apart
    // map onto the same data-cache lines, so lines get evicted.
    function void gen_mem(int n);
      logic [31:0] v, e;
      int unsigned off, addr, sz;
      logic [2:0] f3;
      logic [4:0] rb;
      li(5'd10, DATA_BASE);
      li(5'd11, DATA_BASE + 32'h1000);
      for (int k = 0; k < n; k++) begin
        rb = ($urandom % 2) ? 5'd10 : 5'd11;
        sz = $urandom % 3;
        off = ($urandom % 512) & ~((1 << sz) - 1);
        addr = ((rb == 5'd10) ? DATA_BASE : DATA_BASE + 32'h1000) + off;
        v = $urandom;
        if ($urandom % 2) emit(enc_i(12'd0, 5'd0, 3'd0, 5'd0, OPI));   // nop: vary alignment
        li(5'd6, v);
        emit(enc_s(12'(off), 5'd6, rb, 3'(sz)));
        for (int i = 0; i < (1 << sz); i++) shadow[addr + i] = v[8*i +: 8];
        // load back with a random width at the same aligned place
        f3 = 3'($urandom % 5); if (f3 == 3'd3) f3 = 3'd4;
        off = off & ~((1 << f3[1:0]) - 1);
        addr = ((rb == 5'd10) ? DATA_BASE : DATA_BASE + 32'h1000) + off;
        e = '0;
        for (int i = 0; i < (1 << f3[1:0]); i++)
          e[8*i +: 8] = shadow.exists(addr + i) ? shadow[addr + i] : 8'h00;
        if (!f3[2] && f3[1:0] == 2'd0) e = 32'($signed(e[7:0]));
        if (!f3[2] && f3[1:0] == 2'd1) e = 32'($signed(e[15:0]));
        emit(enc_i(12'(off), rb, f3, 5'd7, LD));
        emit(enc_i(12'd0, 5'd7, 3'd0, 5'd8, OPI));        // addi x8, x7, 0: load-use
        check(5'd8, e);
      end
    endfunction

    // Conditional branches on random or equal operands; x7 tells whether the instruction
    // after the branch was killed.
    function void gen_branch(int n);
      logic [31:0] a, b;
      logic [2:0] f3;
      logic taken;
      logic [2:0] kinds [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
      for (int k = 0; k < n; k++) begin
        a = $urandom; b = ($urandom % 3 == 0) ? a : $urandom;
        if ($urandom % 4 == 0) b = {~a[31], a[30:0]};
        f3 = kinds[$urandom % 6];
        case (f3)
          3'd0: taken = a == b;
          3'd1: taken = a != b;
          3'd4: taken = $signed(a) < $signed(b);
          3'd5: taken = $signed(a) >= $signed(b);
          3'd6: taken = a < b;
          default: taken = a >= b;
        endcase
        li(5'd5, a);
        li(5'd6, b);
        emit(enc_i(12'd0, 5'd0, 3'd0, 5'd7, OPI));          // x7 = 0
        emit(enc_b(13'd8, 5'd6, 5'd5, f3));
        emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));          // x7 = 1 when not taken
        check(5'd7, taken ? 32'd0 : 32'd1);
      end
    endfunction

    // JAL, JALR, LUI, AUIPC and the tohost CSR.
    function void gen_jump();
      int unsigned p;
      p = pc();
      emit(enc_j(21'd8, 5'd1));                             // jal ra, +8
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));            // skipped
      check(5'd1, p + 4);
      p = pc();
      emit(enc_u(20'h12345, 5'd5, AUIPC));                  // auipc x5, 0x12345
      check(5'd5, p + 32'h1234_5000);
      p = pc();
      emit(enc_u(20'd0, 5'd5, AUIPC));                      // x5 = p
      emit(enc_i(12'd13, 5'd5, 3'd0, 5'd1, JALR));          // jalr ra, 13(x5) -> p + 12
      emit(enc_i(12'd1, 5'd0, 3'd0, 5'd7, OPI));            // skipped
      check(5'd1, p + 8);
      emit(enc_u(20'hABCDE, 5'd9, LUI));
      check(5'd9, 32'hABCD_E000);
      li(5'd5, 32'd6);
      emit(enc_i(TOHOST, 5'd5, 3'd1, 5'd7, SYS));           // csrrw x7, tohost, x5
      emit(enc_i(TOHOST, 5'd4, 3'd5, 5'd8, SYS));           // csrrwi x8, tohost, 4
      emit(enc_i(TOHOST, 5'd0, 3'd1, 5'd9, SYS));           // csrrw x9, tohost, x0
      check(5'd7, 32'd0);
      check(5'd8, 32'd6);
      check(5'd9, 32'd4);
    endfunction

    // A counted loop: sum of 1..n, run from the instruction cache after its first pass.
    function void gen_loop(int n);
      li(5'd5, 32'(n));
      emit(enc_i(12'd0, 5'd0, 3'd0, 5'd6, OPI));            // x6 = 0
      emit(enc_r(7'd0, 5'd5, 5'd6, 3'd0, 5'd6, OPR));       // loop: x6 += x5
      emit(enc_i(12'hFFF, 5'd5, 3'd0, 5'd5, OPI));          // x5 -= 1
      emit(enc_b(-13'sd8, 5'd0, 5'd5, 3'd1));               // bne x5, x0, loop
      check(5'd6, 32'(n * (n + 1) / 2));
    endfunction
  endclass

endpackage
