// tb_imm_parse: self-checking test of immediate extraction. Builds random immediates, encodes
// them into I/S/B/U/J instruction fields the way an assembler does, and checks that the
// decoded value equals the immediate that was encoded.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_imm_parse;
  import riscv_pkg::*;
  logic clk = 0;
  logic [31:0] inst, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_parse dut (.inst, .sel, .imm);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(imm_sel_e s, logic [31:0] i, logic [31:0] e);
    inst = i; sel = s;
    #1;
    checks++;
    if (imm !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s inst=%h imm=%h exp=%h", s.name(), i, imm, e);
    end
  endtask

  initial begin
    logic [31:0] r, v, noise;
    for (int n = 0; n < 400; n++) begin
      r = $urandom; noise = $urandom;
      // I: 12-bit signed
      v = 32'($signed(r[11:0]));
      chk(IMM_I, {v[11:0], noise[19:0]}, v);
      // S
      chk(IMM_S, {v[11:5], noise[24:12], v[4:0], noise[6:0]}, v);
      // B: 13-bit signed, even
      v = 32'($signed({r[12:1], 1'b0}));
      chk(IMM_B, {v[12], v[10:5], noise[24:12], v[4:1], v[11], noise[6:0]}, v);
      // U
      v = {r[31:12], 12'b0};
      chk(IMM_U, {v[31:12], noise[11:0]}, v);
      // J: 21-bit signed, even
      v = 32'($signed({r[20:1], 1'b0}));
      chk(IMM_J, {v[20], v[10:1], v[11], v[19:12], noise[11:0]}, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
