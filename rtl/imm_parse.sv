// imm_parse: immediate extraction for the fetch/decode stage.
// Produces the sign-extended I, S, B, U and J (UJ) immediates of an RV32I instruction and
// returns the one named by sel. B and J immediates come out already scaled to a byte
// offset (bit 0 is zero), so the branch/jump target adder can add them to the PC directly.
// Combinational.
// The block follows the design description's immediate units; producing B and J offsets
// already scaled (instead of shifting in front of the target adder) is this design's choice.
module imm_parse
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_sel_e    sel,
  output logic [31:0] imm
);
  logic [31:0] i_imm, s_imm, b_imm, u_imm, j_imm;

  always_comb begin
    i_imm = {{20{inst[31]}}, inst[31:20]};
    s_imm = {{20{inst[31]}}, inst[31:25], inst[11:7]};
    b_imm = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
    u_imm = {inst[31:12], 12'b0};
    j_imm = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
    unique case (sel)
      IMM_I:   imm = i_imm;
      IMM_S:   imm = s_imm;
      IMM_B:   imm = b_imm;
      IMM_U:   imm = u_imm;
      IMM_J:   imm = j_imm;
      default: imm = i_imm;
    endcase
  end
endmodule
