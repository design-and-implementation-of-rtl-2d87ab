// branch_comp: branch condition generator of the execute stage.
// Compares E_OP1 (rs1) with E_RS2 (rs2) and reports equal, signed-less-than and
// unsigned-less-than, then combines them with the branch's funct3 into br_out, "branch
// taken". br_out is only meaningful when the execute instruction is a conditional branch.
// Combinational.
// The block and its br_eq / br_lt / br_ltu outputs follow the design description; how
// they are combined into br_out is standard RV32I.
module branch_comp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  funct3,
  output logic        br_eq,
  output logic        br_lt,
  output logic        br_ltu,
  output logic        br_out
);
  always_comb begin
    br_eq  = a == b;
    br_lt  = $signed(a) < $signed(b);
    br_ltu = a < b;
    unique case (funct3)
      3'b000:  br_out = br_eq;    // BEQ
      3'b001:  br_out = !br_eq;   // BNE
      3'b100:  br_out = br_lt;    // BLT
      3'b101:  br_out = !br_lt;   // BGE
      3'b110:  br_out = br_ltu;   // BLTU
      3'b111:  br_out = !br_ltu;  // BGEU
      default: br_out = 1'b0;
    endcase
  end
endmodule
