// load_parse: load data extraction of the memory/writeback stage.
// The data cache returns whole aligned words. Using the low two address bits and the load's
// funct3, this picks the addressed byte or half-word and sign- or zero-extends it
// (LB, LH, LW, LBU, LHU). Misaligned half-words and words are not supported (RV32I allows
// a trap there; this core simply returns the aligned word's bytes). Combinational.
// Word-wide cache reads with extraction in the pipeline follow the design description;
// the handling of misaligned addresses is this implementation's own.
module load_parse (
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] data
);
  logic [7:0]  b;
  logic [15:0] h;

  always_comb begin
    b = word[8*addr_lo +: 8];
    h = addr_lo[1] ? word[31:16] : word[15:0];
    unique case (funct3)
      3'b000:  data = {{24{b[7]}}, b};
      3'b001:  data = {{16{h[15]}}, h};
      3'b100:  data = {24'b0, b};
      3'b101:  data = {16'b0, h};
      default: data = word;
    endcase
  end
endmodule
