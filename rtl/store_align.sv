// store_align: store data and byte-mask generation of the memory/writeback stage.
// From the low two address bits and the store type (funct3: SB, SH, SW) it sets the 4-bit
// byte write mask and shifts the rs2 value into the addressed byte lanes of the word sent to
// the data cache. Combinational.
// Setting the write mask from the low address bits and the store type follows the design
// description; the lane shift of the data is standard RV32I.
module store_align (
  input  logic [31:0] data,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] wdata,
  output logic [3:0]  mask
);
  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin
        mask  = 4'b0001 << addr_lo;
        wdata = {4{data[7:0]}};
      end
      2'b01: begin
        mask  = addr_lo[1] ? 4'b1100 : 4'b0011;
        wdata = {2{data[15:0]}};
      end
      default: begin
        mask  = 4'b1111;
        wdata = data;
      end
    endcase
  end
endmodule
