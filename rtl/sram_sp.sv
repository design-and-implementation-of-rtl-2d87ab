// sram_sp: single-port synchronous SRAM with a byte write mask.
// Stands for the SRAM macros of the caches: the 256 x 32 data macros
// (sram22_256x32m4w8, four per cache) and the 64 x 32 tag ("metadata") macro, one per cache.
// One access per cycle on the rising clock edge: with we high the bytes selected by wmask are
// written at addr; with we low the word at addr appears on dout after the edge (one-cycle
// read latency) and stays there until the next read. Written as an array so that it
// simulates and synthesizes anywhere; a real flow maps it to the macro.
// The macro sizes and the count of macros follow the design description; the byte mask
// behaviour and the held read data are modelled as this implementation's choice.
module sram_sp #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned MW   = WIDTH / 8
) (
  input  logic             clk,
  input  logic             we,
  input  logic [MW-1:0]    wmask,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < MW; b++)
        if (wmask[b]) mem[addr][8*b +: 8] <= din[8*b +: 8];
    end else begin
      dout <= mem[addr];
    end
  end
endmodule
