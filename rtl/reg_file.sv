// reg_file: 32 x 32-bit integer register file.
// Two asynchronous read ports (addressed from instruction bits [19:15] and [24:20] in the
// fetch/decode stage) and one synchronous write port driven by the memory/writeback stage.
// x0 reads as zero and is never written. Registers x1..x31 are flip-flops, reset to zero.
// A read of a register being written in the same cycle returns the old value; the pipeline's
// memory bypass supplies the new one.
// The asynchronous reads and flip-flop registers follow the design description; the
// reset to zero is this implementation's own.
module reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);
  logic [31:0] regs [1:31];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];
endmodule
