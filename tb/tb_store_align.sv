// tb_store_align: self-checking test of store alignment: for SB, SH and SW at every aligned
// offset, applies mask and data to a random old word and checks the merged word against a
// byte-wise reference.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_store_align;
  logic clk = 0;
  logic [31:0] data, wdata;
  logic [1:0] addr_lo;
  logic [2:0] funct3;
  logic [3:0] mask;
  int checks = 0, failures = 0;

  store_align dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] old, merged, e;
    int nbytes;
    for (int n = 0; n < 3000; n++) begin
      data = $urandom; old = $urandom;
      funct3 = 3'(n % 3);
      nbytes = 1 << funct3;
      addr_lo = 2'(($urandom % (4 / nbytes)) * nbytes);
      #1;
      for (int i = 0; i < 4; i++) merged[8*i +: 8] = mask[i] ? wdata[8*i +: 8] : old[8*i +: 8];
      e = old;
      for (int i = 0; i < nbytes; i++) e[8*(addr_lo + i) +: 8] = data[8*i +: 8];
      checks++;
      if (merged !== e) begin
        failures++;
        if (failures < 10) $display("FAIL f3=%0d lo=%0d data=%h mask=%b wdata=%h", funct3, addr_lo, data, mask, wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
