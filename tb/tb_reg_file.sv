// tb_reg_file: self-checking test of the register file against a shadow array: random
// writes (including to x0) and reads on both ports, reset to zero, and old-value reads of a
// register written in the same cycle.
// The checks follow the RV32I register rules and this design's reset choice.
module tb_reg_file;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] wa = 0, ra1 = 0, ra2 = 0;
  logic [31:0] wd = 0, rd1, rd2;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst, .we, .wa, .wd, .ra1, .ra2, .rd1, .rd2);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, e);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      chk(rd1, 0, "reset rd1"); chk(rd2, 0, "reset rd2");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = ($urandom % 4 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom);
      #1;
      chk(rd1, shadow[ra1], "rd1");
      chk(rd2, shadow[ra2], "rd2");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
