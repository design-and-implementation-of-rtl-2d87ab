// tb_branch_comp: self-checking test of the branch condition generator for all six RV32I
// branch types on random and corner operands.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_branch_comp;
  logic clk = 0;
  logic [31:0] a, b;
  logic [2:0] funct3;
  logic br_eq, br_lt, br_ltu, br_out;
  int checks = 0, failures = 0;

  branch_comp dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e, slt, ult;
    logic [2:0] f3s [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
    for (int n = 0; n < 6000; n++) begin
      a = $urandom; b = (n % 3 == 0) ? a : $urandom;
      if (n % 7 == 0) b = {~a[31], a[30:0]};
      funct3 = f3s[n % 6];
      #1;
      // signed compare via offset binary
      slt = (a ^ 32'h8000_0000) < (b ^ 32'h8000_0000);
      ult = a < b;
      case (funct3)
        3'd0: e = a == b;
        3'd1: e = a != b;
        3'd4: e = slt;
        3'd5: e = !slt;
        3'd6: e = ult;
        default: e = !ult;
      endcase
      checks++;
      if (br_out !== e || br_eq !== (a == b) || br_lt !== slt || br_ltu !== ult) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h f3=%0d br_out=%b exp=%b", a, b, funct3, br_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
