// tb_alu: self-checking test of the ALU. Applies directed corner values and random operands
// to every operation and compares with a reference computed here bit by bit.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_alu;
  import riscv_pkg::*;
  logic clk = 0;
  logic [31:0] a, b, y, exp;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    int sh = int'(z[4:0]);
    case (o)
      ALU_ADD:  r = x + z;
      ALU_SUB:  r = x + ~z + 1;
      ALU_SLL:  begin r = x; repeat (sh) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = x; repeat (sh) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = x; repeat (sh) r = {r[31], r[31:1]}; end
      ALU_SLT:  r = (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z};
      ALU_SLTU: r = {31'b0, x < z};
      ALU_XOR:  r = x ^ z;
      ALU_OR:   r = x | z;
      ALU_AND:  r = x & z;
      default:  r = z;
    endcase
    return r;
  endfunction

  task automatic run(alu_op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z;
    #1;
    exp = ref_alu(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int o = 0; o <= int'(ALU_COPY_B); o++) begin
      foreach (corner[i]) foreach (corner[j]) run(alu_op_e'(o), corner[i], corner[j]);
      repeat (500) run(alu_op_e'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
