// tb_load_parse: self-checking test of load data extraction for LB, LH, LW, LBU and LHU at
// every aligned position in a word.
// The reference follows the RV32I definition, independently of the design;
// the stimulus and checks are this testbench's own.
module tb_load_parse;
  logic clk = 0;
  logic [31:0] word, data, e;
  logic [1:0] addr_lo;
  logic [2:0] funct3;
  int checks = 0, failures = 0;

  load_parse dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] bytes [4];
    for (int n = 0; n < 3000; n++) begin
      word = $urandom;
      bytes = '{word[7:0], word[15:8], word[23:16], word[31:24]};
      funct3 = 3'(n % 6 == 3 ? 3'd4 : (n % 6 == 4 ? 3'd5 : n % 6));
      if (funct3 == 3'd3) funct3 = 3'd2;
      addr_lo = 2'($urandom);
      if (funct3[1:0] == 2'd1) addr_lo[0] = 1'b0;
      if (funct3 == 3'd2) addr_lo = 2'd0;
      #1;
      case (funct3)
        3'd0: e = {{24{bytes[addr_lo][7]}}, bytes[addr_lo]};
        3'd4: e = {24'd0, bytes[addr_lo]};
        3'd1: e = {{16{bytes[addr_lo+1][7]}}, bytes[addr_lo+1], bytes[addr_lo]};
        3'd5: e = {16'd0, bytes[addr_lo+1], bytes[addr_lo]};
        default: e = word;
      endcase
      checks++;
      if (data !== e) begin
        failures++;
        if (failures < 10) $display("FAIL word=%h lo=%0d f3=%0d data=%h exp=%h", word, addr_lo, funct3, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
