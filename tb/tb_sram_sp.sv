// tb_sram_sp: self-checking test of the SRAM model at its default 256 x 32 size: random
// masked writes and reads against a shadow array, checking the one-cycle read latency and
// that dout holds during write cycles.
// The size is that of the data macros in the design description; the read and hold
// behaviour checked is this model's own.
module tb_sram_sp;
  logic clk = 0, we = 0;
  logic [3:0] wmask = 0;
  logic [7:0] addr = 0;
  logic [31:0] din = 0, dout;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  sram_sp dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] last;
    // initialise every word
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; wmask = 4'hF; addr = 8'(i); din = $urandom; shadow[i] = din;
    end
    @(negedge clk); we = 0; addr = 0;
    @(negedge clk); last = shadow[0];
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (dout !== last) begin
        failures++;
        if (failures < 10) $display("FAIL dout=%h exp=%h", dout, last);
      end
      we = 1'($urandom); wmask = 4'($urandom); addr = 8'($urandom); din = $urandom;
      @(posedge clk);
      if (we) begin
        for (int b = 0; b < 4; b++) if (wmask[b]) shadow[addr][8*b +: 8] = din[8*b +: 8];
      end else last = shadow[addr];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
