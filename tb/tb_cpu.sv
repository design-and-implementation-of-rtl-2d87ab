// tb_cpu: self-checking test of the core (cpu and the pipeline_control inside it) with
// simple behavioural instruction and data memories that share one word array. Each memory
// port takes requests only when a random ready is high and answers a read 1 to 3 cycles
// later, so the pipeline sees stalls of varying length on both ports, alone and together.
// The program from rv_asm_pkg checks ALU operations, bypasses, load-use bubbles, branches,
// jumps and the tohost CSR itself and reports through tohost; the testbench also checks the
// stored bytes in memory and that each pipeline mechanism occurred.
// The mechanisms counted are the ones the design description names; the memory behaviour
// is this testbench's own and harsher than the caches.
module tb_cpu;
  import rv_asm_pkg::*;
  logic clk = 0, rst = 1;
  logic        ic_req_valid, ic_req_ready, ic_resp_valid;
  logic        dc_req_valid, dc_req_ready, dc_resp_valid;
  logic [29:0] ic_req_addr, dc_req_addr;
  logic [31:0] ic_resp_data, dc_req_data, dc_resp_data, htif_tohost;
  logic [3:0]  dc_req_write;
  int checks = 0, failures = 0;

  cpu dut (.*);

  always #5 clk = ~clk;

  localparam int WORDS = 1 << 15;   // 128 KiB
  logic [31:0] mem [WORDS];

  // ---- behavioural memory ports ----
  logic ic_busy = 0, dc_busy = 0, ic_rdy = 0, dc_rdy = 0;
  int   ic_wait, dc_wait;
  logic [29:0] ic_a, dc_a;
  assign ic_req_ready  = ic_rdy && !ic_busy;
  assign dc_req_ready  = dc_rdy && !dc_busy;
  assign ic_resp_valid = ic_busy && ic_wait == 0;
  assign dc_resp_valid = dc_busy && dc_wait == 0;
  assign ic_resp_data  = mem[ic_a[14:0]];
  assign dc_resp_data  = mem[dc_a[14:0]];

  always @(posedge clk) begin
    ic_rdy <= ($urandom % 4) != 0;
    dc_rdy <= ($urandom % 4) != 0;
    if (ic_busy) begin
      if (ic_wait == 0) ic_busy <= 0; else ic_wait <= ic_wait - 1;
    end else if (ic_req_valid && ic_req_ready) begin
      ic_busy <= 1; ic_a <= ic_req_addr; ic_wait <= $urandom % 3;
    end
    if (dc_busy) begin
      if (dc_wait == 0) dc_busy <= 0; else dc_wait <= dc_wait - 1;
    end else if (dc_req_valid && dc_req_ready) begin
      if (dc_req_write != 0) begin
        for (int b = 0; b < 4; b++)
          if (dc_req_write[b]) mem[dc_req_addr[14:0]][8*b +: 8] <= dc_req_data[8*b +: 8];
      end else begin
        dc_busy <= 1; dc_a <= dc_req_addr; dc_wait <= $urandom % 3;
      end
    end
  end

  // ---- mechanism counters ----
  int n_alu_bp = 0, n_mem_bp = 0, n_loaduse = 0, n_kill = 0, n_stall = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_pipeline_control.adv) begin
      if (dut.op1_bp_sel == riscv_pkg::BP_ALU || dut.op2_bp_sel == riscv_pkg::BP_ALU ||
          dut.rs2_bp_sel == riscv_pkg::BP_ALU) n_alu_bp++;
      if (dut.op1_bp_sel == riscv_pkg::BP_MEM || dut.op2_bp_sel == riscv_pkg::BP_MEM ||
          dut.rs2_bp_sel == riscv_pkg::BP_MEM) n_mem_bp++;
      if (dut.bp_stall && !dut.redirect) n_loaduse++;
      if (dut.redirect) n_kill++;
    end else n_stall++;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: tohost=%h", htif_tohost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    rv_prog p = new();
    int unsigned w;
    p.prologue();
    p.gen_alu(60);
    p.gen_mem(60);
    p.gen_branch(60);
    p.gen_jump();
    p.gen_loop(20);
    p.epilogue();
    foreach (mem[i]) mem[i] = '0;
    foreach (p.code[i]) mem[(p.base >> 2) + i] = p.code[i];
    repeat (3) @(negedge clk);
    rst = 0;
    while (!htif_tohost[0]) @(negedge clk);
    checks += p.test_id;   // checks made by the program itself
    chk(htif_tohost == 1, $sformatf("program reports failure in test %0d", htif_tohost >> 1));
    foreach (p.shadow[a]) begin
      w = a >> 2;
      chk(mem[w][8*(a%4) +: 8] == p.shadow[a], $sformatf("byte %h", a));
    end
    chk(n_alu_bp > 0, "ALU bypass never used");
    chk(n_mem_bp > 0, "memory bypass never used");
    chk(n_loaduse > 0, "load-use bubble never inserted");
    chk(n_kill > 0, "no branch/jump kill");
    chk(n_stall > 0, "no memory stall");
    $display("tests=%0d cycles=%0d alu_bp=%0d mem_bp=%0d loaduse=%0d kill=%0d stall=%0d",
             p.test_id, cyc, n_alu_bp, n_mem_bp, n_loaduse, n_kill, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
