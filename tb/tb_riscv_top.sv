// tb_riscv_top: end-to-end test of the whole design at its default (and only) size: core,
// instruction cache, data cache and arbiter, in front of the main-memory model.
// Runs the self-checking program from rv_asm_pkg (ALU operations, loads and stores of every
// width, branches, jumps, CSR, a loop) placed at 0x2000, plus a pass over a data region
// larger than the data cache so that lines are evicted and refetched. The program reports
// through tohost; the testbench then compares main memory with the bytes the program
// stored (the data cache writes through), checks that each mechanism of the design
// occurred at least once (ALU and memory bypass, load-use bubble, branch/jump kill,
// instruction- and data-cache read hits and misses, write hits and misses, both caches
// asking for memory in the same cycle), and checks the cache timing: every read hit answers
// 2 cycles after the request, every read miss 6 cycles after it when memory is idle.
// The 2-cycle hit and 6-cycle miss come from the design description; the program and
// counters are this testbench's own.
module tb_riscv_top;
  import rv_asm_pkg::*;
  logic clk = 0, rst = 1;
  logic         mem_req_valid, mem_req_ready, mem_req_rw, mem_req_data_valid, mem_req_data_ready;
  logic         mem_resp_valid;
  logic [27:0]  mem_req_addr;
  logic [127:0] mem_req_data_bits, mem_resp_data;
  logic [15:0]  mem_req_data_mask;
  logic [31:0]  htif_tohost;
  int checks = 0, failures = 0;

  riscv_top dut (.*);
  ext_mem_model #(.BEATS_LOG2(14), .LAT(1)) u_mem (.*);

  always #5 clk = ~clk;

  // ---- mechanism counters ----
  int n_alu_bp = 0, n_mem_bp = 0, n_loaduse = 0, n_kill = 0, n_stall = 0;
  int ic_hit = 0, ic_miss = 0, dc_hit = 0, dc_miss = 0, wr_hit = 0, wr_miss = 0, both_req = 0;
  int cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (dut.u_cpu.u_pipeline_control.adv) begin
      if (dut.u_cpu.op1_bp_sel == riscv_pkg::BP_ALU || dut.u_cpu.op2_bp_sel == riscv_pkg::BP_ALU ||
          dut.u_cpu.rs2_bp_sel == riscv_pkg::BP_ALU) n_alu_bp++;
      if (dut.u_cpu.op1_bp_sel == riscv_pkg::BP_MEM || dut.u_cpu.op2_bp_sel == riscv_pkg::BP_MEM ||
          dut.u_cpu.rs2_bp_sel == riscv_pkg::BP_MEM) n_mem_bp++;
      if (dut.u_cpu.bp_stall && !dut.u_cpu.redirect) n_loaduse++;
      if (dut.u_cpu.redirect) n_kill++;
    end else n_stall++;
    if (dut.u_mem.u_icache.cpu_resp_valid && !dut.u_mem.u_icache.filling) ic_hit++;
    if (dut.u_mem.u_icache.mem_fire) ic_miss++;
    if (dut.u_mem.u_dcache.cpu_resp_valid && !dut.u_mem.u_dcache.filling) dc_hit++;
    if (dut.u_mem.u_dcache.mem_fire && !dut.u_mem.u_dcache.mem_req_rw) dc_miss++;
    if (dut.u_mem.u_dcache.mem_fire && dut.u_mem.u_dcache.mem_req_rw) begin
      if (dut.u_mem.u_dcache.hit) wr_hit++; else wr_miss++;
    end
    if (dut.u_mem.i_req_valid && dut.u_mem.d_req_valid) both_req++;
  end

  // ---- cache timing: request accepted -> response ----
  int ic_t0 = 0, ic_lat_bad = 0, ic_lat_n = 0;
  logic ic_missed = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.ic_req_valid && dut.ic_req_ready) begin ic_t0 <= cyc; ic_missed <= 0; end
    if (dut.u_mem.u_icache.mem_fire) ic_missed <= 1;
    if (dut.ic_resp_valid) begin
      ic_lat_n++;
      // cycles counted from the request cycle (1) to the response cycle
      if (!ic_missed && !dut.u_mem.u_icache.filling && cyc - ic_t0 + 1 != 2) ic_lat_bad++;
      if (ic_missed && dut.u_mem.u_icache.filling && cyc - ic_t0 + 1 < 6) ic_lat_bad++;
    end
  end
  // a miss whose memory request was not delayed by the other cache takes exactly 6 cycles
  int ic_exact6 = 0;
  always @(posedge clk) if (!rst && dut.ic_resp_valid && ic_missed && cyc - ic_t0 + 1 == 6) ic_exact6++;

  initial begin
    repeat (2000000) @(posedge clk);
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
    p.gen_mem(80);
    p.gen_branch(60);
    p.gen_jump();
    p.gen_loop(30);
    p.gen_mem(40);
    p.epilogue();
    for (int i = 0; i < 2**14; i++) u_mem.mem[i] = '0;
    foreach (p.code[i]) u_mem.mem[(p.base >> 4) + i / 4][32*(i%4) +: 32] = p.code[i];
    repeat (3) @(negedge clk);
    rst = 0;
    while (!htif_tohost[0]) @(negedge clk);
    checks += p.test_id;   // checks made by the program itself
    chk(htif_tohost == 1, $sformatf("program reports failure in test %0d", htif_tohost >> 1));
    repeat (20) @(negedge clk);
    foreach (p.shadow[a]) begin
      w = a >> 4;
      chk(u_mem.mem[w][8*(a%16) +: 8] == p.shadow[a], $sformatf("byte %h", a));
    end
    chk(n_alu_bp > 0, "ALU bypass never used");
    chk(n_mem_bp > 0, "memory bypass never used");
    chk(n_loaduse > 0, "load-use bubble never inserted");
    chk(n_kill > 0, "no branch/jump kill");
    chk(n_stall > 0, "no memory stall");
    chk(ic_hit > 0 && ic_miss > 0, "instruction cache hit/miss");
    chk(dc_hit > 0 && dc_miss > 0, "data cache read hit/miss");
    chk(wr_hit > 0 && wr_miss > 0, "data cache write hit/miss");
    chk(both_req > 0, "caches never competed for memory");
    chk(ic_lat_bad == 0, $sformatf("%0d instruction fetches with wrong latency", ic_lat_bad));
    chk(ic_exact6 > 0, "no 6-cycle miss seen");
    $display("tests=%0d cycles=%0d instrs~%0d alu_bp=%0d mem_bp=%0d loaduse=%0d kill=%0d stall=%0d",
             p.test_id, cyc, p.code.size(), n_alu_bp, n_mem_bp, n_loaduse, n_kill, n_stall);
    $display("icache hit=%0d miss=%0d dcache hit=%0d miss=%0d write hit=%0d miss=%0d both=%0d fetches=%0d",
             ic_hit, ic_miss, dc_hit, dc_miss, wr_hit, wr_miss, both_req, ic_lat_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
