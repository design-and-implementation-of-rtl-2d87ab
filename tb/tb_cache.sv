// tb_cache: self-checking test of one cache in front of the main-memory model.
// Random reads and byte-masked writes over a few indexes and tags, so that read hits, read
// misses, conflict evictions, write hits and write misses all occur. Read data is checked
// against a shadow copy of memory; a separate tag model kept here predicts hit or miss, and
// the response latency is checked: 1 cycle after acceptance for a hit (2 cycles in all),
// 5 for a miss when memory answers at once (the 4-cycle miss penalty). Main memory is
// compared with the shadow at the end (write-through).
// The hit and miss latencies checked are those of the design description; the traffic
// pattern is this testbench's own.
module tb_cache;
  logic clk = 0, rst = 1;
  logic         cpu_req_valid = 0, cpu_req_ready, cpu_resp_valid;
  logic [29:0]  cpu_req_addr = 0;
  logic [31:0]  cpu_req_data = 0, cpu_resp_data;
  logic [3:0]   cpu_req_write = 0;
  logic         mem_req_valid, mem_req_ready, mem_req_rw, mem_req_data_valid, mem_req_data_ready;
  logic         mem_resp_valid;
  logic [27:0]  mem_req_addr;
  logic [127:0] mem_req_data_bits, mem_resp_data;
  logic [15:0]  mem_req_data_mask;
  int checks = 0, failures = 0;
  int cycle = 0;
  int read_hits = 0, read_misses = 0, write_hits = 0, write_misses = 0;

  localparam int BL2 = 14;
  logic [31:0] shadow [2**(BL2+2)];
  logic [19:0] tags [64];
  logic        valids [64];

  cache dut (.*);
  ext_mem_model #(.BEATS_LOG2(BL2), .LAT(1)) u_mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", msg, cycle);
    end
  endtask

  task automatic access(logic [29:0] a, logic [3:0] wr, logic [31:0] d);
    int t0;
    logic exp_hit;
    exp_hit = valids[a[9:4]] && tags[a[9:4]] == a[29:10];
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_addr = a; cpu_req_write = wr; cpu_req_data = d;
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    t0 = cycle;   // first cycle after acceptance
    cpu_req_valid = 0;
    if (wr == 0) begin
      while (!cpu_resp_valid) @(negedge clk);
      chk(cpu_resp_data == shadow[a[BL2+1:0]], $sformatf("read %h data %h exp %h", a, cpu_resp_data, shadow[a[BL2+1:0]]));
      chk(cycle - t0 == (exp_hit ? 0 : 4), $sformatf("read %h latency %0d hit=%b", a, cycle - t0 + 2, exp_hit));
      if (exp_hit) read_hits++; else read_misses++;
      valids[a[9:4]] = 1; tags[a[9:4]] = a[29:10];
    end else begin
      for (int b = 0; b < 4; b++) if (wr[b]) shadow[a[BL2+1:0]][8*b +: 8] = d[8*b +: 8];
      if (exp_hit) write_hits++; else write_misses++;
    end
  endtask

  initial begin
    logic [29:0] a;
    for (int i = 0; i < 2**BL2; i++) begin
      u_mem.mem[i] = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 4; w++) shadow[4*i + w] = u_mem.mem[i][32*w +: 32];
    end
    foreach (valids[i]) valids[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      a = '0;
      a[3:0]   = 4'($urandom);
      a[9:4]   = 6'($urandom % 4);
      a[15:10] = 6'($urandom % 3);
      if ($urandom % 3 == 0) access(a, 4'($urandom | 1), $urandom);
      else access(a, 4'b0000, 32'd0);
    end
    repeat (10) @(negedge clk);
    for (int i = 0; i < 2**BL2; i++)
      chk(u_mem.mem[i] == {shadow[4*i+3], shadow[4*i+2], shadow[4*i+1], shadow[4*i]},
          $sformatf("memory beat %0d", i));
    chk(read_hits > 100 && read_misses > 100 && write_hits > 50 && write_misses > 50, "coverage");
    $display("read hits %0d misses %0d, write hits %0d misses %0d", read_hits, read_misses, write_hits, write_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
