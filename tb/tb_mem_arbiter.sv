// tb_mem_arbiter: self-checking test of the memory arbiter between two cache-like requesters
// and the main-memory model. Each requester issues random line reads (then waits for its
// four beats) and random masked beat writes. Checked: read beats reach only the requester
// that asked, in order and with the memory's data; writes land in memory; the data cache
// wins when both ask in the same cycle; nothing is accepted while a read is in flight.
// The rules checked are this design's own arbitration policy.
module tb_mem_arbiter;
  logic clk = 0, rst = 1;
  logic         ic_req_valid = 0, ic_req_ready, ic_req_rw = 0, ic_req_data_valid = 0, ic_req_data_ready, ic_resp_valid;
  logic [27:0]  ic_req_addr = 0;
  logic [127:0] ic_req_data_bits = 0;
  logic [15:0]  ic_req_data_mask = 0;
  logic         dc_req_valid = 0, dc_req_ready, dc_req_rw = 0, dc_req_data_valid = 0, dc_req_data_ready, dc_resp_valid;
  logic [27:0]  dc_req_addr = 0;
  logic [127:0] dc_req_data_bits = 0;
  logic [15:0]  dc_req_data_mask = 0;
  logic         mem_req_valid, mem_req_ready, mem_req_rw, mem_req_data_valid, mem_req_data_ready, mem_resp_valid;
  logic [27:0]  mem_req_addr;
  logic [127:0] mem_req_data_bits, mem_resp_data;
  logic [15:0]  mem_req_data_mask;
  int checks = 0, failures = 0;
  int both = 0, reads_done = 0, writes_done = 0;

  localparam int BL2 = 8;
  logic [127:0] shadow [2**BL2];

  mem_arbiter dut (.*);
  ext_mem_model #(.BEATS_LOG2(BL2), .LAT(2)) u_mem (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: reads=%0d writes=%0d busy=%b ic=%b dc=%b", reads_done, writes_done, dut.busy, ic_req_valid, dc_req_valid);
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

  // priority and exclusivity, sampled every cycle
  always @(negedge clk) if (!rst) begin
    if (ic_req_valid && dc_req_valid) begin
      both++;
      chk(!ic_req_ready, "icache granted while dcache asks");
    end
    if (dut.busy) chk(!ic_req_ready && !dc_req_ready, "request accepted during a read");
  end

  // one requester: which = 0 icache, 1 dcache
  task automatic requester(bit which, int n);
    logic [27:0] a;
    logic [127:0] d;
    logic [15:0] m;
    bit rw;
    for (int k = 0; k < n; k++) begin
      repeat ($urandom % 3) @(negedge clk);
      rw = 1'($urandom % 3 == 0);
      a = 28'($urandom % (2**BL2));
      if (!rw) a[1:0] = 2'b00;
      d = {$urandom, $urandom, $urandom, $urandom};
      m = 16'($urandom);
      if (which) begin
        dc_req_valid = 1; dc_req_rw = rw; dc_req_addr = a; dc_req_data_valid = rw;
        dc_req_data_bits = d; dc_req_data_mask = m;
        forever begin #4; if (dc_req_ready && (!rw || dc_req_data_ready)) break; @(negedge clk); end
      end else begin
        ic_req_valid = 1; ic_req_rw = rw; ic_req_addr = a; ic_req_data_valid = rw;
        ic_req_data_bits = d; ic_req_data_mask = m;
        forever begin #4; if (ic_req_ready && (!rw || ic_req_data_ready)) break; @(negedge clk); end
      end
      @(negedge clk);
      if (which) begin dc_req_valid = 0; dc_req_data_valid = 0; end
      else begin ic_req_valid = 0; ic_req_data_valid = 0; end
      if (rw) begin
        for (int b = 0; b < 16; b++) if (m[b]) shadow[a][8*b +: 8] = d[8*b +: 8];
        writes_done++;
      end else begin
        for (int beat = 0; beat < 4; beat++) begin
          while (!(which ? dc_resp_valid : ic_resp_valid)) begin
            @(negedge clk);
          end
          chk(!(which ? ic_resp_valid : dc_resp_valid), "beat delivered to both");
          chk(mem_resp_data == shadow[a + 28'(beat)], $sformatf("read %h beat %0d", a, beat));
          @(negedge clk);
        end
        reads_done++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 2**BL2; i++) begin
      u_mem.mem[i] = {$urandom, $urandom, $urandom, $urandom};
      shadow[i] = u_mem.mem[i];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      requester(1'b0, 400);
      requester(1'b1, 400);
    join
    repeat (5) @(negedge clk);
    for (int i = 0; i < 2**BL2; i++) chk(u_mem.mem[i] == shadow[i], $sformatf("memory beat %0d", i));
    chk(both > 0, "no contention seen");
    $display("reads=%0d writes=%0d contention=%0d", reads_done, writes_done, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
