// ext_mem_model: behavioural model of the external main memory behind the caches (not part
// of the design). Memory is an array of 128-bit beats. A read request (rw = 0) names the
// first beat of a 64-byte line; after LAT cycles the four beats come back on four
// consecutive cycles as mem_resp_valid pulses. A write request (rw = 1) is accepted together
// with its data beat and byte mask and is applied at once. The model takes one request at a
// time: ready is low while a read is being answered.
// The 128-bit beat, four-beat line and write-with-mask format match the cache's memory
// port; the latency and the one-request-at-a-time behaviour are this model's own choice.
module ext_mem_model #(
  parameter int unsigned BEATS_LOG2 = 14,   // 2^14 beats = 256 KiB
  parameter int unsigned LAT        = 1     // cycles from accepting a read to its first beat
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         mem_req_valid,
  output logic         mem_req_ready,
  input  logic         mem_req_rw,
  input  logic [27:0]  mem_req_addr,
  input  logic         mem_req_data_valid,
  output logic         mem_req_data_ready,
  input  logic [127:0] mem_req_data_bits,
  input  logic [15:0]  mem_req_data_mask,
  output logic         mem_resp_valid,
  output logic [127:0] mem_resp_data
);
  logic [127:0] mem [2**BEATS_LOG2];
  logic         busy;
  int unsigned  wait_cnt, beat;
  logic [27:0]  base;
  int unsigned  reads = 0, writes = 0;

  assign mem_req_ready      = !busy;
  assign mem_req_data_ready = !busy;

  // a read's beats come straight from the array while the model is answering
  assign mem_resp_valid = busy && wait_cnt == 0;
  assign mem_resp_data  = mem[(base[BEATS_LOG2-1:0] & ~BEATS_LOG2'(3)) + BEATS_LOG2'(beat)];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      base     <= '0;
      wait_cnt <= 0;
      beat     <= 0;
    end else if (!busy && mem_req_valid) begin
      if (mem_req_rw) begin
        if (mem_req_data_valid) begin
          for (int b = 0; b < 16; b++)
            if (mem_req_data_mask[b])
              mem[mem_req_addr[BEATS_LOG2-1:0]][8*b +: 8] <= mem_req_data_bits[8*b +: 8];
          writes <= writes + 1;
        end
      end else begin
        busy     <= 1'b1;
        base     <= mem_req_addr;
        wait_cnt <= LAT - 1;
        beat     <= 0;
        reads    <= reads + 1;
      end
    end else if (busy) begin
      if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        beat <= beat + 1;
        if (beat == 3) busy <= 1'b0;
      end
    end
  end
endmodule
