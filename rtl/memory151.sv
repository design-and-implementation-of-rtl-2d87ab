// memory151: memory subsystem of the core: instruction cache, data cache and the arbiter
// that gives them one shared port to main memory. The instruction cache never writes.
// CPU-side ports follow the cache's request/response protocol; the memory-side port
// addresses 128-bit beats and returns a 64-byte line as four beats. Read response data is
// broadcast to both caches; the arbiter's per-cache resp_valid says whose it is.
// The grouping of two caches and an arbiter follows the design's module hierarchy; the
// broadcast of response data is this implementation's own.
module memory151 (
  input  logic         clk,
  input  logic         rst,
  // instruction port
  input  logic         ic_req_valid,
  output logic         ic_req_ready,
  input  logic [29:0]  ic_req_addr,
  output logic         ic_resp_valid,
  output logic [31:0]  ic_resp_data,
  // data port
  input  logic         dc_req_valid,
  output logic         dc_req_ready,
  input  logic [29:0]  dc_req_addr,
  input  logic [31:0]  dc_req_data,
  input  logic [3:0]   dc_req_write,
  output logic         dc_resp_valid,
  output logic [31:0]  dc_resp_data,
  // main memory
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output logic         mem_req_rw,
  output logic [27:0]  mem_req_addr,
  output logic         mem_req_data_valid,
  input  logic         mem_req_data_ready,
  output logic [127:0] mem_req_data_bits,
  output logic [15:0]  mem_req_data_mask,
  input  logic         mem_resp_valid,
  input  logic [127:0] mem_resp_data
);
  logic         i_req_valid, i_req_ready, i_req_rw, i_req_data_valid, i_req_data_ready, i_resp_valid;
  logic         d_req_valid, d_req_ready, d_req_rw, d_req_data_valid, d_req_data_ready, d_resp_valid;
  logic [27:0]  i_req_addr, d_req_addr;
  logic [127:0] i_req_data_bits, d_req_data_bits;
  logic [15:0]  i_req_data_mask, d_req_data_mask;

  cache u_icache (
    .clk, .rst,
    .cpu_req_valid(ic_req_valid), .cpu_req_ready(ic_req_ready), .cpu_req_addr(ic_req_addr),
    .cpu_req_data(32'd0), .cpu_req_write(4'b0000),
    .cpu_resp_valid(ic_resp_valid), .cpu_resp_data(ic_resp_data),
    .mem_req_valid(i_req_valid), .mem_req_ready(i_req_ready), .mem_req_rw(i_req_rw),
    .mem_req_addr(i_req_addr), .mem_req_data_valid(i_req_data_valid),
    .mem_req_data_ready(i_req_data_ready), .mem_req_data_bits(i_req_data_bits),
    .mem_req_data_mask(i_req_data_mask),
    .mem_resp_valid(i_resp_valid), .mem_resp_data
  );

  cache u_dcache (
    .clk, .rst,
    .cpu_req_valid(dc_req_valid), .cpu_req_ready(dc_req_ready), .cpu_req_addr(dc_req_addr),
    .cpu_req_data(dc_req_data), .cpu_req_write(dc_req_write),
    .cpu_resp_valid(dc_resp_valid), .cpu_resp_data(dc_resp_data),
    .mem_req_valid(d_req_valid), .mem_req_ready(d_req_ready), .mem_req_rw(d_req_rw),
    .mem_req_addr(d_req_addr), .mem_req_data_valid(d_req_data_valid),
    .mem_req_data_ready(d_req_data_ready), .mem_req_data_bits(d_req_data_bits),
    .mem_req_data_mask(d_req_data_mask),
    .mem_resp_valid(d_resp_valid), .mem_resp_data
  );

  mem_arbiter u_arbiter (
    .clk, .rst,
    .ic_req_valid(i_req_valid), .ic_req_ready(i_req_ready), .ic_req_rw(i_req_rw),
    .ic_req_addr(i_req_addr), .ic_req_data_valid(i_req_data_valid),
    .ic_req_data_ready(i_req_data_ready), .ic_req_data_bits(i_req_data_bits),
    .ic_req_data_mask(i_req_data_mask), .ic_resp_valid(i_resp_valid),
    .dc_req_valid(d_req_valid), .dc_req_ready(d_req_ready), .dc_req_rw(d_req_rw),
    .dc_req_addr(d_req_addr), .dc_req_data_valid(d_req_data_valid),
    .dc_req_data_ready(d_req_data_ready), .dc_req_data_bits(d_req_data_bits),
    .dc_req_data_mask(d_req_data_mask), .dc_resp_valid(d_resp_valid),
    .mem_req_valid, .mem_req_ready, .mem_req_rw, .mem_req_addr,
    .mem_req_data_valid, .mem_req_data_ready, .mem_req_data_bits, .mem_req_data_mask,
    .mem_resp_valid
  );
endmodule
