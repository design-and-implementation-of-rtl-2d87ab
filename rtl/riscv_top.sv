// riscv_top: the complete design: the 3-stage RV32I core and its memory subsystem
// (instruction cache, data cache, arbiter). The only external interface is the main-memory
// port, which addresses 128-bit beats and answers a read with the four beats of a 64-byte
// line, plus the tohost CSR through which a program reports its result. Execution starts at
// 0x2000 after reset (active high, synchronous).
// The core/memory split and the reset PC follow the design description; the memory port
// format is this implementation's own.
module riscv_top (
  input  logic         clk,
  input  logic         rst,
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output logic         mem_req_rw,
  output logic [27:0]  mem_req_addr,
  output logic         mem_req_data_valid,
  input  logic         mem_req_data_ready,
  output logic [127:0] mem_req_data_bits,
  output logic [15:0]  mem_req_data_mask,
  input  logic         mem_resp_valid,
  input  logic [127:0] mem_resp_data,
  output logic [31:0]  htif_tohost
);
  logic        ic_req_valid, ic_req_ready, ic_resp_valid;
  logic        dc_req_valid, dc_req_ready, dc_resp_valid;
  logic [29:0] ic_req_addr, dc_req_addr;
  logic [31:0] ic_resp_data, dc_req_data, dc_resp_data;
  logic [3:0]  dc_req_write;

  cpu u_cpu (
    .clk, .rst,
    .ic_req_valid, .ic_req_ready, .ic_req_addr, .ic_resp_valid, .ic_resp_data,
    .dc_req_valid, .dc_req_ready, .dc_req_addr, .dc_req_data, .dc_req_write,
    .dc_resp_valid, .dc_resp_data,
    .htif_tohost
  );

  memory151 u_mem (
    .clk, .rst,
    .ic_req_valid, .ic_req_ready, .ic_req_addr, .ic_resp_valid, .ic_resp_data,
    .dc_req_valid, .dc_req_ready, .dc_req_addr, .dc_req_data, .dc_req_write,
    .dc_resp_valid, .dc_resp_data,
    .mem_req_valid, .mem_req_ready, .mem_req_rw, .mem_req_addr,
    .mem_req_data_valid, .mem_req_data_ready, .mem_req_data_bits, .mem_req_data_mask,
    .mem_resp_valid, .mem_resp_data
  );
endmodule
