// mem_arbiter: shares the single main-memory port between the instruction and data caches.
// Fixed priority: when both caches request in the same cycle the data cache wins. A granted
// read keeps the port until the four response beats of the line have come back, and the
// beats are routed to the cache that asked; a write is over once accepted. The request
// channel is passed through combinationally, so arbitration adds no cycle.
// The block's existence and place come from the design's module hierarchy; the policy is
// this implementation's own.
module mem_arbiter (
  input  logic         clk,
  input  logic         rst,
  // instruction cache
  input  logic         ic_req_valid,
  output logic         ic_req_ready,
  input  logic         ic_req_rw,
  input  logic [27:0]  ic_req_addr,
  input  logic         ic_req_data_valid,
  output logic         ic_req_data_ready,
  input  logic [127:0] ic_req_data_bits,
  input  logic [15:0]  ic_req_data_mask,
  output logic         ic_resp_valid,
  // data cache
  input  logic         dc_req_valid,
  output logic         dc_req_ready,
  input  logic         dc_req_rw,
  input  logic [27:0]  dc_req_addr,
  input  logic         dc_req_data_valid,
  output logic         dc_req_data_ready,
  input  logic [127:0] dc_req_data_bits,
  input  logic [15:0]  dc_req_data_mask,
  output logic         dc_resp_valid,
  // main memory
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output logic         mem_req_rw,
  output logic [27:0]  mem_req_addr,
  output logic         mem_req_data_valid,
  input  logic         mem_req_data_ready,
  output logic [127:0] mem_req_data_bits,
  output logic [15:0]  mem_req_data_mask,
  input  logic         mem_resp_valid
);
  logic       busy, owner_dc, sel_dc;
  logic [1:0] beats;

  assign sel_dc = dc_req_valid;

  always_comb begin
    mem_req_valid      = !busy && (dc_req_valid || ic_req_valid);
    mem_req_rw         = sel_dc ? dc_req_rw         : ic_req_rw;
    mem_req_addr       = sel_dc ? dc_req_addr       : ic_req_addr;
    mem_req_data_valid = !busy && (sel_dc ? dc_req_data_valid : ic_req_data_valid);
    mem_req_data_bits  = sel_dc ? dc_req_data_bits  : ic_req_data_bits;
    mem_req_data_mask  = sel_dc ? dc_req_data_mask  : ic_req_data_mask;
    dc_req_ready       = !busy && mem_req_ready;
    dc_req_data_ready  = !busy && mem_req_data_ready;
    ic_req_ready       = !busy && !dc_req_valid && mem_req_ready;
    ic_req_data_ready  = !busy && !dc_req_valid && mem_req_data_ready;
    dc_resp_valid      = busy && owner_dc && mem_resp_valid;
    ic_resp_valid      = busy && !owner_dc && mem_resp_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      owner_dc <= 1'b0;
      beats    <= '0;
    end else if (!busy) begin
      if (mem_req_valid && mem_req_ready && !mem_req_rw) begin
        busy     <= 1'b1;
        owner_dc <= sel_dc;
        beats    <= '0;
      end
    end else if (mem_resp_valid) begin
      beats <= beats + 2'd1;
      if (beats == 2'd3) busy <= 1'b0;
    end
  end

  // Responses only arrive for a read that is in flight.
  assert property (@(posedge clk) disable iff (rst) mem_resp_valid |-> busy);
endmodule
