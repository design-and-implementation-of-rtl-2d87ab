// cache: direct-mapped, write-through, no-write-allocate cache with an FSM controller.
// Used twice, as instruction cache and as data cache.
//
// Geometry: 64 lines of 64 bytes (16 words). The CPU gives a 30-bit word address:
// word offset [3:0], index [9:4], tag [29:10]. Line data lives in four 256 x 32 SRAMs:
// word w of a line is in SRAM w[1:0] at row 4*index + w[3:2], so one 128-bit memory beat
// fills one row of all four SRAMs at once. Tags sit in a 64 x 32 SRAM; the 64 valid bits are
// flip-flops cleared by reset.
//
// States:
//   INIT            idle, cpu_req_ready high; an accepted request is latched and the tag and
//                   data SRAMs are read at its index.
//   READ_CACHE      read lookup. Hit: cpu_resp_valid with the word (2 cycles per hit).
//                   Miss: request the line from memory (mem_req_valid, rw = 0), wait for
//                   mem_req_ready, then fill.
//   MEM_READ_1..3,  one state per 128-bit beat of the line; each mem_resp_valid beat is written
//   MEM_READ        to the four SRAMs, the first one also writes the tag and sets the valid bit.
//                   The requested word is answered together with the last beat, so a miss
//                   costs 4 cycles more than a hit when memory answers at once.
//   CACHE_MEM_WRITE write-through: the word and its 16-byte mask go to memory
//                   (mem_req_valid + mem_req_data_valid, rw = 1); on a hit the same bytes are
//                   written into the data SRAM as the memory accepts. Writes get no response.
// Memory side: mem_req_* address 128-bit beats (28 bits); a read returns the four beats of a
// line, in order, as mem_resp_valid pulses.
// Geometry, policies, state names and the 2-cycle hit / 4-cycle miss penalty follow the design
// description. This implementation's own choices: the tag is compared in READ_CACHE, the cycle
// after the SRAM read (the tag SRAM is synchronous); the CPU byte mask is passed to the data
// SRAM so that sub-word stores keep the other bytes of the word.
module cache
  import riscv_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // CPU side
  input  logic         cpu_req_valid,
  output logic         cpu_req_ready,
  input  logic [29:0]  cpu_req_addr,
  input  logic [31:0]  cpu_req_data,
  input  logic [3:0]   cpu_req_write,
  output logic         cpu_resp_valid,
  output logic [31:0]  cpu_resp_data,
  // memory side
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
  typedef enum logic [2:0] {
    INIT, READ_CACHE, MEM_READ_1, MEM_READ_2, MEM_READ_3, MEM_READ, CACHE_MEM_WRITE
  } state_e;

  state_e state, next_state;

  logic [29:0]       addr_q;
  logic [31:0]       data_q;
  logic [3:0]        write_q;
  logic [31:0]       word_q;
  logic [CACHE_LINES-1:0] valid;

  logic [TAG_W-1:0]  tag_q;
  logic [5:0]        index_q, index_in;
  logic [3:0]        offset_q;
  logic [1:0]        sram_block;     // which data SRAM holds the word
  logic [1:0]        beat;           // beat being filled
  logic              filling, hit, mem_fire;

  logic [7:0]        sram_addr;
  logic [3:0]        sram_we;
  logic [3:0]        sram_wmask;
  logic [31:0]       sram_din  [4];
  logic [31:0]       sram_dout [4];
  logic              meta_we;
  logic [31:0]       meta_dout;

  assign tag_q      = addr_q[29:10];
  assign index_q    = addr_q[9:4];
  assign offset_q   = addr_q[3:0];
  assign sram_block = offset_q[1:0];
  assign index_in   = (state == INIT) ? cpu_req_addr[9:4] : index_q;

  always_comb begin
    unique case (state)
      MEM_READ_1: beat = 2'd0;
      MEM_READ_2: beat = 2'd1;
      MEM_READ_3: beat = 2'd2;
      default:    beat = 2'd3;
    endcase
  end
  assign filling = state inside {MEM_READ_1, MEM_READ_2, MEM_READ_3, MEM_READ};
  assign hit     = valid[index_q] && (meta_dout[TAG_W-1:0] == tag_q);

  assign cpu_req_ready = state == INIT;

  // Memory request
  always_comb begin
    mem_req_valid      = 1'b0;
    mem_req_rw         = 1'b0;
    mem_req_addr       = {tag_q, index_q, 2'b00};
    mem_req_data_valid = 1'b0;
    mem_req_data_bits  = {4{data_q}};
    mem_req_data_mask  = {12'b0, write_q} << (4 * offset_q[1:0]);
    if (state == READ_CACHE && !hit) begin
      mem_req_valid = 1'b1;
    end else if (state == CACHE_MEM_WRITE) begin
      mem_req_valid      = 1'b1;
      mem_req_rw         = 1'b1;
      mem_req_addr       = addr_q[29:2];
      mem_req_data_valid = 1'b1;
    end
  end
  assign mem_fire = mem_req_valid && mem_req_ready && (!mem_req_rw || mem_req_data_ready);

  // SRAM control
  always_comb begin
    if (state == INIT)  sram_addr = {cpu_req_addr[9:4], cpu_req_addr[3:2]};
    else if (filling)   sram_addr = {index_q, beat};
    else                sram_addr = {index_q, offset_q[3:2]};
    for (int k = 0; k < 4; k++) begin
      if (filling) begin
        sram_we[k]  = mem_resp_valid;
        sram_din[k] = mem_resp_data[32*k +: 32];
      end else begin
        sram_we[k]  = (state == CACHE_MEM_WRITE) && hit && mem_fire && (sram_block == 2'(k));
        sram_din[k] = data_q;
      end
    end
    sram_wmask = filling ? 4'b1111 : write_q;
    meta_we    = (state == MEM_READ_1) && mem_resp_valid;
  end

  for (genvar k = 0; k < 4; k++) begin : g_sram
    sram_sp #(.DEPTH(256), .WIDTH(32)) u_sram (
      .clk, .we(sram_we[k]), .wmask(sram_wmask), .addr(sram_addr),
      .din(sram_din[k]), .dout(sram_dout[k])
    );
  end

  sram_sp #(.DEPTH(64), .WIDTH(32)) u_metadata (
    .clk, .we(meta_we), .wmask(4'b1111), .addr(index_in),
    .din({{(32-TAG_W){1'b0}}, tag_q}), .dout(meta_dout)
  );

  // CPU response
  always_comb begin
    cpu_resp_valid = 1'b0;
    cpu_resp_data  = sram_dout[sram_block];
    if (state == READ_CACHE && hit) begin
      cpu_resp_valid = 1'b1;
    end else if (state == MEM_READ && mem_resp_valid) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_data  = (offset_q[3:2] == 2'd3) ? mem_resp_data[32*sram_block +: 32] : word_q;
    end
  end

  // Next state
  always_comb begin
    next_state = state;
    unique case (state)
      INIT:
        if (cpu_req_valid) next_state = (cpu_req_write != 4'b0) ? CACHE_MEM_WRITE : READ_CACHE;
      READ_CACHE:
        if (hit)           next_state = INIT;
        else if (mem_fire) next_state = MEM_READ_1;
      MEM_READ_1: if (mem_resp_valid) next_state = MEM_READ_2;
      MEM_READ_2: if (mem_resp_valid) next_state = MEM_READ_3;
      MEM_READ_3: if (mem_resp_valid) next_state = MEM_READ;
      MEM_READ:   if (mem_resp_valid) next_state = INIT;
      CACHE_MEM_WRITE: if (mem_fire) next_state = INIT;
      default: next_state = INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= INIT;
      valid   <= '0;
      addr_q  <= '0;
      data_q  <= '0;
      write_q <= '0;
      word_q  <= '0;
    end else begin
      state <= next_state;
      if (state == INIT && cpu_req_valid) begin
        addr_q  <= cpu_req_addr;
        data_q  <= cpu_req_data;
        write_q <= cpu_req_write;
      end
      if (meta_we) valid[index_q] <= 1'b1;
      if (filling && mem_resp_valid && beat == offset_q[3:2])
        word_q <= mem_resp_data[32*sram_block +: 32];
    end
  end

  // A read response is only ever given in a lookup or fill state.
  assert property (@(posedge clk) disable iff (rst)
                   cpu_resp_valid |-> (state == READ_CACHE || state == MEM_READ));
endmodule
