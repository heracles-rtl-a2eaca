// l1_cache: direct-mapped level-1 cache, used as instruction and as data
// cache. 2**INDEX_BITS lines of 2**OFFSET_BITS 32-bit words; every line has
// a status (valid) bit and a tag. Access is pipelined over two cycles like
// the core's fetch and memory stages:
//   stage 1: s1_* presents an access; tag, status and data arrays are read
//            synchronously (block-RAM style);
//   stage 2: the registered access is compared with the tag; on a hit rdata
//            holds the word and miss is low.
// The stage-2 register loads stage 1 in every cycle hold is low. While hold
// is high the arrays re-read the stage-2 address, so a line filled while the
// pipeline waits becomes a hit two cycles after the fill ends.
// A read miss fetches the whole line from memory (one request, words in
// order) and then hits. Stores are write-through without write-allocate:
// the word is sent to memory, miss stays high until the acknowledgement
// arrives, and a line that holds the word is updated at that moment.
// Direct mapping, INDEX_BITS/OFFSET_BITS and the status/tag/data arrays
// follow the document; the write policy and the fill sequence are this
// design's choices, and there is no coherence protocol.
module l1_cache
  import heracles_pkg::*;
#(
  parameter int unsigned INDEX_BITS  = 6,
  parameter int unsigned OFFSET_BITS = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  // stage 1
  input  logic        s1_valid,
  input  logic [31:0] s1_addr,
  input  logic        s1_we,
  input  logic [31:0] s1_wdata,
  // stage 2
  output logic [31:0] rdata,
  output logic        miss,
  // memory side
  output logic        req_valid,
  output mem_req_t    req,
  input  logic        req_ready,
  input  logic        resp_valid,
  input  mem_resp_t   resp
);
  localparam int unsigned LINES = 1 << INDEX_BITS;
  localparam int unsigned LW    = 1 << OFFSET_BITS;
  localparam int unsigned TAGW  = 32 - 2 - OFFSET_BITS - INDEX_BITS;

  logic [TAGW-1:0] tag_mem  [LINES];
  logic [31:0]     data_mem [LINES * LW];
  logic [LINES-1:0] valid_q;

  function automatic logic [INDEX_BITS-1:0] idx_of(logic [31:0] a);
    return a[OFFSET_BITS+2 +: INDEX_BITS];
  endfunction
  function automatic logic [OFFSET_BITS-1:0] off_of(logic [31:0] a);
    return a[2 +: OFFSET_BITS];
  endfunction
  function automatic logic [TAGW-1:0] tag_of(logic [31:0] a);
    return a[31 -: TAGW];
  endfunction

  // ---------------- stage 2 register ----------------
  logic        s2_valid, s2_we;
  logic [31:0] s2_addr, s2_wdata;
  logic        store_done_q;

  // ---------------- array read ----------------
  logic [31:0]      rd_addr;
  logic [TAGW-1:0]  tag_rd_q;
  logic             vld_rd_q;
  logic [31:0]      data_rd_q;
  logic             hit;

  assign rd_addr = hold ? s2_addr : s1_addr;
  assign hit     = vld_rd_q && tag_rd_q == tag_of(s2_addr);
  assign rdata   = hit ? data_rd_q : '0;

  // ---------------- controller ----------------
  typedef enum logic [1:0] {C_IDLE, C_REQ, C_FILL, C_SETTLE} cstate_t;
  cstate_t                state_q;
  logic [OFFSET_BITS-1:0] fcnt_q;
  logic                   fill_we, store_upd;

  assign miss = s2_valid && (s2_we ? !store_done_q : !hit);

  always_comb begin
    req_valid = 1'b0;
    req       = '{we: s2_we, addr: s2_addr, wdata: s2_wdata};
    if (!s2_we) req.addr[OFFSET_BITS+1:0] = '0;
    if (state_q == C_REQ) req_valid = 1'b1;
    fill_we   = (state_q == C_FILL) && resp_valid && !s2_we;
    store_upd = (state_q == C_FILL) && resp_valid && s2_we && hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid     <= 1'b0;
      s2_we        <= 1'b0;
      s2_addr      <= '0;
      s2_wdata     <= '0;
      store_done_q <= 1'b0;
      state_q      <= C_IDLE;
      fcnt_q       <= '0;
      valid_q      <= '0;
    end else begin
      if (!hold) begin
        s2_valid     <= s1_valid;
        s2_we        <= s1_we;
        s2_addr      <= s1_addr;
        s2_wdata     <= s1_wdata;
        store_done_q <= 1'b0;
      end
      case (state_q)
        C_IDLE:   if (miss) state_q <= C_REQ;
        C_REQ:    if (req_ready) begin
                    state_q <= C_FILL;
                    fcnt_q  <= '0;
                  end
        C_FILL:   if (resp_valid) begin
                    fcnt_q <= fcnt_q + 1'b1;
                    if (resp.last) begin
                      state_q <= C_SETTLE;
                      if (s2_we) store_done_q <= 1'b1;
                      else       valid_q[idx_of(s2_addr)] <= 1'b1;
                    end
                  end
        C_SETTLE: state_q <= C_IDLE;   // arrays re-read the filled line
        default:  state_q <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    tag_rd_q  <= tag_mem[idx_of(rd_addr)];
    vld_rd_q  <= valid_q[idx_of(rd_addr)];
    data_rd_q <= data_mem[{idx_of(rd_addr), off_of(rd_addr)}];
    if (fill_we) begin
      data_mem[{idx_of(s2_addr), fcnt_q}] <= resp.data;
      if (resp.last) tag_mem[idx_of(s2_addr)] <= tag_of(s2_addr);
    end
    if (store_upd) data_mem[{idx_of(s2_addr), off_of(s2_addr)}] <= s2_wdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> state_q == C_FILL);
endmodule
