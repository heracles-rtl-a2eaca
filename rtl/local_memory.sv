// local_memory: a node's slice of the distributed main memory.
// 2**LOCAL_ADDR_BITS bytes held as 32-bit words in a synchronous-read array
// (block-RAM style). NPORTS requesters (instruction cache, data cache and
// the packetizer, which presents remote requests as one more cache) are
// served one transaction at a time in round-robin order. A request is
// accepted in the cycle req_ready is high. A write stores one word and
// answers with one response (last=1) in the next cycle. A read returns the
// 2**OFFSET_BITS words of the addressed line, one per cycle starting two
// cycles after acceptance, the final one with last=1. Responses go only to
// the port that made the request and cannot be refused.
// Addresses above the slice are ignored (wrap); the address resolution
// logic sends only addresses homed here.
// The parameterised size and the round-robin service of several caches
// follow the document; the timing and the one-at-a-time service are this
// design's choices.
module local_memory
  import heracles_pkg::*;
#(
  parameter int unsigned LOCAL_ADDR_BITS = 18,
  parameter int unsigned OFFSET_BITS     = 3,
  parameter int unsigned NPORTS          = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid [NPORTS],
  input  mem_req_t    req       [NPORTS],
  output logic        req_ready [NPORTS],
  output logic        resp_valid[NPORTS],
  output mem_resp_t   resp      [NPORTS]
);
  localparam int unsigned WA    = LOCAL_ADDR_BITS - 2;       // word address bits
  localparam int unsigned WORDS = 1 << WA;
  localparam int unsigned LW    = 1 << OFFSET_BITS;
  localparam int unsigned PW    = $clog2(NPORTS + 1);

  logic [31:0] mem [WORDS];

  typedef enum logic {M_IDLE, M_READ} mstate_t;
  mstate_t          state_q;
  logic [WA-1:0]    base_q;
  logic [OFFSET_BITS-1:0] cnt_q;
  logic [PW-1:0]    port_q;

  logic [NPORTS-1:0] arb_req, arb_gnt;
  logic [PW-1:0]     arb_idx;

  logic              rv_q, rlast_q;
  logic [31:0]       rdata_q;
  logic [PW-1:0]     rport_q;

  always_comb
    for (int p = 0; p < int'(NPORTS); p++) arb_req[p] = req_valid[p] && state_q == M_IDLE;

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req(arb_req), .advance(1'b1), .grant(arb_gnt), .grant_idx(arb_idx)
  );

  mem_req_t g_req;
  assign g_req = req[arb_idx < PW'(NPORTS) ? arb_idx : '0];

  always_comb
    for (int p = 0; p < int'(NPORTS); p++) begin
      req_ready[p]  = arb_gnt[p];
      resp_valid[p] = rv_q && int'(rport_q) == p;
      resp[p]       = '{last: rlast_q, data: rdata_q};
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      base_q  <= '0;
      cnt_q   <= '0;
      port_q  <= '0;
      rv_q    <= 1'b0;
      rlast_q <= 1'b0;
      rport_q <= '0;
    end else begin
      rv_q <= 1'b0;
      case (state_q)
        M_IDLE:
          if (arb_gnt != '0) begin
            port_q <= arb_idx;
            if (g_req.we) begin
              rv_q    <= 1'b1;
              rlast_q <= 1'b1;
              rport_q <= arb_idx;
            end else begin
              base_q  <= {g_req.addr[WA+1:OFFSET_BITS+2], {OFFSET_BITS{1'b0}}};
              cnt_q   <= '0;
              state_q <= M_READ;
            end
          end
        M_READ: begin
          rv_q    <= 1'b1;
          rlast_q <= (cnt_q == OFFSET_BITS'(LW - 1));
          rport_q <= port_q;
          cnt_q   <= cnt_q + 1'b1;
          if (cnt_q == OFFSET_BITS'(LW - 1)) state_q <= M_IDLE;
        end
        default: state_q <= M_IDLE;
      endcase
    end
  end

  // memory array: one write port, one synchronous read port
  always_ff @(posedge clk) begin
    if (state_q == M_IDLE && arb_gnt != '0 && g_req.we) mem[g_req.addr[WA+1:2]] <= g_req.wdata;
    rdata_q <= mem[base_q | WA'(cnt_q)];
  end
endmodule
