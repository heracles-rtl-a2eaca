// addr_resolution: address translation / resolution logic of a node.
// Every request of the instruction cache (index 0) and the data cache
// (index 1) passes through here. The address bits above LOCAL_ADDR_BITS give
// the linear number n of the home node (uniform distributed memory: node n
// holds bytes n*2**LOCAL_ADDR_BITS .. (n+1)*2**LOCAL_ADDR_BITS-1), placed at
// x = n mod MESH_X, y = (n div MESH_X) mod MESH_Y. A request homed at this
// node goes to that cache's own port of the local memory; any other goes to
// the packetizer with the home node and the cache index, the two caches
// sharing that path round-robin. Responses, from the local memory or from
// the packetizer, are steered back to the cache that asked. Each cache has
// at most one request outstanding, so no reordering can occur. Once the
// packetizer has taken the first flit of a request, the grant stays with
// that cache until the packetizer accepts the whole request.
// Routing traffic by the high-order address bits to local memory or the
// network follows the document; the address map is this design's choice.
module addr_resolution
  import heracles_pkg::*;
#(
  parameter int unsigned LOCAL_ADDR_BITS = 18,
  parameter int unsigned MESH_X          = 3,
  parameter int unsigned MESH_Y          = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  node_id_t   my_id,
  // caches
  input  logic       c_req_valid [2],
  input  mem_req_t   c_req       [2],
  output logic       c_req_ready [2],
  output logic       c_resp_valid[2],
  output mem_resp_t  c_resp      [2],
  // local memory ports 0 and 1
  output logic       lm_req_valid [2],
  output mem_req_t   lm_req       [2],
  input  logic       lm_req_ready [2],
  input  logic       lm_resp_valid[2],
  input  mem_resp_t  lm_resp      [2],
  // packetizer
  output logic       n_req_valid,
  output mem_req_t   n_req,
  output logic       n_req_port,
  output node_id_t   n_req_dst,
  input  logic       n_req_ready,
  input  logic       n_resp_valid,
  input  mem_resp_t  n_resp,
  input  logic       n_resp_port
);
  function automatic node_id_t home_of(logic [31:0] addr);
    int unsigned n;
    node_id_t h;
    n   = int'(addr >> LOCAL_ADDR_BITS);
    h.x = 4'(n % MESH_X);
    h.y = 4'((n / MESH_X) % MESH_Y);
    return h;
  endfunction

  node_id_t   home [2];
  logic [1:0] is_local, net_req, net_gnt;
  logic [1:0] net_idx, arb_gnt, arb_idx;
  logic       lock_q, lock_idx_q;   // a packet is part-way into the packetizer

  always_comb
    for (int c = 0; c < 2; c++) begin
      home[c]     = home_of(c_req[c].addr);
      is_local[c] = home[c] == my_id;
      net_req[c]  = c_req_valid[c] && !is_local[c];
    end

  rr_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req(net_req), .advance(n_req_ready && !lock_q), .grant(arb_gnt), .grant_idx(arb_idx)
  );

  // keep the grant on one cache from the first flit of its packet to the last
  always_comb begin
    net_gnt = arb_gnt;
    net_idx = arb_idx;
    if (lock_q) begin
      net_gnt             = '0;
      net_gnt[lock_idx_q] = 1'b1;
      net_idx             = {1'b0, lock_idx_q};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q     <= 1'b0;
      lock_idx_q <= 1'b0;
    end else if (n_req_valid) begin
      lock_q     <= !n_req_ready;
      lock_idx_q <= net_idx[0];
    end
  end

  always_comb begin
    n_req_valid = net_gnt != '0;
    n_req       = c_req[net_idx[0]];
    n_req_port  = net_idx[0];
    n_req_dst   = home[net_idx[0]];
    for (int c = 0; c < 2; c++) begin
      lm_req_valid[c] = c_req_valid[c] && is_local[c];
      lm_req[c]       = c_req[c];
      c_req_ready[c]  = is_local[c] ? lm_req_ready[c] : (net_gnt[c] && n_req_ready);
      c_resp_valid[c] = lm_resp_valid[c] || (n_resp_valid && int'(n_resp_port) == c);
      c_resp[c]       = lm_resp_valid[c] ? lm_resp[c] : n_resp;
    end
  end
endmodule
