// heracles_node: one node of the multicore.
// Processing core (mips_core) with its instruction and data caches
// (l1_cache), the address resolution logic, the node's local memory, the
// packetizer, the network interface and a five-port virtual-channel router.
// Cache requests homed at this node go straight to the local memory; the
// others become request packets. Request packets arriving from other nodes
// reach the local memory through its third port and are answered with
// response packets. Router ports 0..3 (N, E, S, W) are brought out as mesh
// links; port 4 is the network interface.
// The composition (caches, address
// translation logic, local main memory, packetizer, router and network
// interface) follows the document; the signal-level wiring is this design's.
module heracles_node
  import heracles_pkg::*;
#(
  parameter int unsigned X               = 0,
  parameter int unsigned Y               = 0,
  parameter int unsigned MESH_X          = 3,
  parameter int unsigned MESH_Y          = 3,
  parameter int unsigned VC_PER_PORT     = 2,
  parameter int unsigned VC_DEPTH        = 8,
  parameter int unsigned INDEX_BITS      = 6,
  parameter int unsigned OFFSET_BITS     = 3,
  parameter int unsigned LOCAL_ADDR_BITS = 18,
  localparam int unsigned VCB            = (VC_PER_PORT > 1) ? $clog2(VC_PER_PORT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // core control
  input  logic                    start,
  input  logic [31:0]             start_pc,
  output logic                    halted,
  output logic [31:0]             perf [5],   // retired, freeze, load-use, bypass, flush
  // routing configuration
  input  logic                    use_table,
  input  logic                    tbl_we,
  input  logic [7:0]              tbl_addr,
  input  logic [2:0]              tbl_data,
  // mesh links, index N=0 E=1 S=2 W=3
  input  logic                    lin_valid [4],
  input  flit_t                   lin_flit  [4],
  input  logic [VCB-1:0]          lin_vc    [4],
  output logic [VC_PER_PORT-1:0]  lin_credit[4],
  output logic                    lout_valid [4],
  output flit_t                   lout_flit  [4],
  output logic [VCB-1:0]          lout_vc    [4],
  input  logic [VC_PER_PORT-1:0]  lout_credit[4]
);
  node_id_t my_id;
  assign my_id = '{y: 4'(Y), x: 4'(X)};

  // ---------------- core and caches ----------------
  logic        ic_hold, ic_valid, ic_miss, dc_hold, dc_valid, dc_we, dc_miss;
  logic [31:0] ic_addr, ic_rdata, dc_addr, dc_wdata, dc_rdata;

  mips_core u_core (
    .clk, .rst_n, .start, .start_pc, .halted,
    .ic_hold, .ic_valid, .ic_addr, .ic_rdata, .ic_miss,
    .dc_hold, .dc_valid, .dc_addr, .dc_we, .dc_wdata, .dc_rdata, .dc_miss,
    .perf_retired(perf[0]), .perf_freeze(perf[1]), .perf_loaduse(perf[2]),
    .perf_bypass(perf[3]), .perf_flush(perf[4])
  );

  logic      c_req_valid [2], c_req_ready [2], c_resp_valid[2];
  mem_req_t  c_req       [2];
  mem_resp_t c_resp      [2];

  l1_cache #(.INDEX_BITS(INDEX_BITS), .OFFSET_BITS(OFFSET_BITS)) u_icache (
    .clk, .rst_n, .hold(ic_hold),
    .s1_valid(ic_valid), .s1_addr(ic_addr), .s1_we(1'b0), .s1_wdata('0),
    .rdata(ic_rdata), .miss(ic_miss),
    .req_valid(c_req_valid[0]), .req(c_req[0]), .req_ready(c_req_ready[0]),
    .resp_valid(c_resp_valid[0]), .resp(c_resp[0])
  );

  l1_cache #(.INDEX_BITS(INDEX_BITS), .OFFSET_BITS(OFFSET_BITS)) u_dcache (
    .clk, .rst_n, .hold(dc_hold),
    .s1_valid(dc_valid), .s1_addr(dc_addr), .s1_we(dc_we), .s1_wdata(dc_wdata),
    .rdata(dc_rdata), .miss(dc_miss),
    .req_valid(c_req_valid[1]), .req(c_req[1]), .req_ready(c_req_ready[1]),
    .resp_valid(c_resp_valid[1]), .resp(c_resp[1])
  );

  // ---------------- address resolution and local memory ----------------
  logic      lm_req_valid [3], lm_req_ready [3], lm_resp_valid[3];
  mem_req_t  lm_req       [3];
  mem_resp_t lm_resp      [3];
  logic      n_req_valid, n_req_port, n_req_ready, n_resp_valid, n_resp_port;
  mem_req_t  n_req;
  mem_resp_t n_resp;
  node_id_t  n_req_dst;

  addr_resolution #(.LOCAL_ADDR_BITS(LOCAL_ADDR_BITS), .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_ar (
    .clk, .rst_n, .my_id,
    .c_req_valid, .c_req, .c_req_ready, .c_resp_valid, .c_resp,
    .lm_req_valid(lm_req_valid[0:1]), .lm_req(lm_req[0:1]), .lm_req_ready(lm_req_ready[0:1]),
    .lm_resp_valid(lm_resp_valid[0:1]), .lm_resp(lm_resp[0:1]),
    .n_req_valid, .n_req, .n_req_port, .n_req_dst, .n_req_ready,
    .n_resp_valid, .n_resp, .n_resp_port
  );

  local_memory #(.LOCAL_ADDR_BITS(LOCAL_ADDR_BITS), .OFFSET_BITS(OFFSET_BITS), .NPORTS(3)) u_lm (
    .clk, .rst_n,
    .req_valid(lm_req_valid), .req(lm_req), .req_ready(lm_req_ready),
    .resp_valid(lm_resp_valid), .resp(lm_resp)
  );

  // ---------------- packetizer and network interface ----------------
  logic  tx_valid[2], tx_ready[2], rx_valid[2], rx_ready[2];
  flit_t tx_flit [2], rx_flit [2];

  packetizer #(.OFFSET_BITS(OFFSET_BITS)) u_pkt (
    .clk, .rst_n, .my_id,
    .creq_valid(n_req_valid), .creq(n_req), .creq_port(n_req_port), .creq_dst(n_req_dst),
    .creq_ready(n_req_ready),
    .cresp_valid(n_resp_valid), .cresp(n_resp), .cresp_port(n_resp_port),
    .mreq_valid(lm_req_valid[2]), .mreq(lm_req[2]), .mreq_ready(lm_req_ready[2]),
    .mresp_valid(lm_resp_valid[2]), .mresp(lm_resp[2]),
    .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready
  );

  logic                   r_in_valid [5], r_out_valid [5];
  flit_t                  r_in_flit  [5], r_out_flit  [5];
  logic [VCB-1:0]         r_in_vc    [5], r_out_vc    [5];
  logic [VC_PER_PORT-1:0] r_in_credit[5], r_out_credit[5];

  network_interface #(.VC_PER_PORT(VC_PER_PORT), .VC_DEPTH(VC_DEPTH)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready,
    .inj_valid(r_in_valid[4]), .inj_flit(r_in_flit[4]), .inj_vc(r_in_vc[4]), .inj_credit(r_in_credit[4]),
    .ej_valid(r_out_valid[4]), .ej_flit(r_out_flit[4]), .ej_vc(r_out_vc[4]), .ej_credit(r_out_credit[4])
  );

  // ---------------- router ----------------
  always_comb
    for (int p = 0; p < 4; p++) begin
      r_in_valid[p]   = lin_valid[p];
      r_in_flit[p]    = lin_flit[p];
      r_in_vc[p]      = lin_vc[p];
      lin_credit[p]   = r_in_credit[p];
      lout_valid[p]   = r_out_valid[p];
      lout_flit[p]    = r_out_flit[p];
      lout_vc[p]      = r_out_vc[p];
      r_out_credit[p] = lout_credit[p];
    end

  vc_router #(.NPORTS(5), .VC_PER_PORT(VC_PER_PORT), .VC_DEPTH(VC_DEPTH),
              .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_router (
    .clk, .rst_n, .my_id, .use_table, .tbl_we, .tbl_addr, .tbl_data,
    .in_valid(r_in_valid), .in_flit(r_in_flit), .in_vc(r_in_vc), .in_credit(r_in_credit),
    .out_valid(r_out_valid), .out_flit(r_out_flit), .out_vc(r_out_vc), .out_credit(r_out_credit)
  );
endmodule
