// heracles_mesh: the multicore, a MESH_X x MESH_Y two-dimensional mesh of
// identical nodes (heracles_node). Node (x, y) has linear number
// n = y*MESH_X + x, holds bytes [n*2**LOCAL_ADDR_BITS, (n+1)*2**LOCAL_ADDR_BITS)
// of the shared address space in its local memory, and is linked to its
// north (y-1), east (x+1), south (y+1) and west (x-1) neighbours by one link
// in each direction. Links at the mesh edge are tied off.
// Every node's core is started through start[n] with start_pc[n] (a core can
// run code held in any node's memory). All routers share the routing mode
// (use_table: 0 dimension-order XY, 1 routing tables); the routing table of
// node rt_node is written with rt_we/rt_addr (destination node number)/
// rt_data (output port).
// The mesh topology, per-node starting PC and routing-table inputs follow
// the document (3x3 mesh with all identical routers); the port shapes are
// this design's.
module heracles_mesh
  import heracles_pkg::*;
#(
  parameter int unsigned MESH_X          = 3,
  parameter int unsigned MESH_Y          = 3,
  parameter int unsigned VC_PER_PORT     = 2,
  parameter int unsigned VC_DEPTH        = 8,
  parameter int unsigned INDEX_BITS      = 6,
  parameter int unsigned OFFSET_BITS     = 3,
  parameter int unsigned LOCAL_ADDR_BITS = 18,
  localparam int unsigned NODES          = MESH_X * MESH_Y
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start    [NODES],
  input  logic [31:0] start_pc [NODES],
  output logic        halted   [NODES],
  output logic [31:0] perf     [NODES][5],
  input  logic        use_table,
  input  logic        rt_we,
  input  logic [7:0]  rt_node,
  input  logic [7:0]  rt_addr,
  input  logic [2:0]  rt_data
);
  localparam int unsigned VCB = (VC_PER_PORT > 1) ? $clog2(VC_PER_PORT) : 1;

  // link signals leaving each node, per direction
  logic                   o_valid [NODES][4];
  flit_t                  o_flit  [NODES][4];
  logic [VCB-1:0]         o_vc    [NODES][4];
  logic [VC_PER_PORT-1:0] i_credit[NODES][4];   // credits a node returns on its input links

  for (genvar y = 0; y < int'(MESH_Y); y++) begin : g_y
    for (genvar x = 0; x < int'(MESH_X); x++) begin : g_x
      localparam int N = y * MESH_X + x;
      // neighbour numbers, -1 at an edge
      localparam int NB[4] = '{(y > 0) ? N - int'(MESH_X) : -1,
                               (x < int'(MESH_X) - 1) ? N + 1 : -1,
                               (y < int'(MESH_Y) - 1) ? N + int'(MESH_X) : -1,
                               (x > 0) ? N - 1 : -1};
      logic                   lin_valid  [4];
      flit_t                  lin_flit   [4];
      logic [VCB-1:0]         lin_vc     [4];
      logic [VC_PER_PORT-1:0] lout_credit[4];

      // input on side d comes from the neighbour's output on the opposite side (d+2)%4
      for (genvar d = 0; d < 4; d++) begin : g_d
        if (NB[d] >= 0) begin : g_link
          assign lin_valid[d]   = o_valid [NB[d]][(d + 2) % 4];
          assign lin_flit[d]    = o_flit  [NB[d]][(d + 2) % 4];
          assign lin_vc[d]      = o_vc    [NB[d]][(d + 2) % 4];
          assign lout_credit[d] = i_credit[NB[d]][(d + 2) % 4];
        end else begin : g_edge
          assign lin_valid[d]   = 1'b0;
          assign lin_flit[d]    = '0;
          assign lin_vc[d]      = '0;
          assign lout_credit[d] = '0;
        end
      end

      heracles_node #(
        .X(x), .Y(y), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
        .VC_PER_PORT(VC_PER_PORT), .VC_DEPTH(VC_DEPTH),
        .INDEX_BITS(INDEX_BITS), .OFFSET_BITS(OFFSET_BITS), .LOCAL_ADDR_BITS(LOCAL_ADDR_BITS)
      ) u_node (
        .clk, .rst_n,
        .start(start[N]), .start_pc(start_pc[N]), .halted(halted[N]), .perf(perf[N]),
        .use_table, .tbl_we(rt_we && int'(rt_node) == N), .tbl_addr(rt_addr), .tbl_data(rt_data),
        .lin_valid, .lin_flit, .lin_vc, .lin_credit(i_credit[N]),
        .lout_valid(o_valid[N]), .lout_flit(o_flit[N]), .lout_vc(o_vc[N]), .lout_credit
      );
    end
  end
endmodule
