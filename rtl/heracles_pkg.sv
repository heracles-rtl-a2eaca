// heracles_pkg: constants and types shared by the blocks of the multicore.
// Holds the default sizes of the main configuration (two virtual channels of
// eight flits per router port, direct-mapped caches of 64 lines of 8 words,
// 256 KiB of local memory per node), the flit and packet-header formats, the
// router port numbering and the memory request/response bundle used between
// caches, address resolution, local memory and packetizer.
// The sizes follow the document; the flit and header layouts, port numbers
// and message types are this design's own choices.
package heracles_pkg;

  // ---- sizes of the main configuration ----
  localparam int unsigned VC_PER_PORT_D     = 2;   // virtual channels per port
  localparam int unsigned VC_DEPTH_D        = 8;   // flits per virtual channel
  localparam int unsigned INDEX_BITS_D      = 6;   // cache lines = 2**INDEX_BITS
  localparam int unsigned OFFSET_BITS_D     = 3;   // words per line = 2**OFFSET_BITS
  localparam int unsigned LOCAL_ADDR_BITS_D = 18;  // local memory bytes = 2**LOCAL_ADDR_BITS

  // ---- router ports of a 2D-mesh router ----
  localparam int unsigned NPORTS_MESH = 5;
  localparam logic [2:0] PORT_N = 3'd0;
  localparam logic [2:0] PORT_E = 3'd1;
  localparam logic [2:0] PORT_S = 3'd2;
  localparam logic [2:0] PORT_W = 3'd3;
  localparam logic [2:0] PORT_L = 3'd4;

  // ---- flits ----
  typedef enum logic [1:0] {
    FK_HEAD = 2'd0,   // first flit of a packet of two or more flits
    FK_BODY = 2'd1,
    FK_TAIL = 2'd2,   // last flit
    FK_HT   = 2'd3    // single-flit packet
  } flit_kind_t;

  typedef struct packed {
    flit_kind_t  kind;
    logic [31:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  function automatic logic is_head(flit_t f);
    return f.kind == FK_HEAD || f.kind == FK_HT;
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.kind == FK_TAIL || f.kind == FK_HT;
  endfunction

  // ---- packets ----
  // Message classes travel on disjoint halves of the virtual channels.
  typedef enum logic [1:0] {
    MSG_RD_REQ  = 2'd0,   // head, address                -> read a line
    MSG_WR_REQ  = 2'd1,   // head, address, data          -> write a word
    MSG_RD_RESP = 2'd2,   // head, LINE_WORDS data flits
    MSG_WR_ACK  = 2'd3    // head only
  } msg_t;

  // Node identifier: {y, x}, four bits each.
  typedef struct packed {
    logic [3:0] y;
    logic [3:0] x;
  } node_id_t;

  // Payload of a head flit.
  typedef struct packed {
    logic [12:0] rsvd;
    msg_t        msg;
    logic        port;   // requesting cache at the source: 0 instruction, 1 data
    node_id_t    src;
    node_id_t    dst;
  } head_t;

  function automatic head_t as_head(logic [31:0] d);
    head_t h;
    h = d;
    return h;
  endfunction

  function automatic logic msg_is_resp(msg_t m);
    return m == MSG_RD_RESP || m == MSG_WR_ACK;
  endfunction

  // ---- memory requests between cache, address resolution, memory ----
  // A read returns 2**OFFSET_BITS words of the line holding addr, in order,
  // the last one flagged; a write of one word returns one flagged response.
  typedef struct packed {
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic        last;
    logic [31:0] data;
  } mem_resp_t;

endpackage
