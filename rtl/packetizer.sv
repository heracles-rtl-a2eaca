// packetizer: converts memory traffic to packets and back.
// Packets (head flit payload: message type, requesting cache, source and
// destination node, see heracles_pkg::head_t):
//   read request   head, address                       (request class)
//   write request  head, address, data word             (request class)
//   read response  head, 2**OFFSET_BITS data words      (response class)
//   write ack      single head/tail flit                (response class)
// Three independent engines:
//   * outgoing requests: a cache request that address resolution sends
//     off-node is emitted flit by flit; creq_ready is given with the last
//     flit, so the request is consumed once it is fully in the network;
//   * incoming responses: rebuilt into cache responses (cresp_*), one data
//     word per data flit, never stalled;
//   * incoming remote requests: collected, presented to the local memory
//     as one more requester, the memory's answer collected in a line buffer
//     and sent back to the source node as a response packet.
// The packetizer's role (packets from cache and local-memory traffic, and
// remote traffic presented to local memory as another cache) follows the
// document; the packet formats and the line buffer are this design's own.
module packetizer
  import heracles_pkg::*;
#(
  parameter int unsigned OFFSET_BITS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  node_id_t   my_id,
  // outgoing requests from address resolution
  input  logic       creq_valid,
  input  mem_req_t   creq,
  input  logic       creq_port,
  input  node_id_t   creq_dst,
  output logic       creq_ready,
  // responses for the local caches
  output logic       cresp_valid,
  output mem_resp_t  cresp,
  output logic       cresp_port,
  // local memory port serving remote requests
  output logic       mreq_valid,
  output mem_req_t   mreq,
  input  logic       mreq_ready,
  input  logic       mresp_valid,
  input  mem_resp_t  mresp,
  // network interface streams: [0] requests, [1] responses
  output logic       tx_valid[2],
  output flit_t      tx_flit [2],
  input  logic       tx_ready[2],
  input  logic       rx_valid[2],
  input  flit_t      rx_flit [2],
  output logic       rx_ready[2]
);
  localparam int unsigned LW = 1 << OFFSET_BITS;

  // ---------------- outgoing requests (tx class 0) ----------------
  logic [1:0] oreq_k_q;
  head_t      oreq_head;
  logic       oreq_last;

  always_comb begin
    oreq_head      = '0;
    oreq_head.msg  = creq.we ? MSG_WR_REQ : MSG_RD_REQ;
    oreq_head.port = creq_port;
    oreq_head.src  = my_id;
    oreq_head.dst  = creq_dst;
    oreq_last      = (oreq_k_q == 2'd2) || (oreq_k_q == 2'd1 && !creq.we);
    tx_valid[0]    = creq_valid;
    case (oreq_k_q)
      2'd0:    tx_flit[0] = '{kind: FK_HEAD, data: oreq_head};
      2'd1:    tx_flit[0] = '{kind: (creq.we ? FK_BODY : FK_TAIL), data: creq.addr};
      default: tx_flit[0] = '{kind: FK_TAIL, data: creq.wdata};
    endcase
    creq_ready = creq_valid && tx_ready[0] && oreq_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) oreq_k_q <= '0;
    else if (creq_valid && tx_ready[0]) oreq_k_q <= oreq_last ? 2'd0 : oreq_k_q + 2'd1;
  end

  // ---------------- incoming responses (rx class 1) ----------------
  logic  iresp_port_q;
  head_t iresp_head;

  always_comb begin
    iresp_head  = as_head(rx_flit[1].data);
    rx_ready[1] = 1'b1;
    if (is_head(rx_flit[1])) begin
      cresp_valid = rx_valid[1] && iresp_head.msg == MSG_WR_ACK;
      cresp_port  = iresp_head.port;
      cresp       = '{last: 1'b1, data: '0};
    end else begin
      cresp_valid = rx_valid[1];
      cresp_port  = iresp_port_q;
      cresp       = '{last: is_tail(rx_flit[1]), data: rx_flit[1].data};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) iresp_port_q <= 1'b0;
    else if (rx_valid[1] && is_head(rx_flit[1])) iresp_port_q <= iresp_head.port;
  end

  // ---------------- remote requests (rx class 0 -> memory -> tx class 1) ----------------
  typedef enum logic [2:0] {R_HEAD, R_ADDR, R_DATA, R_MEM, R_WAIT, R_SEND} rstate_t;
  rstate_t             rs_q;
  head_t               rhead_q;
  logic [31:0]         raddr_q, rwdata_q;
  logic [31:0]         line_q [LW];
  logic [OFFSET_BITS:0] rcnt_q;     // words collected / flits sent

  assign rx_ready[0] = (rs_q == R_HEAD) || (rs_q == R_ADDR) || (rs_q == R_DATA);
  assign mreq_valid  = (rs_q == R_MEM);
  assign mreq        = '{we: (rhead_q.msg == MSG_WR_REQ), addr: raddr_q, wdata: rwdata_q};

  head_t resp_head;
  always_comb begin
    resp_head      = '0;
    resp_head.msg  = (rhead_q.msg == MSG_WR_REQ) ? MSG_WR_ACK : MSG_RD_RESP;
    resp_head.port = rhead_q.port;
    resp_head.src  = my_id;
    resp_head.dst  = rhead_q.src;
    tx_valid[1]    = (rs_q == R_SEND);
    if (rcnt_q == '0)
      tx_flit[1] = '{kind: (rhead_q.msg == MSG_WR_REQ) ? FK_HT : FK_HEAD, data: resp_head};
    else
      tx_flit[1] = '{kind: (int'(rcnt_q) == int'(LW)) ? FK_TAIL : FK_BODY,
                     data: line_q[OFFSET_BITS'(rcnt_q - 1'b1)]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_q     <= R_HEAD;
      rhead_q  <= '0;
      raddr_q  <= '0;
      rwdata_q <= '0;
      rcnt_q   <= '0;
    end else begin
      case (rs_q)
        R_HEAD: if (rx_valid[0]) begin
          rhead_q <= as_head(rx_flit[0].data);
          rs_q    <= R_ADDR;
        end
        R_ADDR: if (rx_valid[0]) begin
          raddr_q <= rx_flit[0].data;
          rs_q    <= (rhead_q.msg == MSG_WR_REQ) ? R_DATA : R_MEM;
        end
        R_DATA: if (rx_valid[0]) begin
          rwdata_q <= rx_flit[0].data;
          rs_q     <= R_MEM;
        end
        R_MEM: if (mreq_ready) begin
          rcnt_q <= '0;
          rs_q   <= R_WAIT;
        end
        R_WAIT: if (mresp_valid) begin
          rcnt_q <= rcnt_q + 1'b1;
          if (mresp.last) begin
            rcnt_q <= '0;
            rs_q   <= R_SEND;
          end
        end
        R_SEND: if (tx_ready[1]) begin
          rcnt_q <= rcnt_q + 1'b1;
          if (rhead_q.msg == MSG_WR_REQ || int'(rcnt_q) == int'(LW)) begin
            rcnt_q <= '0;
            rs_q   <= R_HEAD;
          end
        end
        default: rs_q <= R_HEAD;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (rs_q == R_WAIT && mresp_valid) line_q[OFFSET_BITS'(rcnt_q)] <= mresp.data;

  assert property (@(posedge clk) disable iff (!rst_n)
                   (rs_q == R_HEAD && rx_valid[0]) |-> is_head(rx_flit[0]));
endmodule
