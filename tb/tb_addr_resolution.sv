// tb_addr_resolution: node (1,0) of a 3x3 mesh with 2**12-byte slices.
// Sends requests from both caches to addresses homed at every node and
// checks that local ones reach the cache's own local-memory port, remote
// ones reach the packetizer with the right home node and cache index, that
// a remote request keeps the packetizer grant until accepted even when the
// other cache asks meanwhile, and that responses return to the right cache.
module tb_addr_resolution;
  import heracles_pkg::*;
  localparam int LAB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  node_id_t my_id = '{y: 4'd0, x: 4'd1};
  logic c_req_valid[2], c_req_ready[2], c_resp_valid[2];
  mem_req_t c_req[2];
  mem_resp_t c_resp[2];
  logic lm_req_valid[2], lm_req_ready[2], lm_resp_valid[2];
  mem_req_t lm_req[2];
  mem_resp_t lm_resp[2];
  logic n_req_valid, n_req_port, n_req_ready = 0, n_resp_valid = 0, n_resp_port = 0;
  mem_req_t n_req;
  mem_resp_t n_resp = '0;
  node_id_t n_req_dst;

  addr_resolution #(.LOCAL_ADDR_BITS(LAB), .MESH_X(3), .MESH_Y(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      c_req_valid[c] = 0; c_req[c] = '0; lm_req_ready[c] = 0; lm_resp_valid[c] = 0; lm_resp[c] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // steering of single requests
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < 9; n++) begin
        automatic logic [31:0] a = (32'(n) << LAB) + 32'h40;
        c_req_valid[c] = 1; c_req[c] = '{we: 1'(c), addr: a, wdata: 32'(n)};
        lm_req_ready[c] = 1; n_req_ready = 1;
        #1;
        if (n == 1) begin
          check(lm_req_valid[c] && !n_req_valid && lm_req[c].addr == a, $sformatf("cache %0d node %0d goes local", c, n));
          check(c_req_ready[c], "local ready passed back");
        end else begin
          check(n_req_valid && !lm_req_valid[c] && n_req.addr == a && n_req_port == 1'(c) &&
                n_req_dst == '{y: 4'(n / 3), x: 4'(n % 3)}, $sformatf("cache %0d node %0d goes to the network", c, n));
          check(c_req_ready[c], "network ready passed back");
        end
        @(negedge clk);
        c_req_valid[c] = 0; lm_req_ready[c] = 0; n_req_ready = 0;
      end
    // grant held while the packetizer has not accepted
    c_req_valid[1] = 1; c_req[1] = '{we: 1'b0, addr: 32'h0000_3000, wdata: '0};
    @(negedge clk);
    c_req_valid[0] = 1; c_req[0] = '{we: 1'b0, addr: 32'h0000_5000, wdata: '0};
    #1;
    check(n_req_valid && n_req_port == 1'b1 && !c_req_ready[0], "grant stays with the data cache");
    n_req_ready = 1; #1;
    check(c_req_ready[1] && !c_req_ready[0], "data cache request accepted");
    @(negedge clk);
    c_req_valid[1] = 0; #1;
    check(n_req_valid && n_req_port == 1'b0 && c_req_ready[0], "then the instruction cache");
    @(negedge clk);
    c_req_valid[0] = 0; n_req_ready = 0;
    // responses
    n_resp_valid = 1; n_resp_port = 1; n_resp = '{last: 1'b1, data: 32'hCAFE};
    #1;
    check(c_resp_valid[1] && !c_resp_valid[0] && c_resp[1].data == 32'hCAFE, "network response to data cache");
    n_resp_valid = 0; lm_resp_valid[0] = 1; lm_resp[0] = '{last: 1'b0, data: 32'hBEEF};
    #1;
    check(c_resp_valid[0] && !c_resp_valid[1] && c_resp[0].data == 32'hBEEF, "memory response to instruction cache");
    lm_resp_valid[0] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
