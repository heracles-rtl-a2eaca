// tb_local_memory: three requesters (as in a node: two caches and the
// packetizer) write and read back lines in their own address regions,
// concurrently, against a model. Checks data, the 'last' flag, the timing
// (a write is acknowledged in the cycle after acceptance; a line read's
// words arrive in consecutive cycles starting two cycles after acceptance),
// and round-robin service when all three ask in the same cycle.
module tb_local_memory;
  import heracles_pkg::*;
  localparam int NP = 3, LW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid[NP], req_ready[NP], resp_valid[NP];
  mem_req_t req[NP];
  mem_resp_t resp[NP];
  local_memory #(.NPORTS(NP)) dut (.clk, .rst_n, .req_valid, .req, .req_ready, .resp_valid, .resp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] model[int];
  int order[$];

  task automatic access(int p, logic we, logic [31:0] addr, logic [31:0] wd);
    int t;
    req_valid[p] = 1; req[p] = '{we: we, addr: addr, wdata: wd};
    #1;
    while (!req_ready[p]) begin @(negedge clk); #1; end
    order.push_back(p);
    @(negedge clk);
    req_valid[p] = 0;
    if (we) begin
      model[addr >> 2] = wd;
      check(resp_valid[p] && resp[p].last, $sformatf("write ack on port %0d one cycle after acceptance", p));
      @(negedge clk);
    end else begin
      check(!resp_valid[p], "no read data one cycle after acceptance");
      @(negedge clk);
      for (int k = 0; k < LW; k++) begin
        automatic int wa = int'(((addr >> 2) & ~32'(LW - 1)) + 32'(k));
        check(resp_valid[p], $sformatf("read word %0d on port %0d in its cycle", k, p));
        check(resp[p].data == model[wa], $sformatf("port %0d word %0d data %h expected %h", p, k, resp[p].data, model[wa]));
        check(resp[p].last == (k == LW - 1), "last flag");
        @(negedge clk);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin req_valid[p] = 0; req[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // all three at once: expect service order 0, 1, 2
    fork
      access(0, 1, 32'h100, 32'h1111);
      access(1, 1, 32'h200, 32'h2222);
      access(2, 1, 32'h300, 32'h3333);
    join
    check(order.size() == 3 && order[0] == 0 && order[1] == 1 && order[2] == 2, "round-robin order 0,1,2");
    // concurrent random traffic
    begin
      for (int p0 = 0; p0 < NP; p0++) begin
        automatic int p = p0;
        fork
          for (int k = 0; k < 30; k++) begin
            automatic logic [31:0] a = 32'h1000 * (p + 1) + 32'($urandom_range(0, 63)) * 4;
            if (k < 20) access(p, 1, a, $urandom);
            else begin
              // write all of a line first so the model knows every word
              for (int j = 0; j < LW; j++) access(p, 1, (a & ~32'h1F) + 32'(j) * 4, $urandom);
              access(p, 0, a, '0);
            end
          end
        join_none
      end
      wait fork;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
