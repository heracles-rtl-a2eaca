// tb_l1_cache: drives the cache the way the core does (a new stage-1 access
// in every cycle the cache does not report a miss; hold = miss) with random
// loads and stores over a small address set that maps several tags onto the
// same lines. A memory model answers line reads and word writes after a
// random delay. Every load's stage-2 data is compared with the model; the
// test also checks that repeated accesses hit (a miss costs a line fill,
// a hit none), that conflicting tags evict each other, and that stores are
// written through to memory.
module tb_l1_cache;
  import heracles_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        s1_valid = 0, s1_we = 0, miss, req_valid, req_ready, resp_valid;
  logic [31:0] s1_addr = 0, s1_wdata = 0, rdata;
  mem_req_t    req;
  mem_resp_t   resp;

  l1_cache #(.INDEX_BITS(6), .OFFSET_BITS(3)) dut (.clk, .rst_n, .hold(miss), .s1_valid, .s1_addr, .s1_we, .s1_wdata,
    .rdata, .miss, .req_valid, .req, .req_ready, .resp_valid, .resp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- memory model ----------------
  logic [31:0] mem[int];
  function automatic logic [31:0] rd(logic [31:0] a);
    return mem.exists(int'(a >> 2)) ? mem[int'(a >> 2)] : (a ^ 32'h5A5A_0000);
  endfunction
  int fills = 0, writes = 0;
  logic busy = 0;
  assign req_ready = !busy;
  initial begin
    resp_valid = 0; resp = '0;
    forever begin
      @(negedge clk);
      if (req_valid && !busy) begin
        // handshake completes at the next rising edge
        automatic mem_req_t r = req;
        @(posedge clk);
        busy <= 1;
        repeat ($urandom_range(1, 5)) @(posedge clk);
        if (r.we) begin
          mem[int'(r.addr >> 2)] = r.wdata; writes++;
          resp_valid <= 1; resp <= '{last: 1'b1, data: '0};
          @(posedge clk); resp_valid <= 0;
        end else begin
          fills++;
          for (int k = 0; k < 8; k++) begin
            resp_valid <= 1; resp <= '{last: (k == 7), data: rd(r.addr + 32'(k * 4))};
            @(posedge clk);
          end
          resp_valid <= 0;
        end
        busy <= 0;
      end
    end
  end

  // ---------------- access driver ----------------
  logic        s2_v = 0, s2_we = 0;
  logic [31:0] s2_a = 0;
  int misses = 0, accesses = 0;

  function automatic logic [31:0] pick();
    // 4 tags x 4 lines x 8 words; lines 0..3 of the index space
    return {20'($urandom_range(0, 3)), 6'($urandom_range(0, 3)), 3'($urandom_range(0, 7)), 2'b00};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (miss) begin
        if (!s2_v) check(0, "miss without an access");
        continue;
      end
      if (s2_v && !s2_we) begin
        check(rdata == rd(s2_a), $sformatf("load %h got %h expected %h", s2_a, rdata, rd(s2_a)));
      end
      if (s2_v && s2_we) check(mem.exists(int'(s2_a >> 2)), "store written through");
      // next access
      s1_valid = $urandom_range(0, 4) != 0;
      s1_we    = $urandom_range(0, 3) == 0;
      s1_addr  = pick();
      s1_wdata = $urandom;
      s2_v = s1_valid; s2_we = s1_we; s2_a = s1_addr;
      if (s1_valid) accesses++;
    end
    // hit after fill: the same word twice in a row, the second must not miss
    @(negedge clk); while (miss) @(negedge clk);
    s1_valid = 1; s1_we = 0; s1_addr = 32'h0000_4000;
    @(negedge clk); while (miss) @(negedge clk);
    s1_addr = 32'h0000_4004;
    @(negedge clk);
    check(!miss, "second access to a filled line hits");
    check(rdata == rd(32'h4004), "hit data");
    s1_valid = 0;
    check(fills > 0 && fills < accesses, $sformatf("%0d fills for %0d accesses", fills, accesses));
    check(writes > 0, "stores reached memory");
    $display("accesses=%0d fills=%0d writes=%0d", accesses, fills, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
