// tb_mips_core: runs the test program on the core with its two caches and a
// local memory, then checks the ten result words, the halt, and the event
// counters: 63 retired instructions, exactly 2 load-use bubbles (one
// load followed by a dependent instruction) and 12 flushes (9 taken BNE,
// JAL, JR, BEQ). A watchdog ends the run after 20000 cycles.
module tb_mips_core;
  import heracles_pkg::*;
  import test_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, halted;
  logic [31:0] start_pc = 0;
  logic        ic_hold, ic_valid, ic_miss, dc_hold, dc_valid, dc_we, dc_miss;
  logic [31:0] ic_addr, ic_rdata, dc_addr, dc_wdata, dc_rdata;
  logic [31:0] p_ret, p_frz, p_lu, p_byp, p_fl;

  mips_core dut (
    .clk, .rst_n, .start, .start_pc, .halted,
    .ic_hold, .ic_valid, .ic_addr, .ic_rdata, .ic_miss,
    .dc_hold, .dc_valid, .dc_addr, .dc_we, .dc_wdata, .dc_rdata, .dc_miss,
    .perf_retired(p_ret), .perf_freeze(p_frz), .perf_loaduse(p_lu), .perf_bypass(p_byp), .perf_flush(p_fl)
  );

  logic      rq_v[2], rq_r[2], rs_v[2];
  mem_req_t  rq[2];
  mem_resp_t rs[2];

  l1_cache u_ic (.clk, .rst_n, .hold(ic_hold), .s1_valid(ic_valid), .s1_addr(ic_addr), .s1_we(1'b0),
                 .s1_wdata('0), .rdata(ic_rdata), .miss(ic_miss),
                 .req_valid(rq_v[0]), .req(rq[0]), .req_ready(rq_r[0]), .resp_valid(rs_v[0]), .resp(rs[0]));
  l1_cache u_dc (.clk, .rst_n, .hold(dc_hold), .s1_valid(dc_valid), .s1_addr(dc_addr), .s1_we(dc_we),
                 .s1_wdata(dc_wdata), .rdata(dc_rdata), .miss(dc_miss),
                 .req_valid(rq_v[1]), .req(rq[1]), .req_ready(rq_r[1]), .resp_valid(rs_v[1]), .resp(rs[1]));
  local_memory #(.NPORTS(2)) u_lm (.clk, .rst_n, .req_valid(rq_v), .req(rq), .req_ready(rq_r),
                                   .resp_valid(rs_v), .resp(rs));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] CODE = 32'h0000_0100, DATA = 32'h0000_2000;
  logic [31:0] prog[PROG_WORDS];

  initial begin
    int cyc;
    build(CODE, DATA, prog);
    for (int i = 0; i < int'(PROG_WORDS); i++) u_lm.mem[(CODE >> 2) + i] = prog[i];
    for (int i = 0; i < int'(RES_WORDS); i++) u_lm.mem[(DATA >> 2) + i] = 32'hDEAD_0000 + i;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start = 1; start_pc = CODE;
    @(posedge clk);
    start = 0;
    cyc = 0;
    while (!halted && cyc < 10000) begin @(posedge clk); cyc++; end
    check(halted, "core halts");
    repeat (5) @(posedge clk);
    for (int i = 0; i < int'(RES_WORDS); i++)
      check(u_lm.mem[(DATA >> 2) + i] == expected(i),
            $sformatf("result %0d = %h, expected %h", i, u_lm.mem[(DATA >> 2) + i], expected(i)));
    check(p_ret == 63, $sformatf("retired %0d, expected 63", p_ret));
    check(p_lu == 2,   $sformatf("load-use bubbles %0d, expected 2", p_lu));
    check(p_fl == 12,  $sformatf("flushes %0d, expected 12", p_fl));
    check(p_byp > 0,   "bypassing used");
    check(p_frz > 0,   "cache misses froze the pipeline");
    $display("cycles=%0d retired=%0d freeze=%0d loaduse=%0d bypass=%0d flush=%0d", cyc, p_ret, p_frz, p_lu, p_byp, p_fl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
