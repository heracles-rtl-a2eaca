// tb_heracles_node: two nodes of a 2x1 mesh, (0,0) and (1,0), linked
// east-west by the testbench. Core 0 runs the test program from its own
// memory with its data in node 1 (remote loads and stores); core 1 fetches
// the same kind of program from node 0's memory (remote instruction fetch)
// and keeps its data locally. Both result sets are checked.
module tb_heracles_node;
  import heracles_pkg::*;
  import test_prog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start[2], halted[2];
  logic [31:0] start_pc[2];
  logic [31:0] perf[2][5];
  logic lin_valid[2][4], lout_valid[2][4];
  flit_t lin_flit[2][4], lout_flit[2][4];
  logic [0:0] lin_vc[2][4], lout_vc[2][4];
  logic [1:0] lin_credit[2][4], lout_credit[2][4];

  for (genvar n = 0; n < 2; n++) begin : g_n
    heracles_node #(.X(n), .Y(0), .MESH_X(2), .MESH_Y(1)) u (
      .clk, .rst_n, .start(start[n]), .start_pc(start_pc[n]), .halted(halted[n]), .perf(perf[n]),
      .use_table(1'b0), .tbl_we(1'b0), .tbl_addr('0), .tbl_data('0),
      .lin_valid(lin_valid[n]), .lin_flit(lin_flit[n]), .lin_vc(lin_vc[n]), .lin_credit(lin_credit[n]),
      .lout_valid(lout_valid[n]), .lout_flit(lout_flit[n]), .lout_vc(lout_vc[n]), .lout_credit(lout_credit[n]));
  end

  // node 0 east (1) <-> node 1 west (3); other links idle
  always_comb begin
    for (int n = 0; n < 2; n++)
      for (int d = 0; d < 4; d++) begin
        lin_valid[n][d] = 0; lin_flit[n][d] = '0; lin_vc[n][d] = '0; lout_credit[n][d] = '0;
      end
    lin_valid[1][3] = lout_valid[0][1]; lin_flit[1][3] = lout_flit[0][1]; lin_vc[1][3] = lout_vc[0][1];
    lout_credit[0][1] = lin_credit[1][3];
    lin_valid[0][1] = lout_valid[1][3]; lin_flit[0][1] = lout_flit[1][3]; lin_vc[0][1] = lout_vc[1][3];
    lout_credit[1][3] = lin_credit[0][1];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] N1 = 32'h0004_0000;
  localparam logic [31:0] CODE0 = 32'h100, CODE1 = 32'h800, DATA0 = N1 + 32'h2000, DATA1 = N1 + 32'h3000;

  initial begin
    logic [31:0] p[PROG_WORDS];
    int cyc;
    start = '{0, 0}; start_pc = '{0, 0};
    build(CODE0, DATA0, p);
    for (int i = 0; i < int'(PROG_WORDS); i++) g_n[0].u.u_lm.mem[(CODE0 >> 2) + i] = p[i];
    build(CODE1, DATA1, p);
    for (int i = 0; i < int'(PROG_WORDS); i++) g_n[0].u.u_lm.mem[(CODE1 >> 2) + i] = p[i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = '{1, 1}; start_pc = '{CODE0, CODE1};
    @(negedge clk);
    start = '{0, 0};
    cyc = 0;
    while (!(halted[0] && halted[1]) && cyc < 50000) begin @(negedge clk); cyc++; end
    repeat (20) @(negedge clk);
    check(halted[0] && halted[1], "both cores halted");
    for (int i = 0; i < int'(RES_WORDS); i++) begin
      check(g_n[1].u.u_lm.mem[((DATA0 - N1) >> 2) + i] == expected(i), $sformatf("core 0 word %0d", i));
      check(g_n[1].u.u_lm.mem[((DATA1 - N1) >> 2) + i] == expected(i), $sformatf("core 1 word %0d", i));
    end
    $display("finished in %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
