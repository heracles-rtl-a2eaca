// tb_route_compute: for every router position of a 3x3 mesh and every
// destination, checks the dimension-order port (X first, then Y; local when
// arrived); then writes a routing table holding Y-first routes and checks
// that table mode returns them.
module tb_route_compute;
  import heracles_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  node_id_t my_id;
  logic use_table = 0, tbl_we = 0;
  logic [7:0] tbl_addr = 0;
  logic [2:0] tbl_data = 0;
  node_id_t dst[9];
  logic [2:0] out_port[9];
  route_compute #(.MESH_X(3), .MESH_Y(3), .NQ(9)) dut (.clk, .rst_n, .my_id, .use_table, .tbl_we, .tbl_addr, .tbl_data, .dst, .out_port);

  int checks = 0, failures = 0;
  function automatic logic [2:0] xy(int mx, int my, int dx, int dy);
    if (dx > mx) return PORT_E; if (dx < mx) return PORT_W;
    if (dy > my) return PORT_S; if (dy < my) return PORT_N;
    return PORT_L;
  endfunction
  function automatic logic [2:0] yx(int mx, int my, int dx, int dy);
    if (dy > my) return PORT_S; if (dy < my) return PORT_N;
    if (dx > mx) return PORT_E; if (dx < mx) return PORT_W;
    return PORT_L;
  endfunction
  initial begin
    for (int d = 0; d < 9; d++) dst[d] = '{y: 4'(d / 3), x: 4'(d % 3)};
    my_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tbl = 0; tbl < 2; tbl++)
      for (int r = 0; r < 9; r++) begin
        my_id = '{y: 4'(r / 3), x: 4'(r % 3)};
        if (tbl == 1) begin
          use_table = 0;
          for (int d = 0; d < 9; d++) begin
            tbl_we = 1; tbl_addr = 8'(d); tbl_data = yx(r % 3, r / 3, d % 3, d / 3);
            @(negedge clk);
          end
          tbl_we = 0; use_table = 1;
        end
        #1;
        for (int d = 0; d < 9; d++) begin
          automatic logic [2:0] e = tbl ? yx(r % 3, r / 3, d % 3, d / 3) : xy(r % 3, r / 3, d % 3, d / 3);
          checks++;
          if (out_port[d] !== e) begin failures++; $display("FAIL: tbl=%0d r=%0d d=%0d got %0d exp %0d", tbl, r, d, out_port[d], e); end
        end
        @(negedge clk);
      end
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
