// tb_vc_buffer: random pushes and pops (never pushing into a full buffer,
// as credits guarantee) compared with a queue model: data order, empty flag
// and occupancy count; also fills the buffer to its full depth of 8.
module tb_vc_buffer;
  localparam int D = 8, W = 34;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty;
  logic [W-1:0] din = '0, dout;
  logic [3:0] count;
  vc_buffer #(.DEPTH(D), .W(W)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .count);

  int checks = 0, failures = 0, full_seen = 0;
  logic [W-1:0] q[$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || int'(count) != q.size() || (q.size() > 0 && dout != q[0])) begin
        failures++; $display("FAIL: t=%0d size=%0d count=%0d", t, q.size(), count);
      end
      if (q.size() == D) full_seen++;
      pop  = (q.size() > 0) && ($urandom_range(0, 2) == 0 || t % 500 > 450);
      push = (q.size() < D || pop) && t % 500 < 400 && $urandom_range(0, 1) == 1;
      din  = {$urandom, 2'($urandom)};
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: never full"); end
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
