// tb_rr_arbiter: random request patterns against a reference model of a
// strict round-robin arbiter (search starts after the last requester whose
// grant was used). Also checks that a grant not used (advance low) is
// repeated in the next cycle with the same requests.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  logic         advance = 0;
  logic [2:0]   grant_idx;
  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .grant, .grant_idx);

  int checks = 0, failures = 0;
  int last = N - 1;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int exp;
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp = -1;
      for (int i = 1; i <= N; i++) if (exp < 0 && req[(last + i) % N]) exp = (last + i) % N;
      checks++;
      if (exp < 0 ? (grant != '0) : (grant != N'(1 << exp) || int'(grant_idx) != exp)) begin
        failures++; $display("FAIL: req=%b last=%0d grant=%b", req, last, grant);
      end
      if (advance && exp >= 0) last = exp;
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
