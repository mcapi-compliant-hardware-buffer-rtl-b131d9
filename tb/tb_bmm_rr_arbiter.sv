// Checks the round-robin arbiter against a reference pointer model: random
// request vectors, random advance; the grant must be the first requester at
// or after the pointer, and the pointer must move past each accepted grant.
module tb_bmm_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req;
  logic advance, gnt_valid;
  logic [$clog2(N)-1:0] gnt_idx;
  int ptr = 0;

  bmm_rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .gnt_valid, .gnt_idx);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx; bit exp_v; int grants [N];
    req = '0; advance = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_v = 0; exp_idx = 0;
      for (int k = 0; k < N; k++) begin
        automatic int i = (ptr + k) % N;
        if (!exp_v && req[i]) begin exp_v = 1; exp_idx = i; end
      end
      checks++;
      if (gnt_valid !== exp_v || (exp_v && gnt_idx != exp_idx)) begin
        failures++;
        $display("FAIL t=%0d req=%b ptr=%0d got %b/%0d exp %b/%0d", t, req, ptr, gnt_valid, gnt_idx, exp_v, exp_idx);
      end
      if (advance && exp_v) begin ptr = (exp_idx + 1) % N; grants[exp_idx]++; end
    end
    // fairness: all requesting -> each gets one turn in N grants
    @(negedge clk); req = '1; advance = 1;
    for (int k = 0; k < N; k++) begin
      #1; checks++;
      if (gnt_idx != (ptr + k) % N) begin failures++; $display("FAIL fairness step %0d", k); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
