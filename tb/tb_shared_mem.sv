// Checks the dual-port Shared Memory: random reads and writes on both
// ports against an array model, with the one-cycle read latency.
module tb_shared_mem;
  import bmm_pkg::*;
  localparam int W = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t a_req; mem_rsp_t a_rsp;
  logic b_req, b_we; logic [31:0] b_addr, b_wdata, b_rdata;
  logic [31:0] model [W];

  shared_mem #(.WORDS(W)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a_rd, b_rd; logic [31:0] a_exp, b_exp;
    a_req = '0; b_req = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      b_req = 1; b_we = 1; b_addr = 32'(4*i); b_wdata = $urandom; model[i] = b_wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a_req.req = $urandom_range(0, 1); a_req.we = $urandom_range(0, 1);
      a_req.addr = 32'(4*$urandom_range(0, W-1)); a_req.wdata = $urandom;
      b_req = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      b_addr = 32'(4*$urandom_range(0, W-2)) | 32'h4; b_wdata = $urandom;
      if (b_addr[9:2] == a_req.addr[9:2]) b_addr = b_addr ^ 32'h4;
      #1;
      checks++;
      if (a_rsp.gnt !== a_req.req) begin failures++; $display("FAIL gnt"); end
      a_rd = a_req.req && !a_req.we; a_exp = model[a_req.addr[9:2]];
      b_rd = b_req && !b_we;         b_exp = model[b_addr[9:2]];
      @(posedge clk);
      if (a_req.req && a_req.we) model[a_req.addr[9:2]] = a_req.wdata;
      if (b_req && b_we)         model[b_addr[9:2]] = b_wdata;
      @(negedge clk);
      checks++;
      if (a_rsp.rvalid !== a_rd) begin failures++; $display("FAIL rvalid"); end
      if (a_rd) begin checks++; if (a_rsp.rdata !== a_exp) begin failures++; $display("FAIL a data"); end end
      if (b_rd) begin checks++; if (b_rdata !== b_exp) begin failures++; $display("FAIL b data"); end end
      a_req.req = 0; b_req = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
