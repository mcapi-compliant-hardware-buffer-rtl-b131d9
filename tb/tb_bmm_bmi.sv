// Checks the BMI: the packets it sends for indirect, direct and
// address-based requests (header fields from the Connection Table, data
// read from memory), the credit subtraction at completion, that a request
// without enough credits waits while other CPUs' requests pass it, and the
// round-robin order between two CPUs. Memory, tables and the network are
// modelled here; the network stalls at random.
module tb_bmm_bmi;
  import bmm_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push; req_t req; logic [NC-1:0] full;
  logic [7:0] q_port [NC]; logic [15:0] q_credit [NC];
  logic [7:0] conn_port, conn_rcluster, conn_rport;
  logic dec_en; logic [7:0] dec_port; logic [13:0] dec_n;
  mem_req_t mem_req; mem_rsp_t mem_rsp;
  logic tx_valid, tx_ready; flit_t tx_flit; event_t ev;

  bmm_bmi #(.NUM_CPUS(NC), .QUEUE_DEPTH(4)) dut (.*);

  // table models
  int credits [256];
  always_comb for (int c = 0; c < NC; c++) q_credit[c] = 16'(credits[q_port[c]]);
  assign conn_rcluster = conn_port + 8'h10;
  assign conn_rport    = conn_port + 8'h20;
  always @(posedge clk) if (dec_en) credits[dec_port] -= int'(dec_n);

  // memory model: data = f(address), random grant
  function automatic logic [31:0] f(logic [31:0] a); return a ^ 32'h5A5A_0000; endfunction
  logic gnt_r, rv_q; logic [31:0] rd_q;
  always @(posedge clk) gnt_r <= $urandom_range(0, 2) != 0;
  assign mem_rsp.gnt = mem_req.req && gnt_r;
  always @(posedge clk) begin
    rv_q <= mem_req.req && gnt_r && !mem_req.we;
    rd_q <= f(mem_req.addr);
  end
  assign mem_rsp.rvalid = rv_q;
  assign mem_rsp.rdata  = rd_q;

  // network model
  logic [31:0] pkts [$][$];
  logic [31:0] cur_pkt [$];
  int ev_cpu [$];
  always @(posedge clk) tx_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      cur_pkt.push_back(tx_flit.data);
      if (tx_flit.last) begin pkts.push_back(cur_pkt); cur_pkt = {}; end
    end
    if (ev.valid) ev_cpu.push_back(int'(ev.cpu));
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic enq(req_type_e t, int port, int cpu, logic [31:0] w0, logic [31:0] w1, int size);
    @(posedge clk); #1;
    push = 1; req.typ = t; req.port = 8'(port); req.cpu = 4'(cpu); req.w0 = w0; req.w1 = w1; req.size = 16'(size);
    @(posedge clk); #1 push = 0;
  endtask

  task automatic wait_pkts(int n);
    int k = 0;
    while (pkts.size() < n && k < 2000) begin @(posedge clk); k++; end
  endtask

  task automatic chk_stream(string what, int idx, int port, logic [31:0] src, int words, logic [31:0] direct = 0, bit is_direct = 0);
    pkt_hdr_t h;
    if (idx >= pkts.size()) begin checks++; failures++; $display("FAIL %s missing", what); return; end
    h = pkt_hdr_t'(pkts[idx][0]);
    chk({what, " type"}, h.typ, PKT_STREAM);
    chk({what, " cluster"}, h.cluster, port + 8'h10);
    chk({what, " port"}, h.port, port + 8'h20);
    chk({what, " len"}, h.len, words);
    chk({what, " flits"}, pkts[idx].size(), words + 1);
    for (int i = 0; i < words && i + 1 < pkts[idx].size(); i++)
      chk({what, " data"}, pkts[idx][i+1], is_direct ? direct : f(src + 32'(4*i)));
  endtask

  initial begin
    pkt_hdr_t h;
    push = 0; req = '0;
    foreach (credits[i]) credits[i] = 0;
    credits[3] = 10; credits[4] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    enq(REQ_INDIRECT, 3, 0, 32'h100, 0, 16);
    wait_pkts(1);
    chk_stream("indirect", 0, 3, 32'h100, 4);
    repeat (3) @(posedge clk);
    chk("credits after indirect", credits[3], 6);

    enq(REQ_DIRECT, 4, 1, 32'hABCD, 0, 4);
    wait_pkts(2);
    chk_stream("direct", 1, 4, 0, 1, 32'hABCD, 1);
    repeat (3) @(posedge clk);
    chk("credits after direct", credits[4], 0);

    enq(REQ_ADDR, 0, 2, 32'h200, 32'h0500_0040, 8);
    wait_pkts(3);
    h = pkt_hdr_t'(pkts[2][0]);
    chk("addr type", h.typ, PKT_ADDR);
    chk("addr cluster", h.cluster, 8'h05);
    chk("addr len", h.len, 2);
    chk("addr flits", pkts[2].size(), 4);
    if (pkts[2].size() == 4) begin
      chk("addr dst", pkts[2][1], 32'h0500_0040);
      chk("addr d0", pkts[2][2], f(32'h200));
      chk("addr d1", pkts[2][3], f(32'h204));
    end

    // credit gating: CPU 3's request on port 6 (no credits) must wait
    enq(REQ_INDIRECT, 6, 3, 32'h600, 0, 8);
    enq(REQ_INDIRECT, 3, 0, 32'h300, 0, 8);
    wait_pkts(4);
    repeat (60) @(posedge clk);
    chk("only the credited request went", pkts.size(), 4);
    chk_stream("passing request", 3, 3, 32'h300, 2);
    credits[6] = 2;
    wait_pkts(5);
    chk_stream("released request", 4, 6, 32'h600, 2);
    repeat (3) @(posedge clk);

    // round robin: CPU 1 and CPU 2 each queue two requests
    credits[5] = 100;
    ev_cpu.delete();
    enq(REQ_INDIRECT, 5, 1, 32'h700, 0, 4);
    enq(REQ_INDIRECT, 5, 1, 32'h704, 0, 4);
    enq(REQ_INDIRECT, 5, 2, 32'h708, 0, 4);
    enq(REQ_INDIRECT, 5, 2, 32'h70C, 0, 4);
    wait_pkts(9);
    repeat (3) @(posedge clk);
    chk("rr events", ev_cpu.size(), 4);
    if (ev_cpu.size() == 4) begin
      chk("rr alternates 1", ev_cpu[1] != ev_cpu[0], 1);
      chk("rr alternates 2", ev_cpu[2] != ev_cpu[1], 1);
      chk("rr alternates 3", ev_cpu[3] != ev_cpu[2], 1);
    end
    chk("credits port 5", credits[5], 96);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
