// Checks the BMR: an indirect read waits until the port's FIFO holds all
// its words, then copies them in FIFO order to the target buffer; a direct
// read returns one word to the register port with the CPU's ID; a request
// whose data is missing lets another CPU's request pass. Pops, done pulses
// and completion events are counted. Buffer Table and memory are modelled.
module tb_bmm_bmr;
  import bmm_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push; req_t req; logic [NC-1:0] full;
  logic [7:0] q_port [NC]; logic [13:0] q_count [NC];
  logic [7:0] r_port; logic [31:0] r_addr; logic pop;
  mem_req_t mem_req; mem_rsp_t mem_rsp;
  logic rd_valid; logic [3:0] rd_cpu; logic [31:0] rd_data;
  logic done; event_t ev;

  bmm_bmr #(.NUM_CPUS(NC), .QUEUE_DEPTH(4)) dut (.*);

  int cnt [256], rp [256];
  always_comb for (int c = 0; c < NC; c++) q_count[c] = 14'(cnt[q_port[c]]);
  assign r_addr = 32'h1000 * r_port + 32'(4 * rp[r_port]);
  int pops = 0, dones = 0, evs = 0;
  always @(posedge clk) begin
    if (pop) begin rp[r_port] = (rp[r_port] + 1) % 16; cnt[r_port]--; pops++; end
    if (done) dones++;
    if (ev.valid) evs++;
  end

  function automatic logic [31:0] f(logic [31:0] a); return a ^ 32'h0F0F_0000; endfunction
  logic [31:0] mem [logic [31:0]];
  logic gnt_r, rv_q; logic [31:0] rd_q;
  int mem_ops = 0;
  always @(posedge clk) gnt_r <= $urandom_range(0, 2) != 0;
  assign mem_rsp.gnt = mem_req.req && gnt_r;
  always @(posedge clk) begin
    rv_q <= mem_req.req && gnt_r && !mem_req.we;
    rd_q <= f(mem_req.addr);
    if (mem_req.req && gnt_r) mem_ops++;
    if (mem_req.req && gnt_r && mem_req.we) mem[mem_req.addr] = mem_req.wdata;
  end
  assign mem_rsp.rvalid = rv_q;
  assign mem_rsp.rdata = rd_q;

  logic [31:0] rd_got [$]; int rd_cpu_got [$];
  always @(posedge clk) if (rd_valid) begin rd_got.push_back(rd_data); rd_cpu_got.push_back(int'(rd_cpu)); end

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
  task automatic enq(req_type_e t, int port, int cpu, logic [31:0] w0, int size);
    @(posedge clk); #1;
    push = 1; req = '0; req.typ = t; req.port = 8'(port); req.cpu = 4'(cpu); req.w0 = w0; req.size = 16'(size);
    @(posedge clk); #1 push = 0;
  endtask

  initial begin
    push = 0; req = '0;
    foreach (cnt[i]) begin cnt[i] = 0; rp[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // indirect read waits for data
    enq(REQ_INDIRECT, 2, 0, 32'h5000, 12);
    cnt[2] = 2;
    repeat (40) @(posedge clk);
    chk("no memory traffic while data missing", mem_ops, 0);
    cnt[2] = 5;
    repeat (60) @(posedge clk);
    for (int i = 0; i < 3; i++) chk("copied word", mem[32'h5000 + 4*i], f(32'h2000 + 4*i));
    chk("pops", pops, 3);
    chk("done", dones, 1);
    chk("event", evs, 1);
    chk("fifo left", cnt[2], 2);

    // direct read
    cnt[3] = 1;
    enq(REQ_DIRECT, 3, 1, 0, 4);
    repeat (20) @(posedge clk);
    chk("direct words", rd_got.size(), 1);
    if (rd_got.size() == 1) begin
      chk("direct data", rd_got[0], f(32'h3000));
      chk("direct cpu", rd_cpu_got[0], 1);
    end

    // CPU 2 waits for port 4, CPU 3 passes on port 2
    enq(REQ_INDIRECT, 4, 2, 32'h6000, 8);
    enq(REQ_INDIRECT, 2, 3, 32'h7000, 8);
    repeat (60) @(posedge clk);
    chk("passing request 0", mem[32'h7000], f(32'h200C));
    chk("passing request 1", mem[32'h7004], f(32'h2010));
    chk("waiting request idle", mem.exists(32'h6000), 0);
    cnt[4] = 2;
    repeat (60) @(posedge clk);
    chk("released request 0", mem[32'h6000], f(32'h4000));
    chk("released request 1", mem[32'h6004], f(32'h4004));
    chk("total dones", dones, 4);
    chk("total pops", pops, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
