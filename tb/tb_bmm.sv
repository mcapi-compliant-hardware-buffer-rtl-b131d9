// Checks one BMM whose packet output is looped back to its input, so it is
// its own sender and receiver (local port 1 connected to local port 9,
// whose FIFO holds 8 words). Through the register port only: 20 words in
// five indirect requests pass the 8-word FIFO while a reader drains it,
// direct words pass, an address-based copy lands, and the credits end where
// they started. Memory is a model here.
module tb_bmm;
  import bmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic bus_sel, bus_we, bus_ready; logic [31:0] bus_addr, bus_wdata, bus_rdata;
  mem_req_t mem_req; mem_rsp_t mem_rsp;
  logic tx_valid, tx_ready, rx_valid, rx_ready; flit_t tx_flit, rx_flit;
  event_t ev_send, ev_recv;

  bmm #(.NUM_PORTS(32), .NUM_CPUS(4), .QUEUE_DEPTH(2)) dut (.*);

  assign rx_valid = tx_valid;
  assign rx_flit  = tx_flit;
  assign tx_ready = rx_ready;

  logic [31:0] mem [65536];
  logic rv_q; logic [31:0] rd_q;
  assign mem_rsp.gnt = mem_req.req;
  always @(posedge clk) begin
    rv_q <= mem_req.req && !mem_req.we;
    rd_q <= mem[mem_req.addr[17:2]];
    if (mem_req.req && mem_req.we) mem[mem_req.addr[17:2]] = mem_req.wdata;
  end
  assign mem_rsp.rvalid = rv_q;
  assign mem_rsp.rdata = rd_q;

  int nsend = 0, nrecv = 0;
  always @(posedge clk) begin
    if (ev_send.valid) nsend++;
    if (ev_recv.valid) nrecv++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] A(bit rw, req_type_e t, bit e, int port, int cpu);
    return {9'd0, 3'b011, rw, t, e, 8'(port), 4'(cpu), 4'd0};
  endfunction
  function automatic logic [31:0] C(cfg_sel_e s, int port);
    return {9'd0, 3'b011, 1'b1, REQ_CONFIG, 1'b1, 8'(port), s, 4'd0};
  endfunction
  semaphore bus = new(1);
  task automatic wr(logic [31:0] a, logic [31:0] d);
    bus.get(1);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    do @(negedge clk); while (!bus_ready);
    @(posedge clk); #1 bus_sel = 0; bus_we = 0;
    bus.put(1);
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    bus.get(1);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    do @(negedge clk); while (!bus_ready);
    d = bus_rdata;
    @(posedge clk); #1 bus_sel = 0;
    bus.put(1);
  endtask
  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    bus_sel = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0;
    for (int i = 0; i < 64; i++) mem[16'h400 + i] = 32'h7700_0000 + 32'(i * 3);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    wr(C(CFG_CONN, 1), {16'd0, 8'd0, 8'd9});
    wr(C(CFG_CREDIT, 1), 8);
    wr(C(CFG_CONN, 9), {16'd0, 8'd0, 8'd1});
    wr(C(CFG_BUF_BASE, 9), 32'h8000);
    wr(C(CFG_BUF_SIZE, 9), 8);

    fork
      for (int r = 0; r < 5; r++) begin
        wr(A(1, REQ_INDIRECT, 0, 1, 0), 32'h1000 + 32'(16 * r));
        wr(A(1, REQ_INDIRECT, 1, 1, 0), 16);
      end
      for (int r = 0; r < 5; r++) begin
        wr(A(0, REQ_INDIRECT, 0, 9, 1), 32'h2000 + 32'(16 * r));
        wr(A(0, REQ_INDIRECT, 1, 9, 1), 16);
      end
    join
    repeat (300) @(posedge clk);
    for (int i = 0; i < 20; i++) chk("streamed word", mem[16'h800 + i], 32'h7700_0000 + 32'(i * 3));
    chk("send events", nsend, 5);
    chk("receive events", nrecv, 5);
    rd(C(CFG_CREDIT, 1), d);
    chk("credits back", d, 8);

    wr(A(1, REQ_DIRECT, 1, 1, 2), 32'h1234_5678);
    rd(A(0, REQ_DIRECT, 1, 9, 3), d);
    chk("direct word", d, 32'h1234_5678);

    wr(A(1, REQ_ADDR, 0, 0, 2), 32'h1000);
    wr(A(1, REQ_ADDR, 0, 0, 2), 32'h0000_3000);
    wr(A(1, REQ_ADDR, 1, 0, 2), 24);
    repeat (100) @(posedge clk);
    for (int i = 0; i < 6; i++) chk("address-based word", mem[16'hC00 + i], 32'h7700_0000 + 32'(i * 3));
    rd(C(CFG_FILL, 9), d);
    chk("fifo empty", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
