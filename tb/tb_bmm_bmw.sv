// Checks the BMW: stream packets land in the target port's circular FIFO
// (addresses from a Buffer Table model that wraps at 8 words, one push per
// word), address-based packets land at their destination address, and
// memory stalls back-pressure the incoming flits without losing any.
module tb_bmm_bmw;
  import bmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid, rx_ready; flit_t rx_flit;
  logic [7:0] w_port; logic [31:0] w_addr; logic push;
  mem_req_t mem_req; mem_rsp_t mem_rsp;

  bmm_bmw dut (.*);

  // buffer table model: base 0x1000*port, 8 words
  int wp [256];
  assign w_addr = 32'h1000 * w_port + 32'(4 * wp[w_port]);
  int pushes = 0;
  always @(posedge clk) if (push) begin wp[w_port] = (wp[w_port] + 1) % 8; pushes++; end

  // memory model
  logic [31:0] mem [logic [31:0]];
  logic gnt_r;
  always @(posedge clk) gnt_r <= $urandom_range(0, 2) != 0;
  assign mem_rsp.gnt = mem_req.req && gnt_r;
  assign mem_rsp.rvalid = 1'b0;
  assign mem_rsp.rdata = '0;
  always @(posedge clk) if (mem_req.req && gnt_r && mem_req.we) mem[mem_req.addr] = mem_req.wdata;

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

  task automatic send(logic [31:0] flits [$]);
    for (int i = 0; i < flits.size(); i++) begin
      @(posedge clk); #1;
      while ($urandom_range(0, 3) == 0) begin rx_valid = 0; @(posedge clk); #1; end
      rx_valid = 1; rx_flit.data = flits[i]; rx_flit.last = (i == flits.size() - 1);
      do @(negedge clk); while (!rx_ready);
    end
    @(posedge clk); #1 rx_valid = 0;
  endtask

  function automatic logic [31:0] hdr(pkt_type_e t, int port, int len);
    pkt_hdr_t h; h.typ = t; h.cluster = 8'd1; h.port = 8'(port); h.len = 14'(len);
    return h;
  endfunction

  initial begin
    logic [31:0] p [$];
    rx_valid = 0; rx_flit = '0;
    foreach (wp[i]) wp[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    p = {hdr(PKT_STREAM, 2, 5), 32'hA0, 32'hA1, 32'hA2, 32'hA3, 32'hA4};
    send(p);
    p = {hdr(PKT_STREAM, 2, 5), 32'hB0, 32'hB1, 32'hB2, 32'hB3, 32'hB4};
    send(p);
    p = {hdr(PKT_ADDR, 0, 3), 32'h0300_0100, 32'hC0, 32'hC1, 32'hC2};
    send(p);
    p = {hdr(PKT_STREAM, 7, 1), 32'hD0};
    send(p);
    repeat (5) @(posedge clk);
    chk("pushes", pushes, 11);
    for (int i = 2; i < 5; i++) chk("first packet", mem[32'h2000 + 4*i], 32'hA0 + i);
    chk("wrap 0", mem[32'h2014], 32'hB0);
    chk("wrap 1", mem[32'h2018], 32'hB1);
    chk("wrap 2", mem[32'h201C], 32'hB2);
    chk("wrap 3", mem[32'h2000], 32'hB3);
    chk("wrap 4", mem[32'h2004], 32'hB4);
    for (int i = 0; i < 3; i++) chk("address-based", mem[32'h0300_0100 + 4*i], 32'hC0 + i);
    chk("port 7", mem[32'h7000], 32'hD0);
    chk("port 2 pointer", wp[2], 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
