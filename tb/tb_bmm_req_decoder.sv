// Checks the request decoder: each request type of the address encoding
// produces one queue push with the right fields, staging is kept per CPU
// when two CPUs interleave their writes, a full queue holds the bus,
// configuration writes and reads reach the tables, and a direct read waits
// for the BMR's word.
module tb_bmm_req_decoder;
  import bmm_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sel, we, ready; logic [31:0] addr, wdata, rdata;
  req_t req; logic bmi_push, bmr_push; logic [NC-1:0] bmi_full, bmr_full;
  logic rd_valid; logic [3:0] rd_cpu; logic [31:0] rd_data;
  logic cfg_we; cfg_sel_e cfg_sel; logic [7:0] cfg_port; logic [31:0] cfg_wdata, cfg_rdata;

  bmm_req_decoder #(.NUM_CPUS(NC)) dut (.*);

  req_t bmi_q [$], bmr_q [$];
  int   cfg_writes = 0;
  logic [31:0] last_cfg;
  always @(posedge clk) begin
    if (bmi_push) bmi_q.push_back(req);
    if (bmr_push) bmr_q.push_back(req);
    if (cfg_we) begin cfg_writes++; last_cfg = {cfg_sel, cfg_port, cfg_wdata[19:0]}; end
  end
  assign cfg_rdata = {24'hC0FFEE, cfg_port};

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] A(bit rw, req_type_e t, bit e, int port, int cpu);
    return {9'd0, 3'b011, rw, t, e, 8'(port), 4'(cpu), 4'd0};
  endfunction

  int stall;
  task automatic wr(logic [31:0] a, logic [31:0] d);
    sel = 1; we = 1; addr = a; wdata = d; stall = 0;
    do begin @(negedge clk); if (!ready) stall++; end while (!ready);
    @(posedge clk); #1 sel = 0; we = 0;
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    sel = 1; we = 0; addr = a; stall = 0;
    do begin @(negedge clk); if (!ready) stall++; end while (!ready);
    d = rdata;
    @(posedge clk); #1 sel = 0;
  endtask
  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask
  task automatic chk_req(string what, req_t r, req_type_e t, int port, int cpu, logic [31:0] w0, logic [31:0] w1, int size);
    chk({what, " type"}, r.typ, t);
    chk({what, " port"}, r.port, port);
    chk({what, " cpu"}, r.cpu, cpu);
    chk({what, " w0"}, r.w0, w0);
    if (t == REQ_ADDR) chk({what, " w1"}, r.w1, w1);
    chk({what, " size"}, r.size, size);
  endtask

  initial begin
    logic [31:0] d; req_t r;
    sel = 0; we = 0; addr = 0; wdata = 0; bmi_full = 0; bmr_full = 0;
    rd_valid = 0; rd_cpu = 0; rd_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    // address-based, interleaved with an indirect request of another CPU
    wr(A(1, REQ_ADDR, 0, 9, 1), 32'h100);
    wr(A(1, REQ_INDIRECT, 0, 3, 2), 32'h2000);
    wr(A(1, REQ_ADDR, 0, 9, 1), 32'h0140_0000);
    wr(A(1, REQ_INDIRECT, 1, 3, 2), 32'd64);
    wr(A(1, REQ_ADDR, 1, 9, 1), 32'd12);
    chk("bmi pushes", bmi_q.size(), 2);
    if (bmi_q.size() == 2) begin
      chk_req("indirect", bmi_q[0], REQ_INDIRECT, 3, 2, 32'h2000, 0, 64);
      chk_req("address", bmi_q[1], REQ_ADDR, 9, 1, 32'h100, 32'h0140_0000, 12);
    end
    bmi_q.delete();
    // direct write
    wr(A(1, REQ_DIRECT, 1, 7, 3), 32'hCAFE);
    chk("direct push", bmi_q.size(), 1);
    if (bmi_q.size() == 1) chk_req("direct", bmi_q[0], REQ_DIRECT, 7, 3, 32'hCAFE, 0, 4);
    bmi_q.delete();
    // indirect read goes to BMR
    wr(A(0, REQ_INDIRECT, 0, 5, 0), 32'h3000);
    wr(A(0, REQ_INDIRECT, 1, 5, 0), 32'd40);
    chk("bmr push", bmr_q.size(), 1);
    if (bmr_q.size() == 1) chk_req("indirect read", bmr_q[0], REQ_INDIRECT, 5, 0, 32'h3000, 0, 40);
    bmr_q.delete();
    chk("no stray bmi push", bmi_q.size(), 0);
    // full queue holds the bus
    bmi_full = 4'b0100;
    fork
      wr(A(1, REQ_DIRECT, 1, 1, 2), 32'h55);
      begin repeat (6) @(posedge clk); #1 bmi_full = 0; end
    join
    chk("stalled while full", stall >= 5, 1);
    chk("push after full", bmi_q.size(), 1);
    bmi_q.delete();
    // configuration
    wr({9'd0, 3'b011, 1'b1, REQ_CONFIG, 1'b1, 8'd17, CFG_BUF_BASE, 4'd0}, 32'h0000_8000);
    chk("cfg write", cfg_writes, 1);
    chk("cfg fields", last_cfg, {CFG_BUF_BASE, 8'd17, 20'h08000});
    rd({9'd0, 3'b011, 1'b1, REQ_CONFIG, 1'b1, 8'd33, CFG_CREDIT, 4'd0}, d);
    chk("cfg read", d, {24'hC0FFEE, 8'd33});
    chk("no queue push on config", bmi_q.size() + bmr_q.size(), 0);
    // direct read: one BMR push, bus waits for the word
    fork
      rd(A(0, REQ_DIRECT, 1, 4, 2), d);
      begin
        repeat (8) @(posedge clk);
        #1 rd_valid = 1; rd_cpu = 2; rd_data = 32'hBEEF;
        @(posedge clk); #1 rd_valid = 0;
      end
    join
    chk("direct read data", d, 32'hBEEF);
    chk("direct read waited", stall >= 7, 1);
    chk("direct read push", bmr_q.size(), 1);
    if (bmr_q.size() == 1) begin  // w0 carries nothing for a direct read
      chk("direct read type", bmr_q[0].typ, REQ_DIRECT);
      chk("direct read port", bmr_q[0].port, 4);
      chk("direct read cpu", bmr_q[0].cpu, 2);
      chk("direct read size", bmr_q[0].size, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
