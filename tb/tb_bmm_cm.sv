// Checks the Credit Manager. Sending side: configured credits, subtraction
// on completed write requests, addition from received credit packets.
// Receiving side: consumed words are returned in one credit packet to the
// connected remote port when the read request completes, and in extra
// packets each time the threshold is reached; every consumed word comes
// back exactly once. The network stalls at random.
module tb_bmm_cm;
  import bmm_pkg::*;
  localparam int NP = 16, NC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_credit_en, cfg_thr_en; logic [7:0] cfg_port; logic [31:0] cfg_val;
  logic [7:0] rd_port; logic [15:0] rd_credit;
  logic [7:0] q_port [NC]; logic [15:0] q_credit [NC];
  logic dec_en; logic [7:0] dec_port; logic [13:0] dec_n;
  logic consume, rd_done; logic [7:0] rd_port_id;
  logic cr_valid; flit_t cr_flit;
  logic [7:0] conn_port, conn_rcluster, conn_rport;
  logic tx_valid, tx_ready; flit_t tx_flit;

  bmm_cm #(.NUM_PORTS(NP), .NUM_CPUS(NC)) dut (.*);

  assign conn_rcluster = conn_port + 8'h40;
  assign conn_rport    = conn_port + 8'h50;

  int sent [256]; int pkts [256];
  always @(posedge clk) tx_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    automatic pkt_hdr_t h = pkt_hdr_t'(tx_flit.data);
    checks++;
    if (h.typ != PKT_CREDIT || h.cluster != h.port - 8'h10 || !tx_flit.last) begin
      failures++; $display("FAIL bad credit packet %h", tx_flit.data);
    end
    sent[h.port - 8'h50] += int'(h.len);
    pkts[h.port - 8'h50]++;
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
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask
  task automatic eat(int port, int n);
    for (int i = 0; i < n; i++) begin
      consume = 1; rd_port_id = 8'(port); step(); consume = 0;
      repeat ($urandom_range(0, 3)) step();
    end
  endtask
  task automatic fin(int port);
    rd_done = 1; rd_port_id = 8'(port); step(); rd_done = 0;
  endtask

  initial begin
    cfg_credit_en = 0; cfg_thr_en = 0; cfg_port = 0; cfg_val = 0; rd_port = 0;
    q_port[0] = 0; q_port[1] = 0; dec_en = 0; dec_port = 0; dec_n = 0;
    consume = 0; rd_done = 0; rd_port_id = 0; cr_valid = 0; cr_flit = '0;
    foreach (sent[i]) begin sent[i] = 0; pkts[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1; step();

    // sending side
    cfg_credit_en = 1; cfg_port = 3; cfg_val = 20; step(); cfg_credit_en = 0;
    q_port[1] = 3; rd_port = 3; #1;
    chk("configured credits", q_credit[1], 20);
    dec_en = 1; dec_port = 3; dec_n = 5; step(); dec_en = 0; #1;
    chk("after completed write", rd_credit, 15);
    begin
      pkt_hdr_t h; h.typ = PKT_CREDIT; h.cluster = 0; h.port = 3; h.len = 7;
      cr_valid = 1; cr_flit.data = h; cr_flit.last = 1; step(); cr_valid = 0; #1;
    end
    chk("after credit packet", rd_credit, 22);

    // receiving side, no threshold: one packet at request end
    eat(5, 3);
    repeat (20) step();
    chk("nothing before request end", pkts[5], 0);
    fin(5);
    repeat (20) step();
    chk("one packet at request end", pkts[5], 1);
    chk("credits returned", sent[5], 3);

    // threshold 4
    cfg_thr_en = 1; cfg_val = 4; step(); cfg_thr_en = 0;
    eat(6, 10);
    repeat (20) step();
    chk("threshold packets", pkts[6] >= 2, 1);
    chk("held below threshold", sent[6] <= 10 && 10 - sent[6] < 4, 1);
    fin(6);
    repeat (20) step();
    chk("all credits returned", sent[6], 10);

    // two ports finishing together
    eat(7, 2);
    eat(8, 1);
    fin(7);
    fin(8);
    repeat (30) step();
    chk("port 7 returned", sent[7], 2);
    chk("port 8 returned", sent[8], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
