// End-to-end test of two clusters joined by a point-to-point link, with
// every parameter of bmm_cluster at its default. Cluster 0 sends, cluster 1
// receives (plus credits flowing back). The testbench plays the CPUs (bus
// master per cluster) and the NoC (forwards flits between the clusters with
// random stalls and checks each packet's destination cluster).
// Scenarios, each checked against data the testbench wrote itself:
//   1 indirect stream transfer of 32 words, completion seen on the irq line
//   2 direct stream words, received by blocking direct reads
//   3 address-based transfer into cluster 1's memory
//   4 more data than credits: credit stall, full request queue stalls the
//     bus, credits flow back as the receiver reads
//   5 credit threshold: credits returned in the middle of a long read
//   6 round-robin order between two CPUs' requests
// Each mechanism is counted; one that never happened is a failure.
module tb_bmm_cluster;
  import bmm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              bus_sel   [2];
  logic              bus_we    [2];
  logic [31:0]       bus_addr  [2];
  logic [31:0]       bus_wdata [2];
  logic              bus_ready [2];
  logic [31:0]       bus_rdata [2];
  logic              tx_valid  [2], tx_ready [2], rx_valid [2], rx_ready [2];
  flit_t             tx_flit   [2], rx_flit  [2];
  logic [15:0]       irq       [2];

  for (genvar c = 0; c < 2; c++) begin : g_cl
    bmm_cluster u_cl (
      .clk, .rst_n,
      .bus_sel(bus_sel[c]), .bus_we(bus_we[c]), .bus_addr(bus_addr[c]),
      .bus_wdata(bus_wdata[c]), .bus_ready(bus_ready[c]), .bus_rdata(bus_rdata[c]),
      .tx_valid(tx_valid[c]), .tx_ready(tx_ready[c]), .tx_flit(tx_flit[c]),
      .rx_valid(rx_valid[c]), .rx_ready(rx_ready[c]), .rx_flit(rx_flit[c]),
      .irq(irq[c])
    );
  end

  // ---------------- NoC model ----------------
  logic noc_stall [2];
  always_ff @(posedge clk) begin
    noc_stall[0] <= ($urandom_range(0, 3) == 0);
    noc_stall[1] <= ($urandom_range(0, 3) == 0);
  end
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      rx_valid[1-c] = tx_valid[c] && !noc_stall[c];
      rx_flit[1-c]  = tx_flit[c];
      tx_ready[c]   = rx_ready[1-c] && !noc_stall[c];
    end
  end

  // packet monitor: destination check, credit packet count, send order
  logic in_pkt [2];
  int   credit_pkts = 0;
  int   credit_pkts_mark;
  int   send_order [$];
  pkt_hdr_t mh;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt[0] <= 1'b0;
      in_pkt[1] <= 1'b0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (tx_valid[c] && tx_ready[c]) begin
          if (!in_pkt[c]) begin
            mh = pkt_hdr_t'(tx_flit[c].data);
            checks++;
            if (mh.cluster != 8'(1 - c)) begin
              failures++;
              $display("FAIL packet from cluster %0d to cluster %0d", c, mh.cluster);
            end
            if (c == 1 && mh.typ == PKT_CREDIT) credit_pkts++;
          end
          in_pkt[c] <= !tx_flit[c].last;
        end
      end
      if (g_cl[0].u_cl.u_bmm.ev_send.valid) send_order.push_back(int'(g_cl[0].u_cl.u_bmm.ev_send.cpu));
    end
  end

  // mechanism counters
  int n_credit_stall = 0, n_queue_full = 0, n_direct_wait = 0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      // a queued stream request held back for lack of credits
      for (int q = 0; q < 16; q++)
        if (!g_cl[0].u_cl.u_bmm.u_bmi.empty[q] && !g_cl[0].u_cl.u_bmm.u_bmi.eligible[q])
          n_credit_stall++;
      if (bus_sel[0] && bus_addr[0][22:20] == 3'b011 && bus_we[0] && !bus_ready[0]) n_queue_full++;
      if (bus_sel[1] && bus_addr[1][22:20] == 3'b011 && !bus_we[1] && !bus_ready[1]) n_direct_wait++;
    end
  end

  // ---------------- CPU bus tasks ----------------
  function automatic logic [31:0] bmm_a(bit rw, req_type_e t, bit e, int port, int cpu);
    return {9'd0, 3'b011, rw, t, e, 8'(port), 4'(cpu), 4'd0};
  endfunction
  function automatic logic [31:0] cfg_a(cfg_sel_e s, int port);
    return {9'd0, 3'b011, 1'b1, REQ_CONFIG, 1'b1, 8'(port), s, 4'd0};
  endfunction
  function automatic logic [31:0] es_a(int cpu, int r);
    return {9'd0, 3'b100, 12'd0, 4'(cpu), 2'(r), 2'd0};
  endfunction

  // Bus tasks change the bus 1 time unit after a rising edge and sample
  // ready in the middle of the cycle, so the clocked logic sees stable inputs.
  task automatic wr(int c, logic [31:0] a, logic [31:0] d);
    bus_sel[c] = 1'b1; bus_we[c] = 1'b1; bus_addr[c] = a; bus_wdata[c] = d;
    do @(negedge clk); while (!bus_ready[c]);
    @(posedge clk); #1;
    bus_sel[c] = 1'b0; bus_we[c] = 1'b0;
  endtask

  task automatic rd(int c, logic [31:0] a, output logic [31:0] d);
    bus_sel[c] = 1'b1; bus_we[c] = 1'b0; bus_addr[c] = a;
    do @(negedge clk); while (!bus_ready[c]);
    d = bus_rdata[c];
    @(posedge clk); #1;
    bus_sel[c] = 1'b0;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // request helpers (Table I sequences)
  task automatic send_indirect(int c, int cpu, int port, logic [31:0] src, int bytes);
    wr(c, bmm_a(1, REQ_INDIRECT, 0, port, cpu), src);
    wr(c, bmm_a(1, REQ_INDIRECT, 1, port, cpu), 32'(bytes));
  endtask
  task automatic recv_indirect(int c, int cpu, int port, logic [31:0] dst, int bytes);
    wr(c, bmm_a(0, REQ_INDIRECT, 0, port, cpu), dst);
    wr(c, bmm_a(0, REQ_INDIRECT, 1, port, cpu), 32'(bytes));
  endtask
  task automatic wait_irq(int c, int cpu);
    int n = 0;
    while (!irq[c][cpu] && n < 20000) begin @(posedge clk); n++; end
    checks++;
    if (!irq[c][cpu]) begin failures++; $display("FAIL irq %0d/%0d never rose", c, cpu); end
  endtask
  task automatic arm_irq(int c, int cpu, logic [31:0] mask);
    wr(c, es_a(cpu, 0), 32'hffff_ffff);  // clear SER
    wr(c, es_a(cpu, 1), mask);
  endtask

  function automatic logic [31:0] pat(int i);
    return 32'hA5000000 ^ (32'(i) * 32'h9E37);
  endfunction

  logic [31:0] d;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      bus_sel[c] = 0; bus_we[c] = 0; bus_addr[c] = 0; bus_wdata[c] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // ---- set-up phase: connections, FIFOs, credits ----
    wr(0, cfg_a(CFG_CONN, 1), {16'd0, 8'd1, 8'd5});    // c0 port1 -> c1 port5
    wr(0, cfg_a(CFG_CREDIT, 1), 32'd64);
    wr(1, cfg_a(CFG_CONN, 5), {16'd0, 8'd0, 8'd1});    // c1 port5 -> c0 port1
    wr(1, cfg_a(CFG_BUF_BASE, 5), 32'h8000);
    wr(1, cfg_a(CFG_BUF_SIZE, 5), 32'd64);
    wr(0, cfg_a(CFG_CONN, 2), {16'd0, 8'd1, 8'd6});    // c0 port2 -> c1 port6
    wr(0, cfg_a(CFG_CREDIT, 2), 32'd16);
    wr(1, cfg_a(CFG_CONN, 6), {16'd0, 8'd0, 8'd2});
    wr(1, cfg_a(CFG_BUF_BASE, 6), 32'h9000);
    wr(1, cfg_a(CFG_BUF_SIZE, 6), 32'd16);
    rd(0, cfg_a(CFG_CREDIT, 1), d);
    check("initial credits", d, 32'd64);

    // ---- 1: indirect stream, 32 words ----
    for (int i = 0; i < 32; i++) wr(0, 32'h1000 + 32'(4*i), pat(i));
    arm_irq(1, 1, 32'h1 << 5);
    send_indirect(0, 0, 1, 32'h1000, 128);
    recv_indirect(1, 1, 5, 32'h2000, 128);
    wait_irq(1, 1);
    for (int i = 0; i < 32; i++) begin
      rd(1, 32'h2000 + 32'(4*i), d);
      check($sformatf("indirect word %0d", i), d, pat(i));
    end
    repeat (50) @(posedge clk);
    rd(0, cfg_a(CFG_CREDIT, 1), d);
    check("credits returned after read", d, 32'd64);
    rd(1, cfg_a(CFG_FILL, 5), d);
    check("fifo empty after read", d, 32'd0);

    // ---- 2: direct stream words ----
    for (int i = 0; i < 3; i++) wr(0, bmm_a(1, REQ_DIRECT, 1, 2, 1), 32'hD0D0_0000 + 32'(i));
    for (int i = 0; i < 3; i++) begin
      rd(1, bmm_a(0, REQ_DIRECT, 1, 6, 0), d);
      check($sformatf("direct word %0d", i), d, 32'hD0D0_0000 + 32'(i));
    end

    // ---- 3: address-based transfer, 10 words to cluster 1 @0x3000 ----
    arm_irq(0, 0, 32'h1);
    wr(0, bmm_a(1, REQ_ADDR, 0, 0, 0), 32'h1000);
    wr(0, bmm_a(1, REQ_ADDR, 0, 0, 0), {8'd1, 24'h003000});
    wr(0, bmm_a(1, REQ_ADDR, 1, 0, 0), 32'd40);
    wait_irq(0, 0);
    repeat (100) @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      rd(1, 32'h3000 + 32'(4*i), d);
      check($sformatf("address-based word %0d", i), d, pat(i));
    end

    // ---- 4: 36 words through a 16-word FIFO ----
    for (int i = 0; i < 36; i++) wr(0, 32'h1400 + 32'(4*i), pat(100 + i));
    fork
      begin
        for (int r = 0; r < 9; r++) send_indirect(0, 2, 2, 32'h1400 + 32'(16*r), 16);
      end
      begin
        repeat (400) @(posedge clk);
        rd(1, cfg_a(CFG_FILL, 6), d);
        check("fifo full while receiver idle", d, 32'd16);
        // cluster 0's bus is busy with the stalled sender: peek at its table
        check("sender out of credits", 32'(g_cl[0].u_cl.u_bmm.u_cm.u_credit.credit[2]), 32'd0);
        for (int r = 0; r < 9; r++) recv_indirect(1, 3, 6, 32'h4000 + 32'(16*r), 16);
      end
    join
    arm_irq(1, 3, 32'h1 << 6);
    wait_irq(1, 3);
    repeat (200) @(posedge clk);
    for (int i = 0; i < 36; i++) begin
      rd(1, 32'h4000 + 32'(4*i), d);
      check($sformatf("flow-controlled word %0d", i), d, pat(100 + i));
    end
    rd(0, cfg_a(CFG_CREDIT, 2), d);
    check("credits restored", d, 32'd16);

    // ---- 5: threshold 4, one 16-word read returns credits early ----
    wr(1, cfg_a(CFG_THRESHOLD, 0), 32'd4);
    send_indirect(0, 2, 2, 32'h1400, 64);
    repeat (300) @(posedge clk);
    credit_pkts_mark = credit_pkts;
    arm_irq(1, 3, 32'h1 << 6);
    recv_indirect(1, 3, 6, 32'h5000, 64);
    wait_irq(1, 3);
    repeat (100) @(posedge clk);
    checks++;
    if (credit_pkts - credit_pkts_mark < 4) begin
      failures++;
      $display("FAIL threshold: %0d credit packets for 16 words", credit_pkts - credit_pkts_mark);
    end
    for (int i = 0; i < 16; i++) begin
      rd(1, 32'h5000 + 32'(4*i), d);
      check($sformatf("threshold word %0d", i), d, pat(100 + i));
    end
    wr(1, cfg_a(CFG_THRESHOLD, 0), 32'd0);

    // ---- 6: round robin between CPU 4 and CPU 5 on port 1 ----
    send_order.delete();
    for (int i = 0; i < 32; i++) wr(0, 32'h1800 + 32'(4*i), pat(200 + i));
    send_indirect(0, 4, 1, 32'h1800, 32);  // A
    send_indirect(0, 4, 1, 32'h1820, 32);  // B
    send_indirect(0, 5, 1, 32'h1840, 32);  // C
    send_indirect(0, 5, 1, 32'h1860, 32);  // D
    arm_irq(1, 1, 32'h1 << 5);
    recv_indirect(1, 1, 5, 32'h6000, 128);
    wait_irq(1, 1);
    checks++;
    if (send_order.size() != 4 || send_order[0] != 4 || send_order[1] != 5 ||
        send_order[2] != 4 || send_order[3] != 5) begin
      failures++;
      $display("FAIL round-robin order %p", send_order);
    end
    // FIFO order: A, C, B, D
    for (int i = 0; i < 32; i++) begin
      automatic int blk = i / 8;
      automatic int src = (blk == 0) ? 0 : (blk == 1) ? 16 : (blk == 2) ? 8 : 24;
      rd(1, 32'h6000 + 32'(4*i), d);
      check($sformatf("rr word %0d", i), d, pat(200 + src + i % 8));
    end

    // ---- mechanisms seen ----
    $display("mechanisms: credit_stall=%0d queue_full_stall=%0d direct_read_wait=%0d credit_packets=%0d",
             n_credit_stall, n_queue_full, n_direct_wait, credit_pkts);
    checks += 4;
    if (n_credit_stall == 0) begin failures++; $display("FAIL no credit stall"); end
    if (n_queue_full == 0)   begin failures++; $display("FAIL no full-queue stall"); end
    if (n_direct_wait == 0)  begin failures++; $display("FAIL no direct read wait"); end
    if (credit_pkts == 0)    begin failures++; $display("FAIL no credit packets"); end
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
