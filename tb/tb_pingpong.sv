// Ping-pong workloads between two clusters at default parameters.
//
// Throughput phase: the one-way phase of the benchmark. 16 KB of user data
// go from a buffer in cluster 0 to a buffer in cluster 1 through a 2048-word
// receive FIFO. They are sent as indirect stream requests of 8, 32, 128,
// 512, 2048 and 8192 bytes, and the receiving CPU posts one matching
// indirect read per packet. For each size the testbench checks every word
// and prints the cycles taken and the hardware throughput at 200 MHz. It
// also counts every flit on the link in both directions, credit packets
// included, and prints the efficiency: user data over link traffic.
//
// Latency phase: round trips. Cluster 0 sends a packet on port 1. Cluster 1
// reads it and, once its read has completed, sends it back on port 2.
// Cluster 0 then reads it into a second buffer. This is timed two ways:
//   - one packet of 8 to 2048 bytes;
//   - 8 KB moved as a chain of such round trips.
// Every returned word is checked. Each round trip is also checked against a
// cycle bound worked out from the engines' rate of three cycles per word:
// sender plus reader is six cycles per word in each direction, plus a fixed
// overhead of 64 cycles per direction for bus writes, request selection,
// headers and credit return.
//
// The CPU side is modelled with one-cycle bus writes, so these numbers bound
// what the mechanism itself can move, not what a program would see. The
// packet sizes and totals follow the benchmark description; the link
// between the clusters is ideal (no NoC delay), which is this testbench's
// own choice.
module tb_pingpong;
  import bmm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bus_sel [2], bus_we [2], bus_ready [2];
  logic [31:0] bus_addr [2], bus_wdata [2], bus_rdata [2];
  logic        tx_valid [2], tx_ready [2], rx_valid [2], rx_ready [2];
  flit_t       tx_flit [2], rx_flit [2];
  logic [15:0] irq [2];

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

  // ideal link between the two clusters
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      rx_valid[1-c] = tx_valid[c];
      rx_flit[1-c]  = tx_flit[c];
      tx_ready[c]   = rx_ready[1-c];
    end
  end

  int n_recv = 0, n_recv0 = 0;
  always @(posedge clk) if (g_cl[1].u_cl.u_bmm.ev_recv.valid) n_recv++;
  always @(posedge clk) if (g_cl[0].u_cl.u_bmm.ev_recv.valid) n_recv0++;
  // flits crossing the link in either direction (data, headers, credits)
  int n_flits = 0;
  always @(posedge clk)
    for (int c = 0; c < 2; c++) if (tx_valid[c] && tx_ready[c]) n_flits++;

  function automatic logic [31:0] bmm_a(bit rw, req_type_e t, bit e, int port, int cpu);
    return {9'd0, 3'b011, rw, t, e, 8'(port), 4'(cpu), 4'd0};
  endfunction
  function automatic logic [31:0] cfg_a(cfg_sel_e s, int port);
    return {9'd0, 3'b011, 1'b1, REQ_CONFIG, 1'b1, 8'(port), s, 4'd0};
  endfunction

  task automatic wr(int c, logic [31:0] a, logic [31:0] d);
    bus_sel[c] = 1'b1; bus_we[c] = 1'b1; bus_addr[c] = a; bus_wdata[c] = d;
    do @(negedge clk); while (!bus_ready[c]);
    @(posedge clk); #1;
    bus_sel[c] = 1'b0; bus_we[c] = 1'b0;
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TOTAL = 16384;  // bytes
  int sizes [6] = '{8, 32, 128, 512, 2048, 8192};

  initial begin
    for (int c = 0; c < 2; c++) begin
      bus_sel[c] = 0; bus_we[c] = 0; bus_addr[c] = 0; bus_wdata[c] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    wr(0, cfg_a(CFG_CONN, 1), {16'd0, 8'd1, 8'd1});
    wr(0, cfg_a(CFG_CREDIT, 1), 2048);
    wr(1, cfg_a(CFG_CONN, 1), {16'd0, 8'd0, 8'd1});
    wr(1, cfg_a(CFG_BUF_BASE, 1), 32'h8000);
    wr(1, cfg_a(CFG_BUF_SIZE, 1), 2048);
    // return channel: cluster 1 port 2 -> cluster 0 port 2
    wr(1, cfg_a(CFG_CONN, 2), {16'd0, 8'd0, 8'd2});
    wr(1, cfg_a(CFG_CREDIT, 2), 2048);
    wr(0, cfg_a(CFG_CONN, 2), {16'd0, 8'd1, 8'd2});
    wr(0, cfg_a(CFG_BUF_BASE, 2), 32'h8000);
    wr(0, cfg_a(CFG_BUF_SIZE, 2), 2048);

    foreach (sizes[s]) begin
      automatic int psize = sizes[s];
      automatic int npkt = TOTAL / psize;
      automatic longint t0, t1;
      // source data, written straight into cluster 0's memory
      for (int i = 0; i < TOTAL / 4; i++)
        g_cl[0].u_cl.u_mem.mem[i] = 32'(s << 24) ^ 32'(i * 32'h01000193);
      for (int i = 0; i < TOTAL / 4; i++) g_cl[1].u_cl.u_mem.mem[i] = '0;
      n_recv = 0;
      n_flits = 0;
      t0 = $time;
      fork
        for (int p = 0; p < npkt; p++) begin
          wr(0, bmm_a(1, REQ_INDIRECT, 0, 1, 0), 32'(p * psize));
          wr(0, bmm_a(1, REQ_INDIRECT, 1, 1, 0), 32'(psize));
        end
        for (int p = 0; p < npkt; p++) begin
          wr(1, bmm_a(0, REQ_INDIRECT, 0, 1, 0), 32'(p * psize));
          wr(1, bmm_a(0, REQ_INDIRECT, 1, 1, 0), 32'(psize));
        end
      join
      while (n_recv < npkt) @(posedge clk);
      t1 = $time;
      for (int i = 0; i < TOTAL / 4; i++) begin
        checks++;
        if (g_cl[1].u_cl.u_mem.mem[i] !== (32'(s << 24) ^ 32'(i * 32'h01000193))) begin
          failures++;
          if (failures < 10) $display("FAIL size %0d word %0d", psize, i);
        end
      end
      $display("packet %5d B: %0d packets, %0d cycles, %0d Mbit/s at 200 MHz",
               psize, npkt, (t1 - t0) / 10, (TOTAL * 8 * 200) / ((t1 - t0) / 10));
      repeat (50) @(posedge clk);
      // every flit is one 32-bit word on the link
      $display("packet %5d B: %0d flits on the link, efficiency %0d%%",
               psize, n_flits, (TOTAL / 4) * 100 / n_flits);
      checks++;
      if (n_flits < TOTAL / 4 + npkt) begin
        failures++;
        $display("FAIL fewer flits than data words plus headers");
      end
    end
    // latency: single packets, then 8 KB in chains of round trips
    for (int i = 0; i < 2048; i++) begin
      g_cl[0].u_cl.u_mem.mem[i] = 32'h5a5a_0000 ^ 32'(i * 32'h0001_0021);
      g_cl[0].u_cl.u_mem.mem[32'h1000 + i] = '0;
    end
    for (int s = 0; s < 5; s++) begin
      automatic int psize = sizes[s];
      automatic int rt;
      round_trip_t(0, psize, rt);
      $display("round trip, one %4d B packet: %0d cycles", psize, rt);
    end
    for (int s = 0; s < 5; s++) begin
      automatic int psize = sizes[s];
      automatic int total = 0;
      automatic int rt;
      for (int off = 0; off < 8192; off += psize) begin
        round_trip_t(off, psize, rt);
        total += rt;
      end
      $display("round trip, 8 KB in %4d B packets: %0d cycles", psize, total);
    end
    for (int i = 0; i < 2048; i++) begin
      checks++;
      if (g_cl[0].u_cl.u_mem.mem[32'h1000 + i] !== (32'h5a5a_0000 ^ 32'(i * 32'h0001_0021))) begin
        failures++;
        if (failures < 10) $display("FAIL echo word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle bound of one round trip, from the engine rate (see header)
  function automatic int rt_bound(int psize);
    return 2 * (6 * (psize / 4) + 64);
  endfunction

  // One round trip of the bytes at offset off: cluster 0 buffer at 0 ->
  // cluster 1 buffer at 0 -> cluster 0 buffer at 0x4000. Returns cycles.
  task automatic round_trip_t(input int off, input int psize, output int cyc);
    longint t0;
    int r1, r0;
    r1 = n_recv; r0 = n_recv0;
    t0 = $time;
    wr(0, bmm_a(1, REQ_INDIRECT, 0, 1, 0), 32'(off));
    wr(0, bmm_a(1, REQ_INDIRECT, 1, 1, 0), 32'(psize));
    wr(1, bmm_a(0, REQ_INDIRECT, 0, 1, 0), 32'(off));
    wr(1, bmm_a(0, REQ_INDIRECT, 1, 1, 0), 32'(psize));
    while (n_recv == r1) @(posedge clk);
    #1;
    wr(1, bmm_a(1, REQ_INDIRECT, 0, 2, 0), 32'(off));
    wr(1, bmm_a(1, REQ_INDIRECT, 1, 2, 0), 32'(psize));
    wr(0, bmm_a(0, REQ_INDIRECT, 0, 2, 0), 32'h4000 + 32'(off));
    wr(0, bmm_a(0, REQ_INDIRECT, 1, 2, 0), 32'(psize));
    while (n_recv0 == r0) @(posedge clk);
    cyc = int'(($time - t0) / 10);
    checks++;
    if (cyc > rt_bound(psize)) begin
      failures++;
      $display("FAIL round trip of %0d B took %0d cycles, bound %0d", psize, cyc, rt_bound(psize));
    end
    @(posedge clk); #1;
  endtask
endmodule
