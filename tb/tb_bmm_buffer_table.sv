// Checks the Buffer Table against a model of circular FIFOs: per-port
// base/size configuration, write and read addresses with wrap-around, fill
// counts through the query and read ports, under random pushes and pops
// that never overfill or underflow a FIFO.
module tb_bmm_buffer_table;
  import bmm_pkg::*;
  localparam int NP = 4, NQ = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_base_en, cfg_size_en, push, pop;
  logic [7:0] cfg_port, w_port, r_port, rd_port;
  logic [31:0] cfg_val, w_addr, r_addr;
  logic [7:0] q_port [NQ];
  logic [13:0] q_count [NQ];
  logic [13:0] rd_count;

  int base [NP], size [NP], wp [NP], rp [NP], cnt [NP];

  bmm_buffer_table #(.NUM_PORTS(NP), .NQ(NQ)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(bit is_size, int port, int val);
    @(negedge clk);
    cfg_base_en = !is_size; cfg_size_en = is_size; cfg_port = 8'(port); cfg_val = 32'(val);
    @(negedge clk);
    cfg_base_en = 0; cfg_size_en = 0;
  endtask

  initial begin
    cfg_base_en = 0; cfg_size_en = 0; push = 0; pop = 0; cfg_port = 0; cfg_val = 0;
    w_port = 0; r_port = 0; rd_port = 0; q_port[0] = 0; q_port[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      base[p] = 32'h1000 * (p + 1); size[p] = 3 + 2 * p; wp[p] = 0; rp[p] = 0; cnt[p] = 0;
      cfg(0, p, base[p]);
      cfg(1, p, size[p]);
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      w_port = 8'($urandom_range(0, NP-1)); r_port = 8'($urandom_range(0, NP-1));
      rd_port = 8'($urandom_range(0, NP-1));
      q_port[0] = 8'($urandom_range(0, NP-1)); q_port[1] = 8'($urandom_range(0, NP-1));
      push = ($urandom_range(0, 1) == 1) && cnt[w_port] < size[w_port];
      pop  = ($urandom_range(0, 1) == 1) && cnt[r_port] > 0;
      #1;
      checks += 5;
      if (w_addr !== 32'(base[w_port] + 4 * wp[w_port])) begin failures++; $display("FAIL w_addr"); end
      if (r_addr !== 32'(base[r_port] + 4 * rp[r_port])) begin failures++; $display("FAIL r_addr"); end
      if (rd_count !== 14'(cnt[rd_port])) begin failures++; $display("FAIL rd_count"); end
      for (int q = 0; q < NQ; q++)
        if (q_count[q] !== 14'(cnt[q_port[q]])) begin failures++; $display("FAIL q_count"); end
      @(posedge clk);
      if (push) begin wp[w_port] = (wp[w_port] + 1) % size[w_port]; cnt[w_port]++; end
      if (pop)  begin rp[r_port] = (rp[r_port] + 1) % size[r_port]; cnt[r_port]--; end
    end
    // re-sizing a port clears its pointers
    push = 0; pop = 0;
    cfg(1, 2, 9);
    rd_port = 2; w_port = 2; #1;
    checks += 2;
    if (rd_count !== 0) begin failures++; $display("FAIL resize count"); end
    if (w_addr !== 32'(base[2])) begin failures++; $display("FAIL resize pointer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
