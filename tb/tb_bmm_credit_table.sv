// Checks the Credit Table against an array model under random, overlapping
// set / add / subtract updates, through the query ports and the read port.
module tb_bmm_credit_table;
  import bmm_pkg::*;
  localparam int NP = 8, NQ = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic set_en, inc_en, dec_en;
  logic [7:0] set_port, inc_port, dec_port, rd_port;
  logic [15:0] set_val, rd_credit;
  logic [13:0] inc_n, dec_n;
  logic [7:0] q_port [NQ];
  logic [15:0] q_credit [NQ];
  logic [15:0] model [NP];

  bmm_credit_table #(.NUM_PORTS(NP), .NQ(NQ)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_en = 0; inc_en = 0; dec_en = 0; set_port = 0; inc_port = 0; dec_port = 0;
    set_val = 0; inc_n = 0; dec_n = 0; rd_port = 0; q_port[0] = 0; q_port[1] = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      set_en = ($urandom_range(0, 7) == 0); set_port = 8'($urandom_range(0, NP-1)); set_val = 16'($urandom_range(0, 1000));
      inc_en = ($urandom_range(0, 1) == 1); inc_port = 8'($urandom_range(0, NP-1)); inc_n = 14'($urandom_range(0, 50));
      dec_en = ($urandom_range(0, 1) == 1); dec_port = 8'($urandom_range(0, NP-1)); dec_n = 14'($urandom_range(0, 50));
      rd_port = 8'($urandom_range(0, NP-1));
      q_port[0] = 8'($urandom_range(0, NP-1)); q_port[1] = 8'($urandom_range(0, NP-1));
      #1;
      checks += 3;
      if (rd_credit !== model[rd_port]) begin failures++; $display("FAIL rd port %0d: %0d vs %0d", rd_port, rd_credit, model[rd_port]); end
      for (int q = 0; q < NQ; q++)
        if (q_credit[q] !== model[q_port[q]]) begin failures++; $display("FAIL q%0d", q); end
      @(posedge clk);
      if (set_en) model[set_port] = set_val;
      for (int i = 0; i < NP; i++) begin
        if (set_en && set_port == i) continue;
        if (inc_en && inc_port == i) model[i] += 16'(inc_n);
        if (dec_en && dec_port == i) model[i] -= 16'(dec_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
