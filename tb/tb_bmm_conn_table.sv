// Checks the Connection Table: reset contents, random configuration writes
// and both read ports against an array model.
module tb_bmm_conn_table;
  import bmm_pkg::*;
  localparam int NP = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we;
  logic [7:0] cfg_port, cfg_rcluster, cfg_rport, a_port, b_port;
  logic [7:0] a_rcluster, a_rport, b_rcluster, b_rport;
  logic [15:0] model [NP];

  bmm_conn_table #(.NUM_PORTS(NP)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_port = 0; cfg_rcluster = 0; cfg_rport = 0; a_port = 0; b_port = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 1) == 1);
      cfg_port = 8'($urandom); cfg_rcluster = 8'($urandom); cfg_rport = 8'($urandom);
      a_port = 8'($urandom); b_port = 8'($urandom);
      #1;
      checks += 2;
      if ({a_rcluster, a_rport} !== model[a_port]) begin failures++; $display("FAIL a port %0d", a_port); end
      if ({b_rcluster, b_rport} !== model[b_port]) begin failures++; $display("FAIL b port %0d", b_port); end
      @(posedge clk);
      if (cfg_we) model[cfg_port] = {cfg_rcluster, cfg_rport};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
