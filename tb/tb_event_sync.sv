// Checks the Event Synchronizer: completion events set SER bits, the event
// line rises only when every mask bit is set, write-one-to-clear, and
// register read-back.
module tb_event_sync;
  import bmm_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  event_t ev_a, ev_b;
  logic sel, we; logic [7:2] addr; logic [31:0] wdata, rdata;
  logic [NC-1:0] irq;
  logic [31:0] ser [NC], mask [NC];

  event_sync #(.NUM_CPUS(NC)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_a = '0; ev_b = '0; sel = 0; we = 0; addr = 0; wdata = 0;
    foreach (ser[i]) begin ser[i] = 0; mask[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ev_a.valid = $urandom_range(0, 3) == 0; ev_a.cpu = 4'($urandom_range(0, NC-1)); ev_a.port = 8'($urandom);
      ev_b.valid = $urandom_range(0, 3) == 0; ev_b.cpu = 4'($urandom_range(0, NC-1)); ev_b.port = 8'($urandom);
      sel = $urandom_range(0, 1); we = $urandom_range(0, 2) == 0;
      addr = {4'($urandom_range(0, NC-1)), 2'($urandom_range(0, 1))};
      wdata = (addr[3:2] == 1) ? (32'h1 << $urandom_range(0, 31)) | (32'h1 << $urandom_range(0, 31)) : $urandom;
      #1;
      checks += 1 + NC;
      if (rdata !== (addr[3:2] == 0 ? ser[addr[7:4]] : mask[addr[7:4]])) begin failures++; $display("FAIL rdata"); end
      for (int c = 0; c < NC; c++)
        if (irq[c] !== (mask[c] != 0 && (ser[c] & mask[c]) == mask[c])) begin failures++; $display("FAIL irq %0d", c); end
      @(posedge clk);
      if (sel && we && addr[3:2] == 0) ser[addr[7:4]] &= ~wdata;
      if (sel && we && addr[3:2] == 1) mask[addr[7:4]] = wdata;
      if (ev_a.valid) ser[ev_a.cpu] |= 32'h1 << ev_a.port[4:0];
      if (ev_b.valid) ser[ev_b.cpu] |= 32'h1 << ev_b.port[4:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
