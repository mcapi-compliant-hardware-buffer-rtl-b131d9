// Event Synchronizer: a small programmable interrupt controller. Each CPU
// has a 32-bit synchronization event register (SER) and a synchronization
// mask. When the BMM completes a request it reports (CPU, port); bit
// port[4:0] of that CPU's SER is set. The CPU's event line is high while
// its mask is non-zero and every mask bit is set in its SER, so a CPU can
// wait for one transfer or for a group of them. The SER/mask/event scheme
// is the document's; the bit assignment, the register map and the
// write-one-to-clear SER are this design's.
//
// Register access (combinational read data): addr[7:4] = CPU, addr[3:2] =
// 0: SER (write ones to clear), 1: mask.
module event_sync
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_CPUS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  event_t            ev_a,
  input  event_t            ev_b,
  input  logic              sel,
  input  logic              we,
  input  logic [7:2]        addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic [NUM_CPUS-1:0] irq
);
  localparam int unsigned CW = (NUM_CPUS > 1) ? $clog2(NUM_CPUS) : 1;

  logic [31:0] ser  [NUM_CPUS];
  logic [31:0] mask [NUM_CPUS];

  logic [CPU_W-1:0] acpu;
  assign acpu = addr[7:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CPUS; i++) begin
        ser[i]  <= '0;
        mask[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_CPUS; i++) begin
        automatic logic [31:0] set = '0;
        automatic logic [31:0] clr = '0;
        if (ev_a.valid && CW'(ev_a.cpu) == CW'(i)) set[ev_a.port[4:0]] = 1'b1;
        if (ev_b.valid && CW'(ev_b.cpu) == CW'(i)) set[ev_b.port[4:0]] = 1'b1;
        if (sel && we && CW'(acpu) == CW'(i) && addr[3:2] == 2'd0) clr = wdata;
        ser[i] <= (ser[i] & ~clr) | set;
        if (sel && we && CW'(acpu) == CW'(i) && addr[3:2] == 2'd1) mask[i] <= wdata;
      end
    end
  end

  always_comb begin
    unique case (addr[3:2])
      2'd0:    rdata = ser[CW'(acpu)];
      2'd1:    rdata = mask[CW'(acpu)];
      default: rdata = '0;
    endcase
    for (int i = 0; i < NUM_CPUS; i++)
      irq[i] = (mask[i] != '0) && ((ser[i] & mask[i]) == mask[i]);
  end
endmodule
