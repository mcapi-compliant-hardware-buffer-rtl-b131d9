// One cluster's communication hardware around the Buffer Manager Mechanism:
// the BMM, the Event Synchronizer and the Shared Memory, reached by the
// cluster's CPUs over one shared bus, with the BMM's packet ports going out
// to the Network Interface / NoC.
//
// Bus (sel/we/addr/wdata in, ready/rdata out; the master holds its request
// until ready): address bits 22..20 select the target.
//   3'b011  BMM registers (request encoding of bmm_req_decoder)
//   3'b100  Event Synchronizer (bits 7..4 CPU, bits 3..2 register)
//   other   Shared Memory, byte address in the low bits; ready and read
//           data come one cycle after the request
// The BMM window is the document's; the other two windows are this
// design's. CPUs and the NoC are outside this block: the testbench drives
// the bus and connects clusters' packet ports. `irq` is the per-CPU event
// line of the Event Synchronizer.
module bmm_cluster
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 256,
  parameter int unsigned NUM_CPUS    = 16,
  parameter int unsigned QUEUE_DEPTH = 4,
  parameter int unsigned SMEM_WORDS  = 16384
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bus_sel,
  input  logic                bus_we,
  input  logic [ADDR_W-1:0]   bus_addr,
  input  logic [DATA_W-1:0]   bus_wdata,
  output logic                bus_ready,
  output logic [DATA_W-1:0]   bus_rdata,
  output logic                tx_valid,
  input  logic                tx_ready,
  output flit_t               tx_flit,
  input  logic                rx_valid,
  output logic                rx_ready,
  input  flit_t               rx_flit,
  output logic [NUM_CPUS-1:0] irq
);
  logic [2:0] win;
  logic       sel_bmm, sel_es, sel_mem;
  assign win     = bus_addr[A_SEL_LO +: 3];
  assign sel_bmm = bus_sel && win == BMM_SEL;
  assign sel_es  = bus_sel && win == ES_SEL;
  assign sel_mem = bus_sel && !(win == BMM_SEL || win == ES_SEL);

  logic              bmm_ready;
  logic [DATA_W-1:0] bmm_rdata, es_rdata, mem_rdata;
  logic              mem_ack;  // second cycle of a memory access
  mem_req_t          mem_req;
  mem_rsp_t          mem_rsp;
  event_t            ev_send, ev_recv;

  bmm #(.NUM_PORTS(NUM_PORTS), .NUM_CPUS(NUM_CPUS), .QUEUE_DEPTH(QUEUE_DEPTH)) u_bmm (
    .clk, .rst_n,
    .bus_sel(sel_bmm), .bus_we, .bus_addr, .bus_wdata,
    .bus_ready(bmm_ready), .bus_rdata(bmm_rdata),
    .mem_req, .mem_rsp,
    .tx_valid, .tx_ready, .tx_flit,
    .rx_valid, .rx_ready, .rx_flit,
    .ev_send, .ev_recv
  );

  event_sync #(.NUM_CPUS(NUM_CPUS)) u_es (
    .clk, .rst_n,
    .ev_a(ev_send), .ev_b(ev_recv),
    .sel(sel_es), .we(bus_we), .addr(bus_addr[7:2]), .wdata(bus_wdata),
    .rdata(es_rdata), .irq
  );

  shared_mem #(.WORDS(SMEM_WORDS)) u_mem (
    .clk, .rst_n,
    .a_req(mem_req), .a_rsp(mem_rsp),
    .b_req(sel_mem && !mem_ack), .b_we(bus_we), .b_addr(bus_addr),
    .b_wdata(bus_wdata), .b_rdata(mem_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_ack <= 1'b0;
    else        mem_ack <= sel_mem && !mem_ack;
  end

  always_comb begin
    if (sel_bmm) begin
      bus_ready = bmm_ready;
      bus_rdata = bmm_rdata;
    end else if (sel_es) begin
      bus_ready = 1'b1;
      bus_rdata = es_rdata;
    end else begin
      bus_ready = sel_mem && mem_ack;
      bus_rdata = mem_rdata;
    end
  end
endmodule
