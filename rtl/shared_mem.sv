// Cluster Shared Memory. The document places every port's FIFO, and here
// also the CPUs' source and target buffers, in this memory. It is a word
// array with two ports: port A for the BMM (request/grant structure, always
// granted, read data one cycle after the request) and port B for the CPU
// bus (plain signals, same timing). Both ports address bytes; the low two
// address bits are ignored and addresses wrap at the memory size. On a
// same-cycle write of one word by both ports, port B's value is kept. The
// size is this design's choice; the document gives none.
module shared_mem
  import bmm_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_req_t          a_req,
  output mem_rsp_t          a_rsp,
  input  logic              b_req,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic              a_rd_q;
  logic [DATA_W-1:0] a_rdata_q;

  always_ff @(posedge clk) begin
    if (a_req.req && a_req.we) mem[a_req.addr[AW+1:2]] <= a_req.wdata;
    if (b_req && b_we)         mem[b_addr[AW+1:2]]     <= b_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_rd_q <= 1'b0;
    else        a_rd_q <= a_req.req && !a_req.we;
  end

  always_ff @(posedge clk) begin
    a_rdata_q <= mem[a_req.addr[AW+1:2]];
    b_rdata   <= mem[b_addr[AW+1:2]];
  end

  assign a_rsp.gnt    = a_req.req;
  assign a_rsp.rvalid = a_rd_q;
  assign a_rsp.rdata  = a_rdata_q;
endmodule
