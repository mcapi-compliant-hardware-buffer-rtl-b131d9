// Memory port arbiter of the BMM. The BMI (source reads), the BMW (FIFO
// and destination writes) and the BMR (FIFO reads, target writes) share the
// one memory port of the cluster; a round-robin arbiter grants one request
// per cycle. The owner of a granted read is remembered so that the read
// data, which returns one cycle later, reaches the right engine. The
// document does not describe how the blocks share memory; this is this
// design's choice.
module bmm_mem_arbiter
  import bmm_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t m_req [N],
  output mem_rsp_t m_rsp [N],
  output mem_req_t s_req,
  input  mem_rsp_t s_rsp
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  reqv;
  logic          gnt_valid;
  logic [IW-1:0] gnt_idx, rd_owner;

  always_comb begin
    for (int i = 0; i < N; i++) reqv[i] = m_req[i].req;
  end

  bmm_rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req      (reqv),
    .advance  (s_rsp.gnt),
    .gnt_valid(gnt_valid),
    .gnt_idx  (gnt_idx)
  );

  always_comb begin
    s_req = gnt_valid ? m_req[gnt_idx] : '0;
    for (int i = 0; i < N; i++) begin
      m_rsp[i].gnt    = s_rsp.gnt && gnt_valid && gnt_idx == IW'(i);
      m_rsp[i].rvalid = s_rsp.rvalid && rd_owner == IW'(i);
      m_rsp[i].rdata  = s_rsp.rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                        rd_owner <= '0;
    else if (gnt_valid && s_rsp.gnt && !s_req.we)      rd_owner <= gnt_idx;
  end
endmodule
