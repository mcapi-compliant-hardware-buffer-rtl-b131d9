// Credit Manager (CM): credit-based flow control between a sending port
// and the FIFO of its remote receiving port. One credit is one free 32-bit
// word in the remote FIFO.
//
// Sending side: holds the Credit Table. The CPU sets a port's initial
// credits (the remote FIFO size) at set-up; a completed write request of
// the BMI subtracts its words; a received PKT_CREDIT packet adds its count.
// Receiving side: every word the BMR takes out of a port's FIFO adds one to
// that port's pending credits. The pending credits of a port are sent back
// (one PKT_CREDIT packet to the remote cluster and port found in the
// Connection Table) when a read request on the port completes, or as soon as
// they reach the programmable threshold (threshold 0 disables this). Ports
// waiting to send are served lowest port first, one packet at a time.
// When/why credits move is the document's; the pending-credit counters, the
// flag scan and the packet format are this design's.
module bmm_cm
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 256,
  parameter int unsigned NUM_CPUS  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_credit_en,
  input  logic                 cfg_thr_en,
  input  logic [PORT_W-1:0]    cfg_port,
  input  logic [DATA_W-1:0]    cfg_val,
  input  logic [PORT_W-1:0]    rd_port,
  output logic [CREDIT_W-1:0]  rd_credit,
  input  logic [PORT_W-1:0]    q_port   [NUM_CPUS],
  output logic [CREDIT_W-1:0]  q_credit [NUM_CPUS],
  input  logic                 dec_en,
  input  logic [PORT_W-1:0]    dec_port,
  input  logic [LEN_W-1:0]     dec_n,
  input  logic                 consume,
  input  logic                 rd_done,
  input  logic [PORT_W-1:0]    rd_port_id,
  input  logic                 cr_valid,
  input  flit_t                cr_flit,
  output logic [PORT_W-1:0]    conn_port,
  input  logic [CLUSTER_W-1:0] conn_rcluster,
  input  logic [PORT_W-1:0]    conn_rport,
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output flit_t                tx_flit
);
  localparam int unsigned IW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  pkt_hdr_t cr_hdr;
  assign cr_hdr = pkt_hdr_t'(cr_flit.data);

  bmm_credit_table #(.NUM_PORTS(NUM_PORTS), .NQ(NUM_CPUS)) u_credit (
    .clk, .rst_n,
    .set_en  (cfg_credit_en),
    .set_port(cfg_port),
    .set_val (CREDIT_W'(cfg_val)),
    .inc_en  (cr_valid && cr_hdr.typ == PKT_CREDIT),
    .inc_port(cr_hdr.port),
    .inc_n   (cr_hdr.len),
    .dec_en, .dec_port, .dec_n,
    .q_port, .q_credit,
    .rd_port, .rd_credit
  );

  logic [LEN_W-1:0]     threshold;
  logic [LEN_W-1:0]     pending [NUM_PORTS];
  logic [NUM_PORTS-1:0] flag;

  logic              busy;
  logic [PORT_W-1:0] cur;
  logic              any_flag;
  logic [PORT_W-1:0] first_flag;

  always_comb begin
    any_flag   = 1'b0;
    first_flag = '0;
    for (int i = NUM_PORTS - 1; i >= 0; i--) begin
      if (flag[i]) begin
        any_flag   = 1'b1;
        first_flag = PORT_W'(i);
      end
    end
  end

  logic [LEN_W-1:0] len_q;  // credits carried by the packet being sent
  logic sent;
  assign sent = busy && (len_q == '0 || tx_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      threshold <= '0;
      busy      <= 1'b0;
      cur       <= '0;
      len_q     <= '0;
      flag      <= '0;
      for (int i = 0; i < NUM_PORTS; i++) pending[i] <= '0;
    end else begin
      if (cfg_thr_en) threshold <= LEN_W'(cfg_val);
      for (int i = 0; i < NUM_PORTS; i++) begin
        automatic logic          add  = consume && IW'(rd_port_id) == IW'(i);
        automatic logic          out  = sent && IW'(cur) == IW'(i);
        automatic logic [LEN_W-1:0] nxt = pending[i] - (out ? len_q : '0) + LEN_W'(add);
        pending[i] <= nxt;
        if (add && threshold != '0 && nxt >= threshold) flag[i] <= 1'b1;
        else if (rd_done && IW'(rd_port_id) == IW'(i))   flag[i] <= 1'b1;
        else if (!busy && any_flag && IW'(first_flag) == IW'(i)) flag[i] <= 1'b0;
      end
      if (!busy && any_flag) begin
        busy <= 1'b1;
        cur   <= first_flag;
        len_q <= pending[IW'(first_flag)];
      end else if (sent) begin
        busy <= 1'b0;
      end
    end
  end

  assign conn_port = cur;

  pkt_hdr_t hdr;
  always_comb begin
    hdr.typ     = PKT_CREDIT;
    hdr.cluster = conn_rcluster;
    hdr.port    = conn_rport;
    hdr.len     = len_q;
    tx_valid     = busy && len_q != '0;
    tx_flit.last = 1'b1;
    tx_flit.data = hdr;
  end
endmodule
