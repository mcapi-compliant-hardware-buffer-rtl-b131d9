// Buffer Manager Interface (BMI), the sending side of the BMM.
//
// Write requests from each CPU wait in that CPU's queue. A round-robin
// arbiter picks among the queue heads that may proceed: a stream request
// only if the Credit Table holds at least as many credits as it has words
// (one credit = one free 32-bit word in the remote FIFO); an address-based
// request always. The picked request is served alone:
//   stream (direct or indirect): the Connection Table gives the remote
//     cluster and port; a PKT_STREAM header and the data words are sent.
//     A direct request carries its word; an indirect one reads its words
//     from memory at the source address.
//   address-based: a PKT_ADDR header, the destination address and the
//     words read from the source address; routed by the destination
//     address's cluster bits 31..24.
// When the last flit has left, the credits of a stream request are
// subtracted (CM credit update on completion) and a completion event
// (CPU, port) is raised for the Event Synchronizer; only then is the next
// request picked, so the credit check always sees up-to-date credits.
// Request types, queues, round-robin and credit gating are the document's;
// the packet format and the one-word-at-a-time engine (a memory read, then a
// flit, about three cycles per word) are this design's.
module bmm_bmi
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_CPUS    = 16,
  parameter int unsigned QUEUE_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  req_t                 req,
  output logic [NUM_CPUS-1:0]  full,
  output logic [PORT_W-1:0]    q_port   [NUM_CPUS],
  input  logic [CREDIT_W-1:0]  q_credit [NUM_CPUS],
  output logic [PORT_W-1:0]    conn_port,
  input  logic [CLUSTER_W-1:0] conn_rcluster,
  input  logic [PORT_W-1:0]    conn_rport,
  output logic                 dec_en,
  output logic [PORT_W-1:0]    dec_port,
  output logic [LEN_W-1:0]     dec_n,
  output mem_req_t             mem_req,
  input  mem_rsp_t             mem_rsp,
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output flit_t                tx_flit,
  output event_t               ev
);
  localparam int unsigned CW = (NUM_CPUS > 1) ? $clog2(NUM_CPUS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DADDR, S_RD, S_RWAIT, S_SEND, S_DONE} state_e;

  req_t              head  [NUM_CPUS];
  logic [NUM_CPUS-1:0] empty, pop, eligible;
  logic              gnt_valid;
  logic [CW-1:0]     gnt_idx;

  state_e            state;
  req_t              cur;
  logic [LEN_W-1:0]  words, idx;
  logic [DATA_W-1:0] data_q;

  for (genvar c = 0; c < NUM_CPUS; c++) begin : g_q
    bmm_fifo #(.T(req_t), .DEPTH(QUEUE_DEPTH)) u_q (
      .clk, .rst_n,
      .push (push && CW'(req.cpu) == CW'(c)),
      .din  (req),
      .pop  (pop[c]),
      .dout (head[c]),
      .empty(empty[c]),
      .full (full[c])
    );
    assign q_port[c]   = head[c].port;
    assign eligible[c] = !empty[c] &&
                         (head[c].typ == REQ_ADDR ||
                          q_credit[c] >= CREDIT_W'(size_words(head[c].size)));
    assign pop[c]      = state == S_IDLE && gnt_valid && gnt_idx == CW'(c);
  end

  bmm_rr_arbiter #(.N(NUM_CPUS)) u_arb (
    .clk, .rst_n,
    .req      (eligible),
    .advance  (state == S_IDLE),
    .gnt_valid(gnt_valid),
    .gnt_idx  (gnt_idx)
  );

  assign conn_port = cur.port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cur    <= '0;
      words  <= '0;
      idx    <= '0;
      data_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (gnt_valid) begin
          cur    <= head[gnt_idx];
          words  <= size_words(head[gnt_idx].size);
          idx    <= '0;
          data_q <= head[gnt_idx].w0;
          state  <= S_HDR;
        end
        S_HDR: if (tx_ready) begin
          if (cur.typ == REQ_ADDR)        state <= S_DADDR;
          else if (cur.typ == REQ_DIRECT) state <= S_SEND;
          else if (words == '0)           state <= S_DONE;
          else                            state <= S_RD;
        end
        S_DADDR: if (tx_ready) state <= (words == '0) ? S_DONE : S_RD;
        S_RD:    if (mem_rsp.gnt) state <= S_RWAIT;
        S_RWAIT: if (mem_rsp.rvalid) begin
          data_q <= mem_rsp.rdata;
          state  <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          idx   <= idx + 1'b1;
          state <= (idx + 1'b1 >= words) ? S_DONE : S_RD;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  pkt_hdr_t hdr;
  always_comb begin
    hdr.typ     = (cur.typ == REQ_ADDR) ? PKT_ADDR : PKT_STREAM;
    hdr.cluster = (cur.typ == REQ_ADDR) ? cur.w1[ADDR_W-1 -: CLUSTER_W] : conn_rcluster;
    hdr.port    = (cur.typ == REQ_ADDR) ? '0 : conn_rport;
    hdr.len     = words;

    tx_valid = 1'b0;
    tx_flit  = '0;
    unique case (state)
      S_HDR: begin
        tx_valid     = 1'b1;
        tx_flit.data = hdr;
        tx_flit.last = (cur.typ == REQ_INDIRECT) && words == '0;
      end
      S_DADDR: begin
        tx_valid     = 1'b1;
        tx_flit.data = cur.w1;
        tx_flit.last = (words == '0);
      end
      S_SEND: begin
        tx_valid     = 1'b1;
        tx_flit.data = data_q;
        tx_flit.last = (idx + 1'b1 >= words);
      end
      default: ;
    endcase

    mem_req       = '0;
    mem_req.req   = (state == S_RD);
    mem_req.addr  = cur.w0 + ADDR_W'({idx, 2'b00});

    dec_en   = (state == S_DONE) && cur.typ != REQ_ADDR;
    dec_port = cur.port;
    dec_n    = words;

    ev.valid = (state == S_DONE);
    ev.cpu   = cur.cpu;
    ev.port  = cur.port;
  end

  // Packet port rule: a flit offered and not taken stays offered unchanged.
  logic  tx_wait_q;
  flit_t tx_flit_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_wait_q <= 1'b0;
      tx_flit_q <= '0;
    end else begin
      tx_wait_q <= tx_valid && !tx_ready;
      tx_flit_q <= tx_flit;
      if (tx_wait_q) a_tx_hold: assert (tx_valid && tx_flit == tx_flit_q);
    end
  end
endmodule
