// Buffer Manager Read (BMR), the receiving side that empties the FIFOs.
//
// Read requests from each CPU wait in that CPU's queue. A round-robin
// arbiter picks among the queue heads whose port FIFO already holds all the
// words the request asks for (fill count from the Buffer Table). The picked
// request is served alone, one word at a time: read the word at the FIFO's
// read address, pulse `pop` (the table advances the read pointer; the CM
// counts one credit to give back), then
//   indirect request: write it to the target buffer, address rising by 4;
//   direct request:   hand it to the register port (`rd_valid`), which
//                     completes the CPU's waiting bus read.
// At the end `done` tells the CM the read request is complete (which
// returns the credits) and a completion event (CPU, port) is raised.
// Queues, round-robin, FIFO copy and CM notification are the document's;
// the data-available gating and the engine timing (about four cycles per
// word for indirect requests) are this design's.
module bmm_bmr
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_CPUS    = 16,
  parameter int unsigned QUEUE_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                push,
  input  req_t                req,
  output logic [NUM_CPUS-1:0] full,
  output logic [PORT_W-1:0]   q_port  [NUM_CPUS],
  input  logic [FIFO_W-1:0]   q_count [NUM_CPUS],
  output logic [PORT_W-1:0]   r_port,
  input  logic [ADDR_W-1:0]   r_addr,
  output logic                pop,
  output mem_req_t            mem_req,
  input  mem_rsp_t            mem_rsp,
  output logic                rd_valid,
  output logic [CPU_W-1:0]    rd_cpu,
  output logic [DATA_W-1:0]   rd_data,
  output logic                done,
  output event_t              ev
);
  localparam int unsigned CW = (NUM_CPUS > 1) ? $clog2(NUM_CPUS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RWAIT, S_WR, S_RET, S_DONE} state_e;

  req_t                head [NUM_CPUS];
  logic [NUM_CPUS-1:0] empty, qpop, eligible;
  logic                gnt_valid;
  logic [CW-1:0]       gnt_idx;

  state_e            state;
  req_t              cur;
  logic [LEN_W-1:0]  words, idx;
  logic [DATA_W-1:0] data_q;

  for (genvar c = 0; c < NUM_CPUS; c++) begin : g_q
    bmm_fifo #(.T(req_t), .DEPTH(QUEUE_DEPTH)) u_q (
      .clk, .rst_n,
      .push (push && CW'(req.cpu) == CW'(c)),
      .din  (req),
      .pop  (qpop[c]),
      .dout (head[c]),
      .empty(empty[c]),
      .full (full[c])
    );
    assign q_port[c]   = head[c].port;
    assign eligible[c] = !empty[c] && q_count[c] >= FIFO_W'(size_words(head[c].size));
    assign qpop[c]     = state == S_IDLE && gnt_valid && gnt_idx == CW'(c);
  end

  bmm_rr_arbiter #(.N(NUM_CPUS)) u_arb (
    .clk, .rst_n,
    .req      (eligible),
    .advance  (state == S_IDLE),
    .gnt_valid(gnt_valid),
    .gnt_idx  (gnt_idx)
  );

  assign r_port = cur.port;

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
          cur   <= head[gnt_idx];
          words <= size_words(head[gnt_idx].size);
          idx   <= '0;
          state <= (size_words(head[gnt_idx].size) == '0) ? S_DONE : S_RD;
        end
        S_RD:    if (mem_rsp.gnt) state <= S_RWAIT;
        S_RWAIT: if (mem_rsp.rvalid) begin
          data_q <= mem_rsp.rdata;
          state  <= (cur.typ == REQ_DIRECT) ? S_RET : S_WR;
        end
        S_WR: if (mem_rsp.gnt) begin
          idx   <= idx + 1'b1;
          state <= (idx + 1'b1 >= words) ? S_DONE : S_RD;
        end
        S_RET:   state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req = '0;
    if (state == S_RD) begin
      mem_req.req  = 1'b1;
      mem_req.addr = r_addr;
    end else if (state == S_WR) begin
      mem_req.req   = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = cur.w0 + ADDR_W'({idx, 2'b00});
      mem_req.wdata = data_q;
    end
    pop      = (state == S_RWAIT) && mem_rsp.rvalid;
    rd_valid = (state == S_RET);
    rd_cpu   = cur.cpu;
    rd_data  = data_q;
    done     = (state == S_DONE);
    ev.valid = (state == S_DONE);
    ev.cpu   = cur.cpu;
    ev.port  = cur.port;
  end
endmodule
