// Buffer Manager Write (BMW), the receiving side that fills the FIFOs.
//
// Takes data packets from the Network Interface. For a PKT_STREAM packet it
// looks up the target port in the Buffer Table and writes each data word at
// that FIFO's write address, pulsing `push` so the table advances the write
// pointer and the fill count. For a PKT_ADDR packet (address-based transfer)
// it writes the words from the destination address upward. A flit is
// accepted in the cycle its memory write is granted, so a stalled memory
// back-pressures the network. Because the sender spends credits before
// sending, the FIFO always has room; the Buffer Table asserts this.
// Filling the FIFO of the target port is the document's; the flit-level
// handshake is this design's.
module bmm_bmw
  import bmm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  output logic [PORT_W-1:0] w_port,
  input  logic [ADDR_W-1:0] w_addr,
  output logic              push,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp
);
  typedef enum logic [1:0] {S_HDR, S_DADDR, S_DATA} state_e;

  state_e            state;
  logic              is_stream;
  logic [PORT_W-1:0] port_q;
  logic [ADDR_W-1:0] addr_q;
  pkt_hdr_t          hdr;

  assign hdr    = pkt_hdr_t'(rx_flit.data);
  assign w_port = port_q;

  always_comb begin
    mem_req  = '0;
    rx_ready = 1'b0;
    push     = 1'b0;
    unique case (state)
      S_HDR, S_DADDR: rx_ready = 1'b1;
      S_DATA: begin
        mem_req.req   = rx_valid;
        mem_req.we    = 1'b1;
        mem_req.addr  = is_stream ? w_addr : addr_q;
        mem_req.wdata = rx_flit.data;
        rx_ready      = mem_rsp.gnt;
        push          = rx_valid && mem_rsp.gnt && is_stream;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      is_stream <= 1'b0;
      port_q    <= '0;
      addr_q    <= '0;
    end else if (rx_valid && rx_ready) begin
      unique case (state)
        S_HDR: begin
          is_stream <= (hdr.typ == PKT_STREAM);
          port_q    <= hdr.port;
          if (!rx_flit.last) state <= (hdr.typ == PKT_ADDR) ? S_DADDR : S_DATA;
        end
        S_DADDR: begin
          addr_q <= rx_flit.data;
          if (!rx_flit.last) state <= S_DATA;
          else               state <= S_HDR;
        end
        S_DATA: begin
          addr_q <= addr_q + 32'd4;
          if (rx_flit.last) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
