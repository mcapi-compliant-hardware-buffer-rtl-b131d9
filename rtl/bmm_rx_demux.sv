// Splits the packets arriving from the Network Interface: credit packets go
// to the Credit Manager (always accepted), data packets (stream and
// address-based) to the BMW. The destination is decided on the header flit
// and held until the last flit. This design's choice of how the NI output
// reaches the two blocks drawn next to it.
module bmm_rx_demux
  import bmm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx_valid,
  output logic  rx_ready,
  input  flit_t rx_flit,
  output logic  cm_valid,
  output flit_t cm_flit,
  output logic  bmw_valid,
  input  logic  bmw_ready,
  output flit_t bmw_flit
);
  logic     in_pkt, to_cm_q, to_cm;
  pkt_hdr_t hdr;

  assign hdr       = pkt_hdr_t'(rx_flit.data);
  assign to_cm     = in_pkt ? to_cm_q : (hdr.typ == PKT_CREDIT);
  assign cm_valid  = rx_valid && to_cm;
  assign cm_flit   = rx_flit;
  assign bmw_valid = rx_valid && !to_cm;
  assign bmw_flit  = rx_flit;
  assign rx_ready  = to_cm ? 1'b1 : bmw_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt  <= 1'b0;
      to_cm_q <= 1'b0;
    end else if (rx_valid && rx_ready) begin
      in_pkt  <= !rx_flit.last;
      to_cm_q <= to_cm;
    end
  end
endmodule
