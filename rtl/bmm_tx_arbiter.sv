// Packet arbiter in front of the Network Interface: the BMI (data packets)
// and the CM (credit packets) share the one output to the NoC. Sources take
// round-robin turns per packet; once the first flit of a packet has been
// accepted the source keeps the output until its last flit. This design's
// choice; the document only shows both blocks connected to the NI.
module bmm_tx_arbiter
  import bmm_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  output logic [N-1:0]  in_ready,
  input  flit_t         in_flit [N],
  output logic          out_valid,
  input  logic          out_ready,
  output flit_t         out_flit
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [IW-1:0] owner, sel;
  logic          gnt_valid;
  logic [IW-1:0] gnt_idx;

  bmm_rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req      (in_valid),
    .advance  (!locked && out_valid && out_ready),
    .gnt_valid(gnt_valid),
    .gnt_idx  (gnt_idx)
  );

  assign sel       = locked ? owner : gnt_idx;
  assign out_valid = locked ? in_valid[owner] : gnt_valid;
  assign out_flit  = in_flit[sel];
  always_comb begin
    in_ready = '0;
    in_ready[sel] = out_ready && out_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else if (out_valid && out_ready) begin
      locked <= !out_flit.last;
      owner  <= sel;
    end
  end
endmodule
