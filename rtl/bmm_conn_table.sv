// Connection Table: for each local port, the remote endpoint it is
// connected to (remote cluster ID and remote port ID). Held in registers,
// as the document does. The CPU fills it in the set-up phase through the
// configuration write port; two combinational read ports serve the BMI
// (destination of data packets) and the CM (destination of credit packets).
// Storing the remote cluster next to the remote port is this design's
// choice, needed to route a packet. Reset clears all entries.
module bmm_conn_table
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [PORT_W-1:0]    cfg_port,
  input  logic [CLUSTER_W-1:0] cfg_rcluster,
  input  logic [PORT_W-1:0]    cfg_rport,
  input  logic [PORT_W-1:0]    a_port,
  output logic [CLUSTER_W-1:0] a_rcluster,
  output logic [PORT_W-1:0]    a_rport,
  input  logic [PORT_W-1:0]    b_port,
  output logic [CLUSTER_W-1:0] b_rcluster,
  output logic [PORT_W-1:0]    b_rport
);
  localparam int unsigned IW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  logic [CLUSTER_W-1:0] rcluster [NUM_PORTS];
  logic [PORT_W-1:0]    rport    [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        rcluster[i] <= '0;
        rport[i]    <= '0;
      end
    end else if (cfg_we) begin
      rcluster[IW'(cfg_port)] <= cfg_rcluster;
      rport[IW'(cfg_port)]    <= cfg_rport;
    end
  end

  assign a_rcluster = rcluster[IW'(a_port)];
  assign a_rport    = rport[IW'(a_port)];
  assign b_rcluster = rcluster[IW'(b_port)];
  assign b_rport    = rport[IW'(b_port)];
endmodule
