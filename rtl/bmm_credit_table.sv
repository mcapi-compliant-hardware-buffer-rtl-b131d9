// Credit Table: number of credits (free 32-bit words in the remote FIFO)
// available to each local port, held in registers as in the document.
// Three updates may hit the table in one cycle: a configuration write sets
// a port's credits (set-up phase), a received credit packet adds `inc_n`,
// and a completed write request subtracts `dec_n`. Additions and
// subtractions on the same port combine. The configuration write takes
// precedence over both. NQ combinational query ports (one per CPU queue of
// the BMI) report the credits of the port at each queue head.
module bmm_credit_table
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 256,
  parameter int unsigned NQ        = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    set_en,
  input  logic [PORT_W-1:0]       set_port,
  input  logic [CREDIT_W-1:0]     set_val,
  input  logic                    inc_en,
  input  logic [PORT_W-1:0]       inc_port,
  input  logic [LEN_W-1:0]        inc_n,
  input  logic                    dec_en,
  input  logic [PORT_W-1:0]       dec_port,
  input  logic [LEN_W-1:0]        dec_n,
  input  logic [PORT_W-1:0]       q_port   [NQ],
  output logic [CREDIT_W-1:0]     q_credit [NQ],
  input  logic [PORT_W-1:0]       rd_port,
  output logic [CREDIT_W-1:0]     rd_credit
);
  localparam int unsigned IW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  logic [CREDIT_W-1:0] credit [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PORTS; i++) credit[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (set_en && IW'(set_port) == IW'(i)) begin
          credit[i] <= set_val;
        end else begin
          credit[i] <= credit[i]
                     + ((inc_en && IW'(inc_port) == IW'(i)) ? CREDIT_W'(inc_n) : '0)
                     - ((dec_en && IW'(dec_port) == IW'(i)) ? CREDIT_W'(dec_n) : '0);
        end
      end
    end
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) q_credit[q] = credit[IW'(q_port[q])];
  end
  assign rd_credit = credit[IW'(rd_port)];
endmodule
