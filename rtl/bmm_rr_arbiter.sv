// Round-robin arbiter for the per-CPU request queues of BMI and BMR.
// `req` holds one bit per queue whose head request is eligible (for BMI:
// enough credits; for BMR: enough data in the FIFO), so a queue whose head
// cannot proceed is skipped rather than blocking the others. The grant is
// combinational: the first requester at or after the rotating pointer. When
// `advance` is high the pointer moves to the one after the granted queue,
// giving each CPU equal turns. The round-robin policy and the credit gating
// are the document's; the pointer mechanics are this design's.
module bmm_rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      automatic int unsigned i = (int'(ptr) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    ptr <= '0;
    else if (advance && gnt_valid) ptr <= IW'((int'(gnt_idx) + 1) % N);
  end
endmodule
