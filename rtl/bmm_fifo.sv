// Synchronous FIFO used for the per-CPU request queues of BMI and BMR.
// A register array with read and write pointers; push and pop may happen in
// the same cycle. Head data is visible combinationally (first-word
// fall-through). Depth must be a power of two. Pushing when full or popping
// when empty is an error and is flagged by assertions.
module bmm_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic empty,
  output logic full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full)  wr_ptr <= wr_ptr + 1'b1;
      if (pop  && !empty) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  // Checked on the values the flip-flops see at the clock edge.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_overflow:  assert (!(push && full));
      a_no_underflow: assert (!(pop && empty));
    end
  end
endmodule
