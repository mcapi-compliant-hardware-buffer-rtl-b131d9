// Buffer Table: for each port, the circular FIFO it owns in the cluster
// Shared Memory: base byte address, size in words, write pointer, read
// pointer and fill count, held in registers as in the document.
// The BMW writes a word at `w_addr` (base + 4*write pointer) and pulses
// `push`; the BMR reads a word at `r_addr` (base + 4*read pointer) and
// pulses `pop`. Pointers wrap at the size. Push and pop may come in the
// same cycle, on the same or different ports. Writing the size of a port
// (set-up) clears its pointers and count. NQ query ports give the fill
// count of the port at each BMR queue head, used to select only read
// requests whose data has arrived. Storing a fill count next to the two
// pointers is this design's choice; it tells a full FIFO from an empty one.
module bmm_buffer_table
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 256,
  parameter int unsigned NQ        = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_base_en,
  input  logic                  cfg_size_en,
  input  logic [PORT_W-1:0]     cfg_port,
  input  logic [ADDR_W-1:0]     cfg_val,
  input  logic [PORT_W-1:0]     w_port,
  output logic [ADDR_W-1:0]     w_addr,
  input  logic                  push,
  input  logic [PORT_W-1:0]     r_port,
  output logic [ADDR_W-1:0]     r_addr,
  input  logic                  pop,
  input  logic [PORT_W-1:0]     q_port  [NQ],
  output logic [FIFO_W-1:0]     q_count [NQ],
  input  logic [PORT_W-1:0]     rd_port,
  output logic [FIFO_W-1:0]     rd_count
);
  localparam int unsigned IW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  logic [ADDR_W-1:0] base   [NUM_PORTS];
  logic [FIFO_W-1:0] size   [NUM_PORTS];
  logic [FIFO_W-1:0] wr_ptr [NUM_PORTS];
  logic [FIFO_W-1:0] rd_ptr [NUM_PORTS];
  logic [FIFO_W-1:0] count  [NUM_PORTS];

  function automatic logic [FIFO_W-1:0] wrap_inc(logic [FIFO_W-1:0] p, logic [FIFO_W-1:0] sz);
    return (p + 1'b1 >= sz) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        base[i]   <= '0;
        size[i]   <= '0;
        wr_ptr[i] <= '0;
        rd_ptr[i] <= '0;
        count[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        automatic logic do_push = push && IW'(w_port) == IW'(i);
        automatic logic do_pop  = pop  && IW'(r_port) == IW'(i);
        if (cfg_base_en && IW'(cfg_port) == IW'(i)) base[i] <= cfg_val;
        if (cfg_size_en && IW'(cfg_port) == IW'(i)) begin
          size[i]   <= FIFO_W'(cfg_val);
          wr_ptr[i] <= '0;
          rd_ptr[i] <= '0;
          count[i]  <= '0;
        end else begin
          if (do_push) wr_ptr[i] <= wrap_inc(wr_ptr[i], size[i]);
          if (do_pop)  rd_ptr[i] <= wrap_inc(rd_ptr[i], size[i]);
          count[i] <= count[i] + FIFO_W'(do_push) - FIFO_W'(do_pop);
        end
      end
    end
  end

  assign w_addr = base[IW'(w_port)] + ADDR_W'({wr_ptr[IW'(w_port)], 2'b00});
  assign r_addr = base[IW'(r_port)] + ADDR_W'({rd_ptr[IW'(r_port)], 2'b00});

  always_comb begin
    for (int q = 0; q < NQ; q++) q_count[q] = count[IW'(q_port[q])];
  end
  assign rd_count = count[IW'(rd_port)];

  // Credits must keep the BMW from overfilling a FIFO; the BMR only reads
  // words that are there.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (push) a_no_fifo_overflow: assert (count[IW'(w_port)] < size[IW'(w_port)] ||
                                            (pop && r_port == w_port));
      if (pop)  a_no_fifo_underflow: assert (count[IW'(r_port)] != '0);
    end
  end
endmodule
