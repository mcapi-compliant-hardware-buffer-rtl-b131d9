// Request decoder of the BMM's memory-mapped register port.
//
// A CPU builds a request by writing to an address whose bits carry the
// request itself: bit 19 = 1 write (send) request / 0 read (receive)
// request, bits 18..17 the type, bit 16 = end of request, bits 15..8 the
// local port, bits 7..4 the CPU ID. Words written with bit 16 clear are
// staged per CPU; the write with bit 16 set completes the request and
// pushes it into that CPU's queue in the BMI (write requests) or the BMR
// (read requests). The bus waits (ready low) while that queue is full.
//   address-based write : src address, dst address, size in bytes (3 writes)
//   indirect write/read : buffer address, size in bytes (2 writes)
//   direct write        : the data word (1 write)
//   direct read         : one bus read; it waits until the BMR returns the
//                         next word of the port's FIFO
// Type 2'b11 reaches the configuration of the tables: bits 7..4 then select
// the field (see bmm_pkg::cfg_sel_e), bits 15..8 the port; a read returns
// `cfg_rdata`. The address layout and the write counts are the document's;
// the bit polarities, type codes and configuration window are this design's.
//
// Bus: the master holds sel/we/addr/wdata until ready is high for a cycle;
// read data is valid in that cycle.
module bmm_req_decoder
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_CPUS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sel,
  input  logic                we,
  input  logic [ADDR_W-1:0]   addr,
  input  logic [DATA_W-1:0]   wdata,
  output logic                ready,
  output logic [DATA_W-1:0]   rdata,
  output req_t                req,
  output logic                bmi_push,
  input  logic [NUM_CPUS-1:0] bmi_full,
  output logic                bmr_push,
  input  logic [NUM_CPUS-1:0] bmr_full,
  input  logic                rd_valid,
  input  logic [CPU_W-1:0]    rd_cpu,
  input  logic [DATA_W-1:0]   rd_data,
  output logic                cfg_we,
  output cfg_sel_e            cfg_sel,
  output logic [PORT_W-1:0]   cfg_port,
  output logic [DATA_W-1:0]   cfg_wdata,
  input  logic [DATA_W-1:0]   cfg_rdata
);
  localparam int unsigned CW = (NUM_CPUS > 1) ? $clog2(NUM_CPUS) : 1;

  logic              a_rw, a_end;
  req_type_e         a_typ;
  logic [PORT_W-1:0] a_port;
  logic [CPU_W-1:0]  a_cpu;
  logic [CW-1:0]     qi;

  assign a_rw   = addr[A_RW];
  assign a_typ  = req_type_e'(addr[A_TYPE_LO +: 2]);
  assign a_end  = addr[A_END];
  assign a_port = addr[A_PORT_LO +: PORT_W];
  assign a_cpu  = addr[A_CPU_LO +: CPU_W];
  assign qi     = CW'(a_cpu);

  logic [1:0]        stage_cnt [NUM_CPUS];
  logic [ADDR_W-1:0] stage_w0  [NUM_CPUS];
  logic [ADDR_W-1:0] stage_w1  [NUM_CPUS];
  logic              rd_pending;

  assign cfg_sel   = cfg_sel_e'(a_cpu);
  assign cfg_port  = a_port;
  assign cfg_wdata = wdata;

  always_comb begin
    req.typ  = a_typ;
    req.port = a_port;
    req.cpu  = a_cpu;
    req.w0   = (a_typ == REQ_DIRECT) ? wdata : stage_w0[qi];
    req.w1   = stage_w1[qi];
    req.size = (a_typ == REQ_DIRECT) ? SIZE_W'(4) : wdata[SIZE_W-1:0];
  end

  logic direct_rd;
  assign direct_rd = sel && !we && a_typ == REQ_DIRECT && !a_rw;

  always_comb begin
    ready    = 1'b0;
    rdata    = '0;
    bmi_push = 1'b0;
    bmr_push = 1'b0;
    cfg_we   = 1'b0;
    if (sel) begin
      if (a_typ == REQ_CONFIG) begin
        ready  = 1'b1;
        cfg_we = we;
        rdata  = we ? '0 : cfg_rdata;
      end else if (we) begin
        if (!a_end) begin
          ready = 1'b1;
        end else if (a_rw) begin
          bmi_push = !bmi_full[qi];
          ready    = !bmi_full[qi];
        end else if (a_typ == REQ_INDIRECT) begin
          bmr_push = !bmr_full[qi];
          ready    = !bmr_full[qi];
        end else begin
          ready = 1'b1;  // no such receive request: ignored
        end
      end else if (direct_rd) begin
        bmr_push = !rd_pending && !bmr_full[qi];
        if (rd_pending && rd_valid && rd_cpu == a_cpu) begin
          ready = 1'b1;
          rdata = rd_data;
        end
      end else begin
        ready = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      for (int i = 0; i < NUM_CPUS; i++) begin
        stage_cnt[i] <= '0;
        stage_w0[i]  <= '0;
        stage_w1[i]  <= '0;
      end
    end else begin
      if (bmr_push && direct_rd) rd_pending <= 1'b1;
      else if (direct_rd && ready) rd_pending <= 1'b0;
      if (sel && we && a_typ != REQ_CONFIG) begin
        if (!a_end) begin
          if (stage_cnt[qi] == 2'd0) stage_w0[qi] <= wdata;
          else                       stage_w1[qi] <= wdata;
          stage_cnt[qi] <= (stage_cnt[qi] == 2'd2) ? 2'd2 : stage_cnt[qi] + 2'd1;
        end else if (ready) begin
          stage_cnt[qi] <= '0;
        end
      end
    end
  end

  // Bus rule: a request that was not accepted stays on the bus unchanged.
  logic              stall_q;
  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall_q <= 1'b0;
      we_q    <= 1'b0;
      addr_q  <= '0;
    end else begin
      stall_q <= sel && !ready;
      we_q    <= we;
      addr_q  <= addr;
      if (stall_q) a_bus_hold: assert (sel && addr == addr_q && we == we_q);
    end
  end
endmodule
