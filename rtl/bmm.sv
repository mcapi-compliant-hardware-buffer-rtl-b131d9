// Buffer Manager Mechanism (BMM): a hardware FIFO/channel manager that
// replaces the DMA of a cluster's Communication and Synchronization
// subsystem. Software addresses remote FIFOs only through port IDs; the
// BMM keeps the FIFO pointers, the connections and the flow-control credits
// in hardware, so no pointers cross the network.
//
// Inside: the register-port decoder (Table-I address encoding), the BMI
// (sends write requests), the BMW (writes arriving data into port FIFOs),
// the BMR (serves read requests out of the FIFOs), the CM (credits), the
// Connection, Credit (inside the CM) and Buffer Tables, and three small
// arbiters that share the memory port and the NoC output between the
// engines. One cluster's BMM plays both roles: sender for its outgoing
// connections and receiver for its incoming ones (FIFO on the receiving
// side, so the network only carries remote writes).
//
// Interfaces: CPU register port (sel/we/addr/wdata, ready/rdata); one memory
// master port towards the Shared Memory (mem_req_t/mem_rsp_t); one packet
// port each way to the Network Interface (valid/ready flits); completion
// events for the Event Synchronizer. The block split follows the document;
// all interfaces between blocks are this design's.
module bmm
  import bmm_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 256,
  parameter int unsigned NUM_CPUS    = 16,
  parameter int unsigned QUEUE_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_sel,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_wdata,
  output logic              bus_ready,
  output logic [DATA_W-1:0] bus_rdata,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp,
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  output event_t            ev_send,
  output event_t            ev_recv
);
  // ---------------- register port ----------------
  req_t                dreq;
  logic                bmi_push, bmr_push;
  logic [NUM_CPUS-1:0] bmi_full, bmr_full;
  logic                rd_valid;
  logic [CPU_W-1:0]    rd_cpu;
  logic [DATA_W-1:0]   rd_data;
  logic                cfg_we;
  cfg_sel_e            cfg_sel;
  logic [PORT_W-1:0]   cfg_port;
  logic [DATA_W-1:0]   cfg_wdata, cfg_rdata;
  logic [CREDIT_W-1:0] cfg_credit;
  logic [FIFO_W-1:0]   cfg_fill;

  bmm_req_decoder #(.NUM_CPUS(NUM_CPUS)) u_dec (
    .clk, .rst_n,
    .sel(bus_sel), .we(bus_we), .addr(bus_addr), .wdata(bus_wdata),
    .ready(bus_ready), .rdata(bus_rdata),
    .req(dreq), .bmi_push, .bmi_full, .bmr_push, .bmr_full,
    .rd_valid, .rd_cpu, .rd_data,
    .cfg_we, .cfg_sel, .cfg_port, .cfg_wdata, .cfg_rdata
  );

  always_comb begin
    unique case (cfg_sel)
      CFG_CREDIT: cfg_rdata = DATA_W'(cfg_credit);
      CFG_FILL:   cfg_rdata = DATA_W'(cfg_fill);
      default:    cfg_rdata = '0;
    endcase
  end

  // ---------------- tables ----------------
  logic [PORT_W-1:0]    bmi_conn_port, cm_conn_port;
  logic [CLUSTER_W-1:0] bmi_rcluster, cm_rcluster;
  logic [PORT_W-1:0]    bmi_rport, cm_rport;

  bmm_conn_table #(.NUM_PORTS(NUM_PORTS)) u_conn (
    .clk, .rst_n,
    .cfg_we      (cfg_we && cfg_sel == CFG_CONN),
    .cfg_port,
    .cfg_rcluster(cfg_wdata[15:8]),
    .cfg_rport   (cfg_wdata[7:0]),
    .a_port(bmi_conn_port), .a_rcluster(bmi_rcluster), .a_rport(bmi_rport),
    .b_port(cm_conn_port),  .b_rcluster(cm_rcluster),  .b_rport(cm_rport)
  );

  logic [PORT_W-1:0] bmw_port, bmr_port;
  logic [ADDR_W-1:0] bmw_addr, bmr_addr;
  logic              bt_push, bt_pop;
  logic [PORT_W-1:0] bmr_q_port  [NUM_CPUS];
  logic [FIFO_W-1:0] bmr_q_count [NUM_CPUS];

  bmm_buffer_table #(.NUM_PORTS(NUM_PORTS), .NQ(NUM_CPUS)) u_buf (
    .clk, .rst_n,
    .cfg_base_en(cfg_we && cfg_sel == CFG_BUF_BASE),
    .cfg_size_en(cfg_we && cfg_sel == CFG_BUF_SIZE),
    .cfg_port, .cfg_val(cfg_wdata),
    .w_port(bmw_port), .w_addr(bmw_addr), .push(bt_push),
    .r_port(bmr_port), .r_addr(bmr_addr), .pop(bt_pop),
    .q_port(bmr_q_port), .q_count(bmr_q_count),
    .rd_port(cfg_port), .rd_count(cfg_fill)
  );

  // ---------------- engines ----------------
  mem_req_t m_req [3];
  mem_rsp_t m_rsp [3];

  logic [PORT_W-1:0]   bmi_q_port   [NUM_CPUS];
  logic [CREDIT_W-1:0] bmi_q_credit [NUM_CPUS];
  logic                dec_en;
  logic [PORT_W-1:0]   dec_port;
  logic [LEN_W-1:0]    dec_n;
  logic [1:0]          src_valid, src_ready;
  flit_t               src_flit [2];

  bmm_bmi #(.NUM_CPUS(NUM_CPUS), .QUEUE_DEPTH(QUEUE_DEPTH)) u_bmi (
    .clk, .rst_n,
    .push(bmi_push), .req(dreq), .full(bmi_full),
    .q_port(bmi_q_port), .q_credit(bmi_q_credit),
    .conn_port(bmi_conn_port), .conn_rcluster(bmi_rcluster), .conn_rport(bmi_rport),
    .dec_en, .dec_port, .dec_n,
    .mem_req(m_req[0]), .mem_rsp(m_rsp[0]),
    .tx_valid(src_valid[0]), .tx_ready(src_ready[0]), .tx_flit(src_flit[0]),
    .ev(ev_send)
  );

  logic  cm_rx_valid, bmw_rx_valid, bmw_rx_ready;
  flit_t cm_rx_flit, bmw_rx_flit;

  bmm_rx_demux u_demux (
    .clk, .rst_n,
    .rx_valid, .rx_ready, .rx_flit,
    .cm_valid(cm_rx_valid), .cm_flit(cm_rx_flit),
    .bmw_valid(bmw_rx_valid), .bmw_ready(bmw_rx_ready), .bmw_flit(bmw_rx_flit)
  );

  bmm_bmw u_bmw (
    .clk, .rst_n,
    .rx_valid(bmw_rx_valid), .rx_ready(bmw_rx_ready), .rx_flit(bmw_rx_flit),
    .w_port(bmw_port), .w_addr(bmw_addr), .push(bt_push),
    .mem_req(m_req[1]), .mem_rsp(m_rsp[1])
  );

  logic bmr_done;

  bmm_bmr #(.NUM_CPUS(NUM_CPUS), .QUEUE_DEPTH(QUEUE_DEPTH)) u_bmr (
    .clk, .rst_n,
    .push(bmr_push), .req(dreq), .full(bmr_full),
    .q_port(bmr_q_port), .q_count(bmr_q_count),
    .r_port(bmr_port), .r_addr(bmr_addr), .pop(bt_pop),
    .mem_req(m_req[2]), .mem_rsp(m_rsp[2]),
    .rd_valid, .rd_cpu, .rd_data,
    .done(bmr_done), .ev(ev_recv)
  );

  bmm_cm #(.NUM_PORTS(NUM_PORTS), .NUM_CPUS(NUM_CPUS)) u_cm (
    .clk, .rst_n,
    .cfg_credit_en(cfg_we && cfg_sel == CFG_CREDIT),
    .cfg_thr_en   (cfg_we && cfg_sel == CFG_THRESHOLD),
    .cfg_port, .cfg_val(cfg_wdata),
    .rd_port(cfg_port), .rd_credit(cfg_credit),
    .q_port(bmi_q_port), .q_credit(bmi_q_credit),
    .dec_en, .dec_port, .dec_n,
    .consume(bt_pop), .rd_done(bmr_done), .rd_port_id(bmr_port),
    .cr_valid(cm_rx_valid), .cr_flit(cm_rx_flit),
    .conn_port(cm_conn_port), .conn_rcluster(cm_rcluster), .conn_rport(cm_rport),
    .tx_valid(src_valid[1]), .tx_ready(src_ready[1]), .tx_flit(src_flit[1])
  );

  bmm_mem_arbiter #(.N(3)) u_marb (
    .clk, .rst_n, .m_req, .m_rsp, .s_req(mem_req), .s_rsp(mem_rsp)
  );

  bmm_tx_arbiter #(.N(2)) u_tarb (
    .clk, .rst_n,
    .in_valid(src_valid), .in_ready(src_ready), .in_flit(src_flit),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_flit(tx_flit)
  );
endmodule
