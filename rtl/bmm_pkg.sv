// Shared types and constants of the Buffer Manager Mechanism (BMM).
//
// The CPU reaches the BMM through memory-mapped registers; the register
// address itself carries the request (layout below, bits 22..4). Bits
// 22..20 = 3'b011 select the BMM, bit 19 is read/write, bits 18..17 the
// request type, bit 16 marks the last write of a request, bits 15..8 the
// local port ID and bits 7..4 the CPU ID. This layout is the document's.
// The polarity of bit 19, the type codes, the use of type code 2'b11 for
// table configuration and the NoC packet format are this design's own.
//
// NoC packet format (own choice): a packet is a sequence of 32-bit flits;
// the first flit is a header {type[31:30], dst cluster[29:22], port[21:14],
// len[13:0]} and the last flit carries last=1.
//   PKT_ADDR   : header, destination byte address, len data words
//   PKT_STREAM : header, len data words for the target port's FIFO
//   PKT_CREDIT : header only, len = credits returned to the target port
package bmm_pkg;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned PORT_W    = 8;   // port ID, address bits 15..8
  localparam int unsigned CPU_W     = 4;   // CPU ID, address bits 7..4
  localparam int unsigned CLUSTER_W = 8;   // cluster ID, global address bits 31..24
  localparam int unsigned LEN_W     = 14;  // packet length / credits in words
  localparam int unsigned SIZE_W    = 16;  // transfer size in bytes
  localparam int unsigned CREDIT_W  = 16;  // credit counter width (words)
  localparam int unsigned FIFO_W    = 14;  // FIFO pointer / size width (words)

  // Address decoding of a request (Table I)
  localparam logic [2:0] BMM_SEL   = 3'b011;  // address bits 22..20
  localparam logic [2:0] ES_SEL    = 3'b100;  // Event Synchronizer window
  localparam int unsigned A_SEL_LO  = 20;
  localparam int unsigned A_RW      = 19;
  localparam int unsigned A_TYPE_LO = 17;
  localparam int unsigned A_END     = 16;
  localparam int unsigned A_PORT_LO = 8;
  localparam int unsigned A_CPU_LO  = 4;

  typedef enum logic [1:0] {
    REQ_ADDR     = 2'b00,  // address-based (DMA-like) transfer
    REQ_DIRECT   = 2'b01,  // direct stream: one 32-bit word
    REQ_INDIRECT = 2'b10,  // indirect stream: a buffer of words
    REQ_CONFIG   = 2'b11   // table configuration
  } req_type_e;

  // Configuration field, selected by address bits 7..4 when type = REQ_CONFIG
  typedef enum logic [3:0] {
    CFG_CONN      = 4'd0,  // wdata[15:8] remote cluster, wdata[7:0] remote port
    CFG_CREDIT    = 4'd1,  // credits of the local port
    CFG_BUF_BASE  = 4'd2,  // FIFO base byte address
    CFG_BUF_SIZE  = 4'd3,  // FIFO size in words; clears pointers
    CFG_THRESHOLD = 4'd4,  // credit return threshold (0 = only at request end)
    CFG_FILL      = 4'd5   // read only: words held in the port's FIFO
  } cfg_sel_e;

  typedef struct packed {
    req_type_e           typ;
    logic [PORT_W-1:0]   port;
    logic [CPU_W-1:0]    cpu;
    logic [ADDR_W-1:0]   w0;    // source/target buffer address or direct data
    logic [ADDR_W-1:0]   w1;    // destination address (address-based)
    logic [SIZE_W-1:0]   size;  // bytes
  } req_t;

  typedef enum logic [1:0] {
    PKT_ADDR   = 2'd0,
    PKT_STREAM = 2'd1,
    PKT_CREDIT = 2'd2
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e              typ;
    logic [CLUSTER_W-1:0]   cluster;
    logic [PORT_W-1:0]      port;
    logic [LEN_W-1:0]       len;
  } pkt_hdr_t;

  typedef struct packed {
    logic              last;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Memory master port: req held until gnt; read data one cycle after gnt
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;  // byte address
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  typedef struct packed {
    logic             valid;
    logic [CPU_W-1:0] cpu;
    logic [PORT_W-1:0] port;
  } event_t;

  function automatic logic [LEN_W-1:0] size_words(logic [SIZE_W-1:0] bytes);
    return LEN_W'(bytes >> 2);
  endfunction

endpackage
