// ni_pkg: constants and types shared by the network interface (NI) modules.
//
// The NI joins a WISHBONE node bus to a virtual-channel wormhole NoC. A bus
// transaction becomes a message; the NI turns each message into one packet
// of flits (head flit = header, body/tail flits = one 64-bit data word each)
// and back again.
//
// Sizes that follow the document's main configuration: 3 virtual networks,
// 2 virtual channels per virtual network, 64-bit link and bus, router input
// buffers of 4 flits, a 6-message Message Queue and a 4-packet Packet
// Buffer. The header layout, the message types, the node-id and address
// widths and the mapping of message types onto virtual networks are this
// design's own choices.
package ni_pkg;

  // Network configuration.
  localparam int unsigned NUM_VNET      = 3;   // virtual networks
  localparam int unsigned VC_PER_VNET   = 2;   // virtual channels per vnet
  localparam int unsigned NUM_VC        = NUM_VNET * VC_PER_VNET;
  localparam int unsigned VC_W          = $clog2(NUM_VC);
  localparam int unsigned VNET_W        = $clog2(NUM_VNET);
  localparam int unsigned FLIT_W        = 64;  // link width
  localparam int unsigned ROUTER_BUF    = 4;   // router input buffer depth (flits)

  // Bus configuration.
  localparam int unsigned BUS_W         = 64;  // WISHBONE data width
  localparam int unsigned ADDR_W        = 32;  // WISHBONE byte address width
  localparam int unsigned SEL_W         = BUS_W / 8;

  // Message / packet sizes. The longest message is one cache line of
  // 64 bytes, i.e. 8 bus words; its packet is 1 head + 8 data flits.
  localparam int unsigned MAX_WORDS     = 8;
  localparam int unsigned MAX_PKT_FLITS = MAX_WORDS + 1;
  localparam int unsigned LEN_W         = $clog2(MAX_WORDS + 1);
  localparam int unsigned FLITCNT_W     = $clog2(MAX_PKT_FLITS + 1);
  localparam int unsigned WIDX_W        = $clog2(MAX_WORDS);

  // Node addressing: 64 nodes at most (8x8 mesh). The destination node of a
  // bus access is taken from the top address bits.
  localparam int unsigned NODE_W        = 6;
  localparam int unsigned SEQ_W         = 8;

  // Buffer sizes of the NI.
  localparam int unsigned MQ_DEPTH      = 6;   // Message Queue, messages
  localparam int unsigned PB_DEPTH      = 4;   // Packet Buffer, packets

  // Flit type, carried in every flit.
  typedef enum logic [1:0] {
    FLIT_HEAD      = 2'd0,
    FLIT_BODY      = 2'd1,
    FLIT_TAIL      = 2'd2,
    FLIT_HEAD_TAIL = 2'd3
  } flit_type_t;

  typedef struct packed {
    flit_type_t              ftype;
    logic [VC_W-1:0]         vc;
    logic [FLIT_W-1:0]       data;
  } flit_t;

  // Message types. Each maps onto its own virtual network.
  typedef enum logic [1:0] {
    MSG_RD_REQ  = 2'd0,  // read request, header only        -> vnet 0
    MSG_WR_REQ  = 2'd1,  // write request, header + data     -> vnet 1
    MSG_RD_RESP = 2'd2   // read reply, header + data        -> vnet 2
  } msg_type_t;

  // Message header, carried in the head flit (58 of its 64 bits).
  typedef struct packed {
    msg_type_t               mtype;
    logic [NODE_W-1:0]       dst;   // route: destination node
    logic [NODE_W-1:0]       src;   // source node
    logic [SEQ_W-1:0]        seq;   // sequence number
    logic [LEN_W-1:0]        len;   // data words (1..MAX_WORDS)
    logic [ADDR_W-1:0]       addr;  // bus byte address of the first word
  } msg_hdr_t;

  localparam int unsigned HDR_W = $bits(msg_hdr_t);

  typedef struct packed {
    msg_hdr_t                              hdr;
    logic [MAX_WORDS-1:0][BUS_W-1:0]       data;
  } msg_t;

  // A packet as held in the Input Port and the Packet Buffer: flit types and
  // payloads, without VC ids (those are assigned on the link).
  typedef struct packed {
    logic [MAX_PKT_FLITS-1:0][1:0]         ftype;
    logic [MAX_PKT_FLITS-1:0][FLIT_W-1:0]  data;
    logic [FLITCNT_W-1:0]                  nflits;
    logic [VNET_W-1:0]                     vnet;
  } pkt_t;

  // Credit returned to the sender: `count` buffer slots of VC `vc` are free.
  typedef struct packed {
    logic                    valid;
    logic [VC_W-1:0]         vc;
    logic [FLITCNT_W-1:0]    count;
  } credit_t;

  function automatic logic [VNET_W-1:0] vnet_of(msg_type_t t);
    case (t)
      MSG_RD_REQ:  return VNET_W'(0);
      MSG_WR_REQ:  return VNET_W'(1);
      default:     return VNET_W'(2);
    endcase
  endfunction

  function automatic logic is_tail(logic [1:0] ft);
    return ft == FLIT_TAIL || ft == FLIT_HEAD_TAIL;
  endfunction

  function automatic logic is_head(logic [1:0] ft);
    return ft == FLIT_HEAD || ft == FLIT_HEAD_TAIL;
  endfunction

endpackage
