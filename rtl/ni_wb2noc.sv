// ni_wb2noc: the Node-to-NoC pipeline of the network interface.
//
// Four stages working at two granularities:
//   MW       (messages) the WISHBONE Slave Wrapper collects a message from
//                       bus beats;
//   MSG2PKT  (messages) the message is packaged into flits and stored in a
//                       free Packet Buffer slot;
//   VA       (flits)    the head flit obtains an idle output VC of its
//                       virtual network (one N:1 arbiter per network);
//   LA       (flits)    one flit per cycle wins the single link and leaves
//                       through the Output Port register the next cycle.
// With no contention the head flit of a message completed on the bus in
// cycle t is stored in cycle t+1 (MSG2PKT), gets its VC in t+2, wins the
// link in t+3 and is on the link in t+4; the following flits leave one per
// cycle while credits last. The Slave Wrapper stalls the bus master while
// the Packet Buffer is full. The structure follows the document.
module ni_wb2noc
  import ni_pkg::*;
#(
  parameter int unsigned PBD  = PB_DEPTH,
  parameter int unsigned RBUF = ROUTER_BUF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  // WISHBONE slave port
  input  logic                 wbs_cyc_i,
  input  logic                 wbs_stb_i,
  input  logic                 wbs_we_i,
  input  logic [ADDR_W-1:0]    wbs_adr_i,
  input  logic [BUS_W-1:0]     wbs_dat_i,
  input  logic [SEL_W-1:0]     wbs_sel_i,
  input  logic [2:0]           wbs_cti_i,
  output logic                 wbs_ack_o,
  output logic [BUS_W-1:0]     wbs_dat_o,
  // router side
  output logic                 flit_out_valid,
  output flit_t                flit_out,
  input  credit_t              credit_in,
  // from the Master Wrapper / On-the-Fly table
  input  logic                 rsv_req,
  output logic                 rsv_gnt,
  input  logic                 rsp_valid,
  input  msg_t                 rsp_msg,
  output logic                 rsp_ready,
  input  logic                 otf_valid,
  input  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data,
  output logic                 otf_ready,
  input  logic                 otf_full,
  output logic                 otf_ins,
  output logic [NODE_W-1:0]    otf_dst,
  output logic [SEQ_W-1:0]     otf_seq,
  output logic [LEN_W-1:0]     otf_len,
  output logic [ADDR_W-1:0]    otf_addr,
  // status
  output logic                 pb_stall,
  output logic                 credit_stall,
  output logic                 va_stall
);
  localparam int unsigned IW = $clog2(PBD > 1 ? PBD : 2);

  logic [$clog2(PBD+1)-1:0]  pb_free;
  logic                      pb_wr;
  msg_t                      pb_msg;
  pkt_t                      pb_pkt;
  logic [PBD-1:0]            va_req, va_gnt, la_req;
  logic [PBD-1:0][VNET_W-1:0] slot_vnet;
  logic [PBD-1:0][VC_W-1:0]  slot_vc;
  logic [VC_W-1:0]           va_vc [PBD];
  logic [NUM_VC-1:0]         vc_idle, vc_claim, vc_has_credit;
  logic                      la_gnt;
  logic [IW-1:0]             la_idx;
  flit_t                     la_flit;

  ni_wb_slave #(.PBD(PBD)) u_wbs (
    .clk, .rst_n, .node_id,
    .cyc_i (wbs_cyc_i), .stb_i (wbs_stb_i), .we_i (wbs_we_i),
    .adr_i (wbs_adr_i), .dat_i (wbs_dat_i), .sel_i (wbs_sel_i),
    .cti_i (wbs_cti_i), .ack_o (wbs_ack_o), .dat_o (wbs_dat_o),
    .pb_free, .pb_wr, .pb_msg,
    .rsv_req, .rsv_gnt, .rsp_valid, .rsp_msg, .rsp_ready,
    .otf_valid, .otf_data, .otf_ready,
    .otf_full, .otf_ins, .otf_dst, .otf_seq, .otf_len, .otf_addr,
    .pb_stall
  );

  ni_msg2pkt u_m2p (.msg (pb_msg), .pkt (pb_pkt));

  ni_packet_buffer #(.DEPTH(PBD)) u_pb (
    .clk, .rst_n,
    .wr (pb_wr), .wr_pkt (pb_pkt), .free_cnt (pb_free),
    .va_req, .slot_vnet, .va_gnt, .va_vc,
    .la_req, .slot_vc, .la_gnt, .la_idx, .la_flit
  );

  ni_vc_allocator #(.N(PBD)) u_va (
    .clk, .rst_n,
    .va_req, .slot_vnet, .vc_idle, .va_gnt, .va_vc, .vc_claim
  );

  // A head flit is waiting but every VC of its network is busy.
  assign va_stall = (va_req != '0) && (va_gnt == '0);

  ni_link_allocator #(.N(PBD)) u_la (
    .clk, .rst_n,
    .la_req, .slot_vc, .vc_has_credit, .la_gnt, .la_idx, .credit_stall
  );

  ni_output_port #(.BUF_DEPTH(RBUF)) u_op (
    .clk, .rst_n,
    .vc_claim, .vc_idle, .vc_has_credit,
    .send (la_gnt), .send_flit (la_flit),
    .credit_in, .flit_out_valid, .flit_out
  );

endmodule
