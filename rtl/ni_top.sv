// ni_top: network interface between a WISHBONE node bus and a
// virtual-channel wormhole Network-on-Chip.
//
// Two loosely coupled pipelines share only the On-the-Fly table and a few
// handshakes:
//   NoC-to-Node (ni_noc2wb): Input Port -> PKT2MSG -> Message Queue ->
//     WISHBONE Master Wrapper (stages BW, PKT2MSG, BA);
//   Node-to-NoC (ni_wb2noc): WISHBONE Slave Wrapper -> MSG2PKT -> Packet
//     Buffer -> VC Allocator -> Link Allocator -> Output Port (stages MW,
//     MSG2PKT, VA, LA).
// The NI is a master and a slave on the bus. Its slave side always receives
// messages and its master side always sends them, so the reply to a read
// the Master Wrapper performs is stored through the Slave Wrapper, and the
// reply to a read the Slave Wrapper serves is delivered by the Master
// Wrapper, matched through the On-the-Fly table. This is the document's
// four-stage design; the collapsed one-, two- and three-stage variants it
// also times are not built.
//
// Ports: the router link (flits out, credits in; flits in, credits out),
// the WISHBONE master and slave ports, the node id (top address bits of a
// remote access name the destination node) and status pulses for stalls.
module ni_top
  import ni_pkg::*;
#(
  parameter int unsigned MQD  = MQ_DEPTH,
  parameter int unsigned PBD  = PB_DEPTH,
  parameter int unsigned RBUF = ROUTER_BUF,
  parameter int unsigned OTF  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  // link from the router
  input  logic                 flit_in_valid,
  input  flit_t                flit_in,
  output credit_t              credit_out,
  // link to the router
  output logic                 flit_out_valid,
  output flit_t                flit_out,
  input  credit_t              credit_in,
  // WISHBONE master port
  output logic                 wbm_cyc_o,
  output logic                 wbm_stb_o,
  output logic                 wbm_we_o,
  output logic [ADDR_W-1:0]    wbm_adr_o,
  output logic [BUS_W-1:0]     wbm_dat_o,
  output logic [SEL_W-1:0]     wbm_sel_o,
  output logic [2:0]           wbm_cti_o,
  input  logic                 wbm_ack_i,
  input  logic [BUS_W-1:0]     wbm_dat_i,
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
  // status pulses
  output logic                 stat_pb_stall,
  output logic                 stat_credit_stall,
  output logic                 stat_va_stall,
  output logic                 stat_mq_full,
  output logic                 stat_stray_reply
);
  logic                 rsv_req, rsv_gnt, rsp_valid, rsp_ready;
  msg_t                 rsp_msg;
  logic [NODE_W-1:0]    lk_src;
  logic [SEQ_W-1:0]     lk_seq;
  logic                 lk_hit, lk_clr;
  logic                 otf_valid, otf_ready, otf_full, otf_ins;
  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data;
  logic [NODE_W-1:0]    otf_dst;
  logic [SEQ_W-1:0]     otf_seq;
  logic [LEN_W-1:0]     otf_len;
  logic [ADDR_W-1:0]    otf_addr;

  ni_noc2wb #(.MQD(MQD)) u_noc2wb (
    .clk, .rst_n, .node_id,
    .flit_in_valid, .flit_in, .credit_out,
    .wbm_cyc_o, .wbm_stb_o, .wbm_we_o, .wbm_adr_o, .wbm_dat_o, .wbm_sel_o,
    .wbm_cti_o, .wbm_ack_i, .wbm_dat_i,
    .rsv_req, .rsv_gnt, .rsp_valid, .rsp_msg, .rsp_ready,
    .lk_src, .lk_seq, .lk_hit, .lk_clr,
    .otf_valid, .otf_data, .otf_ready,
    .stray_reply (stat_stray_reply), .mq_full (stat_mq_full)
  );

  ni_otf_table #(.ENTRIES(OTF)) u_otf (
    .clk, .rst_n,
    .ins_valid (otf_ins), .ins_dst (otf_dst), .ins_seq (otf_seq),
    .ins_len (otf_len), .ins_addr (otf_addr), .full (otf_full),
    .lk_src, .lk_seq, .lk_hit, .lk_len (), .lk_addr (), .clr (lk_clr)
  );

  ni_wb2noc #(.PBD(PBD), .RBUF(RBUF)) u_wb2noc (
    .clk, .rst_n, .node_id,
    .wbs_cyc_i, .wbs_stb_i, .wbs_we_i, .wbs_adr_i, .wbs_dat_i, .wbs_sel_i,
    .wbs_cti_i, .wbs_ack_o, .wbs_dat_o,
    .flit_out_valid, .flit_out, .credit_in,
    .rsv_req, .rsv_gnt, .rsp_valid, .rsp_msg, .rsp_ready,
    .otf_valid, .otf_data, .otf_ready,
    .otf_full, .otf_ins, .otf_dst, .otf_seq, .otf_len, .otf_addr,
    .pb_stall (stat_pb_stall), .credit_stall (stat_credit_stall),
    .va_stall (stat_va_stall)
  );

endmodule
