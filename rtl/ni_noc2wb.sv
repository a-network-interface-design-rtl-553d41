// ni_noc2wb: the NoC-to-Node pipeline of the network interface.
//
// Three stages working at two granularities:
//   BW       (flits)    Input Port, a flit is written into its VC buffer;
//   PKT2MSG  (messages) a complete packet becomes a message in the
//                       Message Queue;
//   BA       (messages) the WISHBONE Master Wrapper puts the message on the
//                       node bus, one beat per word.
// With no contention a single-flit packet written in cycle t is converted in
// cycle t+1 and its bus cycle starts in cycle t+3 (one cycle for the
// Master Wrapper to leave its idle state). The Message Queue (MQ_DEPTH
// messages) decouples the NoC from the bus: when it is full, complete
// packets wait in the Input Port and the router runs out of credits.
// Signals towards the Slave Wrapper and the On-the-Fly table are passed
// through to the top. The structure follows the document.
module ni_noc2wb
  import ni_pkg::*;
#(
  parameter int unsigned MQD = MQ_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  // router side
  input  logic                 flit_in_valid,
  input  flit_t                flit_in,
  output credit_t              credit_out,
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
  // to the Slave Wrapper / On-the-Fly table
  output logic                 rsv_req,
  input  logic                 rsv_gnt,
  output logic                 rsp_valid,
  output msg_t                 rsp_msg,
  input  logic                 rsp_ready,
  output logic [NODE_W-1:0]    lk_src,
  output logic [SEQ_W-1:0]     lk_seq,
  input  logic                 lk_hit,
  output logic                 lk_clr,
  output logic                 otf_valid,
  output logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data,
  input  logic                 otf_ready,
  // status
  output logic                 stray_reply,
  output logic                 mq_full
);
  logic [NUM_VC-1:0] pkt_ready;
  pkt_t [NUM_VC-1:0] pkt;
  logic              free_valid;
  logic [VC_W-1:0]   free_vc;
  logic              mq_wr, mq_valid, mq_pop;
  msg_t              mq_wmsg, mq_head;

  ni_input_port u_ip (
    .clk, .rst_n,
    .flit_in_valid, .flit_in, .credit_out,
    .pkt_ready, .pkt_out (pkt),
    .free_valid, .free_vc
  );

  ni_pkt2msg u_p2m (
    .clk, .rst_n,
    .pkt_ready, .pkt_in (pkt),
    .free_valid, .free_vc,
    .mq_full, .mq_wr, .mq_msg (mq_wmsg)
  );

  ni_message_queue #(.DEPTH(MQD)) u_mq (
    .clk, .rst_n,
    .wr (mq_wr), .wr_msg (mq_wmsg), .full (mq_full),
    .head_valid (mq_valid), .head (mq_head), .pop (mq_pop),
    .count ()
  );

  ni_wb_master u_wbm (
    .clk, .rst_n, .node_id,
    .mq_valid, .mq_msg (mq_head), .mq_pop,
    .cyc_o (wbm_cyc_o), .stb_o (wbm_stb_o), .we_o (wbm_we_o),
    .adr_o (wbm_adr_o), .dat_o (wbm_dat_o), .sel_o (wbm_sel_o),
    .cti_o (wbm_cti_o), .ack_i (wbm_ack_i), .dat_i (wbm_dat_i),
    .rsv_req, .rsv_gnt, .rsp_valid, .rsp_msg, .rsp_ready,
    .lk_src, .lk_seq, .lk_hit, .lk_clr,
    .otf_valid, .otf_data, .otf_ready, .stray_reply
  );

endmodule
