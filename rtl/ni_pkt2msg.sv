// ni_pkt2msg: the Packet-to-Message (PKT2MSG) stage of the NoC-to-Node
// pipeline.
//
// Among the Input Port buffers that hold a complete packet, a round-robin
// arbiter picks one whenever the Message Queue has a free buffer. In the
// same cycle the message is rebuilt from the packet (header from the head
// flit, one bus word from each following flit), written into the Message
// Queue at the clock edge, and the Input Port buffer is released. One
// packet is converted per cycle at most.
//
// The stage and its place in the pipeline follow the document; the
// arbitration policy and the header layout are this design's choices.
module ni_pkt2msg
  import ni_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // from the Input Port
  input  logic [NUM_VC-1:0]   pkt_ready,
  input  pkt_t [NUM_VC-1:0]   pkt_in,
  output logic                free_valid,
  output logic [VC_W-1:0]     free_vc,
  // to the Message Queue
  input  logic                mq_full,
  output logic                mq_wr,
  output msg_t                mq_msg
);

  logic [NUM_VC-1:0] gnt;
  logic [VC_W-1:0]   gnt_idx;
  logic              gnt_valid;
  pkt_t              sel;

  ni_rr_arbiter #(.N(NUM_VC)) u_arb (
    .clk, .rst_n,
    .req      (pkt_ready),
    .advance  (mq_wr),
    .gnt,
    .gnt_idx,
    .gnt_valid
  );

  assign sel        = pkt_in[gnt_idx];
  assign mq_wr      = gnt_valid && !mq_full;
  assign free_valid = mq_wr;
  assign free_vc    = gnt_idx;

  always_comb begin
    mq_msg.hdr = msg_hdr_t'(sel.data[0][HDR_W-1:0]);
    for (int w = 0; w < MAX_WORDS; w++) begin
      mq_msg.data[w] = (FLITCNT_W'(w + 1) < sel.nflits) ? sel.data[w+1] : '0;
    end
  end

endmodule
