// ni_wb_master: the WISHBONE Master Wrapper, Bus Arbitration (BA) stage of
// the NoC-to-Node pipeline.
//
// It takes the oldest message of the Message Queue and delivers it:
//  * write request: a WISHBONE write of `len` words (incrementing burst,
//    CTI 010 and 111 on the last beat; a classic cycle, CTI 000, for one
//    word). No reply is sent.
//  * read request: first a Packet Buffer slot is reserved through the
//    Slave Wrapper (`rsv_req`/`rsv_gnt`): the NI never starts a bus read
//    whose reply it could not store. Then a WISHBONE read of `len` words;
//    the words read form a read-reply message (to the requesting node,
//    same sequence number) that is handed to the Slave Wrapper, which puts
//    it into the Packet Buffer.
//  * read reply: the On-the-Fly table is searched for the read it answers;
//    on a hit the data goes to the Slave Wrapper, which completes the bus
//    read it is holding, and the entry is cleared. A reply with no entry is
//    dropped and flagged on `stray_reply`.
// The message is deleted from the queue when it has been delivered. Bus
// outputs are decoded from registered state. The node bus's own arbiter
// (outside the NI) decides when `ack_i` comes; the BA stage lasts one bus
// beat per word, so a message longer than the bus width takes several.
//
// The roles (master always sends, slave always receives, On-the-Fly table
// for reads) follow the document. Burst signalling, word addressing and
// collecting the read data here before handing it over are this design's
// choices.
module ni_wb_master
  import ni_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  // Message Queue head
  input  logic                 mq_valid,
  input  msg_t                 mq_msg,
  output logic                 mq_pop,
  // WISHBONE master port
  output logic                 cyc_o,
  output logic                 stb_o,
  output logic                 we_o,
  output logic [ADDR_W-1:0]    adr_o,
  output logic [BUS_W-1:0]     dat_o,
  output logic [SEL_W-1:0]     sel_o,
  output logic [2:0]           cti_o,
  input  logic                 ack_i,
  input  logic [BUS_W-1:0]     dat_i,
  // Packet Buffer slot reservation, to the Slave Wrapper
  output logic                 rsv_req,
  input  logic                 rsv_gnt,
  // read reply produced by a bus read, to the Slave Wrapper
  output logic                 rsp_valid,
  output msg_t                 rsp_msg,
  input  logic                 rsp_ready,
  // On-the-Fly table lookup
  output logic [NODE_W-1:0]    lk_src,
  output logic [SEQ_W-1:0]     lk_seq,
  input  logic                 lk_hit,
  output logic                 lk_clr,
  // data answering the read the Slave Wrapper holds
  output logic                 otf_valid,
  output logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data,
  input  logic                 otf_ready,
  output logic                 stray_reply
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_REPLY} state_t;

  state_t                          state;
  logic [WIDX_W-1:0]               idx;
  logic [MAX_WORDS-1:0][BUS_W-1:0] rdata;
  logic                            last_beat;
  msg_hdr_t                        h;

  assign h         = mq_msg.hdr;
  assign last_beat = (LEN_W'(idx) + LEN_W'(1)) >= h.len;

  // Bus outputs.
  always_comb begin
    cyc_o = (state == S_WRITE) || (state == S_READ);
    stb_o = cyc_o;
    we_o  = state == S_WRITE;
    adr_o = h.addr + ADDR_W'({idx, 3'b000});
    dat_o = mq_msg.data[idx];
    sel_o = '1;
    if (h.len == LEN_W'(1))  cti_o = 3'b000;
    else if (last_beat)      cti_o = 3'b111;
    else                     cti_o = 3'b010;
  end

  // Handshakes with the Slave Wrapper and the On-the-Fly table.
  always_comb begin
    lk_src      = h.src;
    lk_seq      = h.seq;
    rsv_req     = (state == S_IDLE) && mq_valid && (h.mtype == MSG_RD_REQ);
    otf_valid   = (state == S_IDLE) && mq_valid && (h.mtype == MSG_RD_RESP) && lk_hit;
    otf_data    = mq_msg.data;
    lk_clr      = otf_valid && otf_ready;
    stray_reply = (state == S_IDLE) && mq_valid && (h.mtype == MSG_RD_RESP) && !lk_hit;

    rsp_valid        = state == S_REPLY;
    rsp_msg.hdr      = h;
    rsp_msg.hdr.mtype = MSG_RD_RESP;
    rsp_msg.hdr.dst  = h.src;
    rsp_msg.hdr.src  = node_id;
    rsp_msg.data     = rdata;

    mq_pop = lk_clr || stray_reply
          || (state == S_WRITE && ack_i && last_beat)
          || (state == S_REPLY && rsp_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          idx <= '0;
          if (mq_valid && h.mtype == MSG_WR_REQ)              state <= S_WRITE;
          else if (mq_valid && h.mtype == MSG_RD_REQ && rsv_gnt) state <= S_READ;
        end
        S_WRITE: if (ack_i) begin
          if (last_beat) state <= S_IDLE;
          else           idx   <= idx + WIDX_W'(1);
        end
        S_READ: if (ack_i) begin
          if (last_beat) state <= S_REPLY;
          else           idx   <= idx + WIDX_W'(1);
        end
        S_REPLY: if (rsp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && mq_valid && h.mtype == MSG_RD_REQ && rsv_gnt) rdata <= '0;
    else if (state == S_READ && ack_i) rdata[idx] <= dat_i;
  end

endmodule
