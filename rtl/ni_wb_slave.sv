// ni_wb_slave: the WISHBONE Slave Wrapper, Message Write (MW) stage of the
// Node-to-NoC pipeline. It is the only producer of the Packet Buffer.
//
// A bus master on the node reaches a remote node by addressing the NI; the
// top NODE_W address bits name the destination node.
//  * Write: the wrapper first makes sure a Packet Buffer slot is free, then
//    acknowledges each beat and collects the words (up to MAX_WORDS; the
//    burst ends on CTI 000 or 111, or when CYC drops). The complete message
//    is handed to MSG2PKT and the Packet Buffer the cycle after.
//    While no slot is free it withholds ACK, which stalls the bus master
//    until space is freed.
//  * Read: a one-word read (CTI 000/111) asks for 1 word, an incrementing
//    burst (CTI 010) for a full line of MAX_WORDS. The wrapper sends a read
//    request message, enters it in the On-the-Fly table and holds the bus
//    cycle without ACK. When the Master Wrapper passes it the reply data,
//    the wrapper returns the words, one per beat.
// The wrapper also stores, on behalf of the Master Wrapper, the read replies
// the NI produces for remote nodes: it grants a slot reservation
// (`rsv_req`/`rsv_gnt`) only when a slot is free and not claimed, and
// writes the reply (`rsp_valid`/`rsp_msg`) into the reserved slot.
//
// SEL is not examined: every access moves whole 64-bit words, so byte
// writes are not supported. ACK is registered, so each beat takes two bus
// clocks. Every request
// message gets the next 8-bit sequence number. The address map, burst
// rules, timing and sequence numbering are this design's own choices; the
// document gives the wrapper's role and the stall on a full Packet Buffer.
module ni_wb_slave
  import ni_pkg::*;
#(
  parameter int unsigned PBD = PB_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  // WISHBONE slave port
  input  logic                 cyc_i,
  input  logic                 stb_i,
  input  logic                 we_i,
  input  logic [ADDR_W-1:0]    adr_i,
  input  logic [BUS_W-1:0]     dat_i,
  input  logic [SEL_W-1:0]     sel_i,
  input  logic [2:0]           cti_i,
  output logic                 ack_o,
  output logic [BUS_W-1:0]     dat_o,
  // to MSG2PKT / Packet Buffer
  input  logic [$clog2(PBD+1)-1:0] pb_free,
  output logic                 pb_wr,
  output msg_t                 pb_msg,
  // from the Master Wrapper
  input  logic                 rsv_req,
  output logic                 rsv_gnt,
  input  logic                 rsp_valid,
  input  msg_t                 rsp_msg,
  output logic                 rsp_ready,
  input  logic                 otf_valid,
  input  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data,
  output logic                 otf_ready,
  // On-the-Fly table insert
  input  logic                 otf_full,
  output logic                 otf_ins,
  output logic [NODE_W-1:0]    otf_dst,
  output logic [SEQ_W-1:0]     otf_seq,
  output logic [LEN_W-1:0]     otf_len,
  output logic [ADDR_W-1:0]    otf_addr,
  // a bus access had to wait for a free Packet Buffer slot
  output logic                 pb_stall
);
  localparam int unsigned FW = $clog2(PBD + 1);

  typedef enum logic [2:0] {S_IDLE, S_WR, S_WDONE, S_RREQ, S_RWAIT, S_RDATA} state_t;

  state_t                          state;
  msg_t                            msg_q;      // message being assembled
  logic [LEN_W-1:0]                wcnt;       // words written / read
  logic [SEQ_W-1:0]                seq_q;
  logic [MAX_WORDS-1:0][BUS_W-1:0] rbuf;
  logic                            rsv_q;      // a slot is reserved for a reply
  logic                            req_i, own_claim, own_start, room;
  logic                            beat_last;

  assign req_i     = cyc_i && stb_i;
  assign own_claim = state inside {S_WR, S_WDONE, S_RREQ};
  assign room      = pb_free > FW'(rsv_q);
  assign own_start = state == S_IDLE && req_i && !ack_o && room && (we_i || !otf_full);
  assign rsv_gnt   = rsv_req && !rsv_q
                   && (pb_free > FW'(own_claim) + FW'(own_start));
  assign pb_stall  = state == S_IDLE && req_i && !ack_o && !room;

  // One write port into the Packet Buffer: own messages first; a reply has
  // a reserved slot and waits at most one cycle.
  always_comb begin
    pb_wr     = 1'b0;
    pb_msg    = msg_q;
    rsp_ready = 1'b0;
    if (state == S_WDONE || state == S_RREQ) begin
      pb_wr = 1'b1;
    end else if (rsp_valid) begin
      pb_wr     = 1'b1;
      pb_msg    = rsp_msg;
      rsp_ready = 1'b1;
    end
  end

  assign otf_ins   = state == S_RREQ;
  assign otf_dst   = msg_q.hdr.dst;
  assign otf_seq   = msg_q.hdr.seq;
  assign otf_len   = msg_q.hdr.len;
  assign otf_addr  = msg_q.hdr.addr;
  assign otf_ready = state == S_RWAIT;

  assign beat_last = (cti_i == 3'b000) || (cti_i == 3'b111)
                   || (wcnt == LEN_W'(MAX_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ack_o <= 1'b0;
      wcnt  <= '0;
      seq_q <= '0;
      rsv_q <= 1'b0;
    end else begin
      ack_o <= 1'b0;
      if (rsv_gnt) rsv_q <= 1'b1;
      else if (rsp_valid && rsp_ready) rsv_q <= 1'b0;

      case (state)
        S_IDLE: begin
          wcnt <= '0;
          if (own_start) state <= we_i ? S_WR : S_RREQ;
        end
        S_WR: begin
          if (!cyc_i) begin
            state <= S_WDONE;
          end else if (stb_i && we_i && !ack_o) begin
            ack_o <= 1'b1;
            wcnt  <= wcnt + LEN_W'(1);
            if (beat_last) state <= S_WDONE;
          end
        end
        S_WDONE: begin
          state <= S_IDLE;
          seq_q <= seq_q + SEQ_W'(1);
        end
        S_RREQ: begin
          state <= S_RWAIT;
          seq_q <= seq_q + SEQ_W'(1);
        end
        S_RWAIT: if (otf_valid) state <= S_RDATA;
        S_RDATA: begin
          if (!cyc_i) begin
            state <= S_IDLE;
          end else if (stb_i && !we_i && !ack_o) begin
            ack_o <= 1'b1;
            wcnt  <= wcnt + LEN_W'(1);
            if (wcnt + LEN_W'(1) >= msg_q.hdr.len) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Message assembly and read data.
  always_ff @(posedge clk) begin
    if (own_start) begin
      msg_q.hdr.mtype <= we_i ? MSG_WR_REQ : MSG_RD_REQ;
      msg_q.hdr.dst   <= adr_i[ADDR_W-1 -: NODE_W];
      msg_q.hdr.src   <= node_id;
      msg_q.hdr.seq   <= seq_q;
      msg_q.hdr.addr  <= adr_i;
      msg_q.hdr.len   <= (!we_i && cti_i == 3'b010) ? LEN_W'(MAX_WORDS) : LEN_W'(1);
      msg_q.data      <= '0;
    end else if (state == S_WR && cyc_i && stb_i && we_i && !ack_o) begin
      msg_q.data[wcnt[WIDX_W-1:0]] <= dat_i;
      msg_q.hdr.len                <= wcnt + LEN_W'(1);
    end
    if (state == S_RWAIT && otf_valid) rbuf <= otf_data;
    if (state == S_RDATA && req_i && !we_i && !ack_o) dat_o <= rbuf[wcnt[WIDX_W-1:0]];
  end

  a_rsp_reserved: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> rsv_q)
    else $error("wb_slave: reply without reservation");

endmodule
