// ni_msg2pkt: the packaging logic of the Message-to-Packet (MSG2PKT) stage.
//
// Turns one message into one packet: a head flit carrying the header, then
// one flit per data word. A read request has no data and becomes a single
// head/tail flit; a write request or a read reply of `len` words becomes
// 1 + len flits, the last one marked tail. The packet's virtual network
// follows from the message type. Purely combinational; the Packet Buffer
// stores the result at the clock edge, which ends the MSG2PKT stage.
//
// The packet format (Route and Seq# in the header, flit types head, body,
// tail and head/tail) follows the document; field widths and the type to
// virtual network mapping are this design's choices.
module ni_msg2pkt
  import ni_pkg::*;
(
  input  msg_t  msg,
  output pkt_t  pkt
);
  logic [FLITCNT_W-1:0] n;

  always_comb begin
    n = (msg.hdr.mtype == MSG_RD_REQ) ? FLITCNT_W'(1)
                                      : FLITCNT_W'(msg.hdr.len) + FLITCNT_W'(1);
    pkt.nflits = n;
    pkt.vnet   = vnet_of(msg.hdr.mtype);
    pkt.data[0] = FLIT_W'(msg.hdr);
    for (int w = 0; w < MAX_WORDS; w++) pkt.data[w+1] = msg.data[w];
    for (int f = 0; f < MAX_PKT_FLITS; f++) begin
      if (n == FLITCNT_W'(1))                 pkt.ftype[f] = FLIT_HEAD_TAIL;
      else if (f == 0)                        pkt.ftype[f] = FLIT_HEAD;
      else if (FLITCNT_W'(f) == n - 1'b1)     pkt.ftype[f] = FLIT_TAIL;
      else                                    pkt.ftype[f] = FLIT_BODY;
    end
  end

endmodule
