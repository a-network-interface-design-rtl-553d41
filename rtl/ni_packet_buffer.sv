// ni_packet_buffer: the Packet Buffer of the Node-to-NoC pipeline.
//
// DEPTH slots (4 by default, as in the document's setup), each holding one
// whole packet of up to MAX_PKT_FLITS flits. A packet offered with `wr` is
// stored in the lowest free slot at the clock edge (end of MSG2PKT). A
// stored packet first asks the VC Allocator for an output VC of its virtual
// network (`va_req`); after a grant it asks the Link Allocator to send its
// flits, one per grant, in order (`la_req`). `la_flit` is the next flit of
// the slot named by `la_idx`, stamped with the slot's VC. The slot becomes
// free at the clock edge that ends the cycle in which its tail flit won the
// link, i.e. it can be refilled the following cycle, as the document
// states.
module ni_packet_buffer
  import ni_pkg::*;
#(
  parameter int unsigned DEPTH = PB_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from MSG2PKT
  input  logic                        wr,
  input  pkt_t                        wr_pkt,
  output logic [$clog2(DEPTH+1)-1:0]  free_cnt,
  // VC allocation
  output logic [DEPTH-1:0]            va_req,
  output logic [DEPTH-1:0][VNET_W-1:0] slot_vnet,
  input  logic [DEPTH-1:0]            va_gnt,
  input  logic [VC_W-1:0]             va_vc [DEPTH],
  // link allocation
  output logic [DEPTH-1:0]            la_req,
  output logic [DEPTH-1:0][VC_W-1:0]  slot_vc,
  input  logic                        la_gnt,
  input  logic [$clog2(DEPTH > 1 ? DEPTH : 2)-1:0] la_idx,
  output flit_t                       la_flit
);
  localparam int unsigned IW = $clog2(DEPTH > 1 ? DEPTH : 2);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  pkt_t                        pkt_q  [DEPTH];
  logic [DEPTH-1:0]            valid_q, hasvc_q;
  logic [DEPTH-1:0][VC_W-1:0]  vc_q;
  logic [FLITCNT_W-1:0]        rd_q   [DEPTH];
  logic [IW-1:0]               wr_idx;
  logic                        have_free;
  logic                        tail_won;

  always_comb begin
    have_free = 1'b0;
    wr_idx    = '0;
    free_cnt  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        have_free = 1'b1;
        wr_idx    = IW'(i);
        free_cnt  = free_cnt + CW'(1);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      va_req[i]    = valid_q[i] && !hasvc_q[i];
      la_req[i]    = valid_q[i] && hasvc_q[i];
      slot_vnet[i] = pkt_q[i].vnet;
      slot_vc[i]   = vc_q[i];
    end
    la_flit.ftype = flit_type_t'(pkt_q[la_idx].ftype[rd_q[la_idx]]);
    la_flit.vc    = vc_q[la_idx];
    la_flit.data  = pkt_q[la_idx].data[rd_q[la_idx]];
    tail_won      = la_gnt && is_tail(pkt_q[la_idx].ftype[rd_q[la_idx]]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      hasvc_q <= '0;
      vc_q    <= '0;
      for (int i = 0; i < DEPTH; i++) rd_q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (va_gnt[i]) begin
          hasvc_q[i] <= 1'b1;
          vc_q[i]    <= va_vc[i];
        end
      end
      if (la_gnt) begin
        if (tail_won) begin
          valid_q[la_idx] <= 1'b0;
          hasvc_q[la_idx] <= 1'b0;
          rd_q[la_idx]    <= '0;
        end else begin
          rd_q[la_idx]    <= rd_q[la_idx] + FLITCNT_W'(1);
        end
      end
      if (wr && have_free) begin
        valid_q[wr_idx] <= 1'b1;
        hasvc_q[wr_idx] <= 1'b0;
        rd_q[wr_idx]    <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr && have_free) pkt_q[wr_idx] <= wr_pkt;
  end

  a_wr_has_free: assert property (@(posedge clk) disable iff (!rst_n) wr |-> have_free)
    else $error("packet_buffer: write while full");
  a_la_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) la_gnt |-> la_req[la_idx])
    else $error("packet_buffer: link grant to idle slot");
  for (genvar i = 0; i < DEPTH; i++) begin : g_chk
    a_va_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) va_gnt[i] |-> va_req[i])
      else $error("packet_buffer: VC grant to slot %0d not asking", i);
  end

endmodule
