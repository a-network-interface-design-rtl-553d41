// ni_input_port: the NI's Input Port, first stage (Buffer Write, BW) of the
// NoC-to-Node pipeline.
//
// It holds one buffer per virtual channel, NUM_VNET * VC_PER_VNET = 6 in
// all, and each buffer is deep enough for a whole packet (MAX_PKT_FLITS).
// A flit arriving from the router is written, in the cycle it arrives, into
// the buffer named by its VC id. When the tail (or head/tail) flit has been
// written the buffer reports a complete packet on `pkt_ready`/`pkt_out`. The
// next stage frees a buffer with `free_valid`/`free_vc`; the whole packet is
// consumed at once, and the buffer returns one credit of `count` slots to
// the router on the following cycle (registered `credit_out`).
//
// Per-VC whole-packet buffers follow the document. Returning the freed
// slots as one counted credit is this design's choice.
module ni_input_port
  import ni_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // from the router
  input  logic                flit_in_valid,
  input  flit_t               flit_in,
  output credit_t             credit_out,
  // to the PKT2MSG stage
  output logic [NUM_VC-1:0]   pkt_ready,
  output pkt_t [NUM_VC-1:0]   pkt_out,
  input  logic                free_valid,
  input  logic [VC_W-1:0]     free_vc
);

  logic [NUM_VC-1:0][MAX_PKT_FLITS-1:0][1:0]        ftype_q;
  logic [NUM_VC-1:0][MAX_PKT_FLITS-1:0][FLIT_W-1:0] data_q;
  logic [NUM_VC-1:0][FLITCNT_W-1:0]                 cnt_q;
  logic [NUM_VC-1:0]                                complete_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      complete_q <= '0;
      credit_out <= '0;
    end else begin
      credit_out <= '0;
      if (free_valid) begin
        cnt_q[free_vc]      <= '0;
        complete_q[free_vc] <= 1'b0;
        credit_out.valid    <= 1'b1;
        credit_out.vc       <= free_vc;
        credit_out.count    <= cnt_q[free_vc];
      end
      if (flit_in_valid) begin
        cnt_q[flit_in.vc] <= cnt_q[flit_in.vc] + FLITCNT_W'(1);
        if (is_tail(flit_in.ftype)) complete_q[flit_in.vc] <= 1'b1;
      end
    end
  end

  // Flit storage needs no reset: only the first cnt_q entries are read.
  always_ff @(posedge clk) begin
    if (flit_in_valid) begin
      ftype_q[flit_in.vc][cnt_q[flit_in.vc]] <= flit_in.ftype;
      data_q [flit_in.vc][cnt_q[flit_in.vc]] <= flit_in.data;
    end
  end

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      pkt_ready[v]      = complete_q[v];
      pkt_out[v].ftype  = ftype_q[v];
      pkt_out[v].data   = data_q[v];
      pkt_out[v].nflits = cnt_q[v];
      pkt_out[v].vnet   = VNET_W'(v / VC_PER_VNET);
    end
  end

  // Flow-control rules: the router never overfills a buffer and never sends
  // into a buffer that still holds a complete packet.
  a_no_flit_into_complete: assert property (@(posedge clk) disable iff (!rst_n)
    flit_in_valid |-> !complete_q[flit_in.vc])
    else $error("input_port: flit into VC %0d holding a complete packet", flit_in.vc);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    flit_in_valid |-> cnt_q[flit_in.vc] < FLITCNT_W'(MAX_PKT_FLITS))
    else $error("input_port: VC %0d overflow", flit_in.vc);
  a_free_complete: assert property (@(posedge clk) disable iff (!rst_n)
    free_valid |-> complete_q[free_vc])
    else $error("input_port: free of incomplete VC %0d", free_vc);

endmodule
