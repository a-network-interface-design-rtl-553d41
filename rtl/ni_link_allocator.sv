// ni_link_allocator: the Link Allocation (LA) stage.
//
// An N:1 round-robin arbiter, N being the number of Packet Buffer slots.
// Its requesters are the slots whose packet already holds an output VC and
// whose VC has at least one credit left at the router. One of them wins
// each cycle and sends its next flit on the single link in the following
// cycle. The N:1 structure follows the document; the round-robin order and
// the credit check at this stage are this design's choices.
module ni_link_allocator
  import ni_pkg::*;
#(
  parameter int unsigned N = PB_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                la_req,
  input  logic [N-1:0][VC_W-1:0]      slot_vc,
  input  logic [NUM_VC-1:0]           vc_has_credit,
  output logic                        la_gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] la_idx,
  output logic                        credit_stall
);
  logic [N-1:0] req, gnt;

  always_comb begin
    for (int s = 0; s < N; s++) req[s] = la_req[s] && vc_has_credit[slot_vc[s]];
  end

  // A packet is ready to send but its VC has run out of credits.
  assign credit_stall = (la_req != '0) && (req == '0);

  ni_rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req,
    .advance   (1'b1),
    .gnt,
    .gnt_idx   (la_idx),
    .gnt_valid (la_gnt)
  );

endmodule
