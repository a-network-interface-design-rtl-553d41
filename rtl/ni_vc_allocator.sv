// ni_vc_allocator: the Virtual Channel Allocation (VA) stage.
//
// The NI has a single output port, so allocation is simple: one N:1
// round-robin arbiter per virtual network, N being the number of Packet
// Buffer slots. Each cycle, the arbiter of virtual network v picks one of
// the slots whose head flit waits for a VC of that network, provided one of
// the network's output VCs is idle, and gives it the lowest-numbered idle
// VC. So up to NUM_VNET packets get a VC per cycle. `vc_claim` tells the
// Output Port which VCs became busy; the grant is recorded by the Packet
// Buffer at the clock edge.
//
// The per-virtual-network N:1 arbiter structure follows the document;
// round-robin order and lowest-idle-VC choice are this design's.
module ni_vc_allocator
  import ni_pkg::*;
#(
  parameter int unsigned N = PB_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                va_req,
  input  logic [N-1:0][VNET_W-1:0]    slot_vnet,
  input  logic [NUM_VC-1:0]           vc_idle,
  output logic [N-1:0]                va_gnt,
  output logic [VC_W-1:0]             va_vc [N],
  output logic [NUM_VC-1:0]           vc_claim
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [NUM_VNET-1:0][N-1:0]  req_v, gnt_v;
  logic [NUM_VNET-1:0][IW-1:0] idx_v;
  logic [NUM_VNET-1:0]         valid_v, any_idle;
  logic [VC_W-1:0]             free_vc [NUM_VNET];

  always_comb begin
    for (int v = 0; v < NUM_VNET; v++) begin
      any_idle[v] = 1'b0;
      free_vc[v]  = '0;
      for (int k = VC_PER_VNET - 1; k >= 0; k--) begin
        if (vc_idle[v * VC_PER_VNET + k]) begin
          any_idle[v] = 1'b1;
          free_vc[v]  = VC_W'(v * VC_PER_VNET + k);
        end
      end
      for (int s = 0; s < N; s++)
        req_v[v][s] = va_req[s] && (int'(slot_vnet[s]) == v) && any_idle[v];
    end
  end

  for (genvar v = 0; v < NUM_VNET; v++) begin : g_arb
    ni_rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n,
      .req       (req_v[v]),
      .advance   (1'b1),
      .gnt       (gnt_v[v]),
      .gnt_idx   (idx_v[v]),
      .gnt_valid (valid_v[v])
    );
  end

  always_comb begin
    va_gnt   = '0;
    vc_claim = '0;
    for (int s = 0; s < N; s++) va_vc[s] = '0;
    for (int v = 0; v < NUM_VNET; v++) begin
      if (valid_v[v]) begin
        va_gnt[idx_v[v]]   = 1'b1;
        va_vc[idx_v[v]]    = free_vc[v];
        vc_claim[free_vc[v]] = 1'b1;
      end
    end
  end

endmodule
