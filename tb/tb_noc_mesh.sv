// tb_noc_mesh: behavioural stand-in for a K x K mesh NoC, connecting the
// network interfaces of all K*K tiles. It is a traffic model, not a router:
//  * Injection: each tile's flits are taken in at once, so every flit
//    is answered by one credit (one buffer slot) at the next clock edge.
//    Flits are gathered per source VC until the tail arrives.
//  * Transport: a complete packet becomes deliverable HOP_CYC cycles per
//    mesh hop (XY distance between the two tiles, node id = y*K + x) after
//    its tail was taken in. The destination comes from the header's
//    destination field in the head flit.
//  * Ejection: one flit per cycle into each destination NI. A packet is
//    started only on a destination VC of its own virtual network that is
//    free: the previous packet on it has been freed by the NI (its credit
//    came back) and all MAX_PKT_FLITS slots are available. The packet's
//    flits are sent back to back with that VC id. Virtual networks take
//    turns round-robin.
// Counts injected packets by length in flits, and reports whether any
// packet is still inside.
module tb_noc_mesh
  import ni_pkg::*;
#(
  parameter int K       = 4,
  parameter int HOP_CYC = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid   [K*K],
  input  flit_t   in_flit    [K*K],
  output credit_t in_credit  [K*K],
  output logic    out_valid  [K*K],
  output flit_t   out_flit   [K*K],
  input  credit_t out_credit [K*K],
  output int      pkts_by_len [MAX_PKT_FLITS+1],
  output int      in_flight
);
  localparam int NN = K * K;

  typedef struct {
    flit_t fl [MAX_PKT_FLITS];
    int    n;
    longint ready;
  } mpkt_t;

  mpkt_t  asm_p  [NN][NUM_VC];           // packets being gathered
  mpkt_t  dq     [NN][NUM_VNET][$];      // complete packets per destination
  mpkt_t  cur    [NN];                   // packet being ejected
  bit     active [NN];
  int     idx    [NN];
  int     cur_vc [NN];
  int     rx_cred [NN][NUM_VC];
  bit     rx_wait [NN][NUM_VC];
  int     rr     [NN];
  longint cyc;

  function automatic int hops(int a, int b);
    int dx, dy;
    dx = (a % K) - (b % K); dy = (a / K) - (b / K);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc = 0; in_flight = 0;
      for (int l = 0; l <= MAX_PKT_FLITS; l++) pkts_by_len[l] = 0;
      for (int d = 0; d < NN; d++) begin
        active[d] = 0; idx[d] = 0; cur_vc[d] = 0; rr[d] = 0;
        for (int v = 0; v < NUM_VC; v++) begin
          rx_cred[d][v] = MAX_PKT_FLITS; rx_wait[d][v] = 0; asm_p[d][v].n = 0;
        end
        for (int v = 0; v < NUM_VNET; v++) dq[d][v].delete();
        out_valid[d] <= 1'b0; out_flit[d] <= '0; in_credit[d] <= '0;
      end
    end else begin
      cyc++;
      for (int d = 0; d < NN; d++) begin
        out_valid[d] <= 1'b0;
        in_credit[d] <= '0;
        if (out_credit[d].valid) begin
          rx_cred[d][out_credit[d].vc] += int'(out_credit[d].count);
          rx_wait[d][out_credit[d].vc] = 0;
        end
        // start a packet on a free VC of the next virtual network in turn
        if (!active[d]) begin
          for (int k = 0; k < NUM_VNET && !active[d]; k++) begin
            int vn;
            vn = (rr[d] + k) % NUM_VNET;
            if (dq[d][vn].size() > 0 && dq[d][vn][0].ready <= cyc) begin
              for (int c = 0; c < VC_PER_VNET && !active[d]; c++) begin
                int vc;
                vc = vn * VC_PER_VNET + c;
                if (!rx_wait[d][vc] && rx_cred[d][vc] == MAX_PKT_FLITS) begin
                  cur[d]    = dq[d][vn].pop_front();
                  active[d] = 1; idx[d] = 0; cur_vc[d] = vc;
                  rr[d]     = (vn + 1) % NUM_VNET;
                end
              end
            end
          end
        end
        if (active[d]) begin
          flit_t f;
          f    = cur[d].fl[idx[d]];
          f.vc = VC_W'(cur_vc[d]);
          out_valid[d] <= 1'b1;
          out_flit[d]  <= f;
          rx_cred[d][cur_vc[d]]--;
          idx[d]++;
          if (is_tail(f.ftype)) begin
            rx_wait[d][cur_vc[d]] = 1;
            active[d] = 0;
            in_flight--;
          end
        end
      end
      for (int s = 0; s < NN; s++) begin
        if (in_valid[s]) begin
          int v;
          v = int'(in_flit[s].vc);
          if (asm_p[s][v].n >= MAX_PKT_FLITS) $error("tb_noc_mesh: packet longer than %0d flits", MAX_PKT_FLITS);
          else asm_p[s][v].fl[asm_p[s][v].n] = in_flit[s];
          asm_p[s][v].n++;
          in_credit[s] <= '{valid: 1'b1, vc: in_flit[s].vc, count: FLITCNT_W'(1)};
          if (is_tail(in_flit[s].ftype)) begin
            int d;
            msg_hdr_t h;
            h = msg_hdr_t'(asm_p[s][v].fl[0].data[HDR_W-1:0]);
            d = int'(h.dst);
            if (d >= NN) $error("tb_noc_mesh: destination %0d outside the mesh", d);
            else begin
              asm_p[s][v].ready = cyc + longint'(HOP_CYC * hops(s, d));
              dq[d][v / VC_PER_VNET].push_back(asm_p[s][v]);
              pkts_by_len[asm_p[s][v].n]++;
              in_flight++;
            end
            asm_p[s][v].n = 0;
          end
        end
      end
    end
  end
endmodule
