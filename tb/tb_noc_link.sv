// tb_noc_link: behavioural stand-in for the NoC between two network
// interfaces, one direction. It accepts flits from the sending NI into one
// buffer of RBUF flits per VC (the router input buffer) and returns one
// credit per flit when the flit moves on. It forwards at most one flit per
// cycle to the receiving NI, keeping each VC in order, round-robin between
// VCs, only while the receiver's VC buffer has room and after the receiver
// has freed the VC from its previous packet (the receiver returns all
// credits of a packet at once). `hold` stops forwarding, to create
// back-pressure. Counts forwarded flits.
module tb_noc_link
  import ni_pkg::*;
#(
  parameter int RBUF = ROUTER_BUF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    hold,
  // from the sending NI
  input  logic    in_valid,
  input  flit_t   in_flit,
  output credit_t in_credit,
  // to the receiving NI
  output logic    out_valid,
  output flit_t   out_flit,
  input  credit_t out_credit,
  output int      forwarded
);
  flit_t q [NUM_VC][$];
  int    rx_cred [NUM_VC];
  bit    rx_wait [NUM_VC];   // tail sent, waiting for the receiver's free
  int    rr;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) begin
        q[v].delete(); rx_cred[v] = MAX_PKT_FLITS; rx_wait[v] = 0;
      end
      rr = 0; forwarded = 0;
      out_valid <= 1'b0; out_flit <= '0; in_credit <= '0;
    end else begin
      out_valid <= 1'b0;
      in_credit <= '0;
      if (out_credit.valid) begin
        rx_cred[out_credit.vc] += int'(out_credit.count);
        rx_wait[out_credit.vc] = 0;
      end
      if (!hold) begin
        for (int k = 0; k < NUM_VC; k++) begin
          int v;
          v = (rr + k) % NUM_VC;
          if (q[v].size() > 0 && rx_cred[v] > 0 && !rx_wait[v]) begin
            flit_t f;
            f = q[v].pop_front();
            out_valid <= 1'b1;
            out_flit  <= f;
            rx_cred[v]--;
            if (is_tail(f.ftype)) rx_wait[v] = 1;
            in_credit <= '{valid: 1'b1, vc: VC_W'(v), count: FLITCNT_W'(1)};
            forwarded++;
            rr = (v + 1) % NUM_VC;
            break;
          end
        end
      end
      if (in_valid) begin
        if (q[in_flit.vc].size() >= RBUF) $error("tb_noc_link: router buffer overflow on VC %0d", in_flit.vc);
        q[in_flit.vc].push_back(in_flit);
      end
    end
  end
endmodule
