// ni_output_port: the NI's Output Port towards the router.
//
// It keeps the state of the NUM_VC output virtual channels, i.e. of the
// router input buffers they lead to: a busy flag and a credit counter that
// starts at the router buffer depth (4 flits). A VC becomes busy when the
// VC Allocator claims it; a flit that wins the Link Allocator uses one
// credit and is put in the link register, so it is on the link the cycle
// after it won. Credits come back from the router as `credit_in` (VC id and
// number of slots). A VC becomes idle again once its tail flit has left and
// all its credits are back, so a new packet always finds an empty buffer.
//
// The document only names this block; credit-based flow control comes from
// its description of the NoC, the counters and the idle rule are this
// design's choices.
module ni_output_port
  import ni_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = ROUTER_BUF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_VC-1:0]    vc_claim,
  output logic [NUM_VC-1:0]    vc_idle,
  output logic [NUM_VC-1:0]    vc_has_credit,
  input  logic                 send,
  input  flit_t                send_flit,
  input  credit_t              credit_in,
  output logic                 flit_out_valid,
  output flit_t                flit_out
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + MAX_PKT_FLITS + 1);

  logic [NUM_VC-1:0]          busy_q, tail_q;
  logic [NUM_VC-1:0][CW-1:0]  cred_q, cred_d;
  logic [NUM_VC-1:0]          tail_sent;

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      vc_idle[v]       = !busy_q[v];
      vc_has_credit[v] = cred_q[v] != '0;
      tail_sent[v]     = send && int'(send_flit.vc) == v && is_tail(send_flit.ftype);
      cred_d[v]        = cred_q[v];
      if (send && int'(send_flit.vc) == v) cred_d[v] = cred_d[v] - CW'(1);
      if (credit_in.valid && int'(credit_in.vc) == v) cred_d[v] = cred_d[v] + CW'(credit_in.count);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q         <= '0;
      tail_q         <= '0;
      flit_out_valid <= 1'b0;
      flit_out       <= '0;
      for (int v = 0; v < NUM_VC; v++) cred_q[v] <= CW'(BUF_DEPTH);
    end else begin
      flit_out_valid <= send;
      if (send) flit_out <= send_flit;
      cred_q <= cred_d;
      for (int v = 0; v < NUM_VC; v++) begin
        if (vc_claim[v]) begin
          busy_q[v] <= 1'b1;
          tail_q[v] <= 1'b0;
        end else if (busy_q[v] && (tail_q[v] || tail_sent[v])) begin
          tail_q[v] <= 1'b1;
          if (cred_d[v] == CW'(BUF_DEPTH)) begin
            busy_q[v] <= 1'b0;
            tail_q[v] <= 1'b0;
          end
        end
      end
    end
  end

  a_send_has_credit: assert property (@(posedge clk) disable iff (!rst_n)
    send |-> busy_q[send_flit.vc] && cred_q[send_flit.vc] != '0)
    else $error("output_port: flit on VC %0d without VC or credit", send_flit.vc);

endmodule
