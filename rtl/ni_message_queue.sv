// ni_message_queue: the Message Queue between the PKT2MSG stage and the
// WISHBONE Master Wrapper.
//
// DEPTH buffers (6 by default, as in the document's setup), each holding
// one complete message of up to MAX_WORDS bus words. A message offered with
// `wr` is stored at the clock edge, so it can be read the cycle after the
// storage request. The oldest message is shown on `head`/`head_valid`; the
// Master Wrapper deletes it with `pop` once it has been delivered to the
// node. Messages leave in arrival order; the document does not give the
// order, and first-in first-out is this design's choice.
module ni_message_queue
  import ni_pkg::*;
#(
  parameter int unsigned DEPTH = MQ_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr,
  input  msg_t   wr_msg,
  output logic   full,
  output logic   head_valid,
  output msg_t   head,
  input  logic   pop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = $clog2(DEPTH > 1 ? DEPTH : 2);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  msg_t          mem [DEPTH];
  logic [PW-1:0] wptr, rptr;

  assign full       = count == CW'(DEPTH);
  assign head_valid = count != '0;
  assign head       = mem[rptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr && !full) wptr <= inc(wptr);
      if (pop && head_valid) rptr <= inc(rptr);
      count <= count + CW'(wr && !full) - CW'(pop && head_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wptr] <= wr_msg;
  end

  a_wr_not_full: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full)
    else $error("message_queue: write while full");
  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid)
    else $error("message_queue: pop while empty");

endmodule
