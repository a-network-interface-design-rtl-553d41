// tb_ni_pkt2msg: self-checking test of the PKT2MSG stage. Several VCs hold
// complete packets; the stage must convert one per cycle while the Message
// Queue has room, in round-robin order, free the matching VC and rebuild
// the message (header from the head flit, words from the other flits). It
// must convert nothing while the queue is full.
module tb_ni_pkt2msg;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic [NUM_VC-1:0] pkt_ready;
  pkt_t [NUM_VC-1:0] pkt_in;
  logic free_valid, mq_full, mq_wr;
  logic [VC_W-1:0] free_vc;
  msg_t mq_msg;
  msg_t exp [NUM_VC];
  int checks = 0, failures = 0;

  ni_pkt2msg dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_ready = '0; pkt_in = '0; mq_full = 1;
    for (int v = 0; v < NUM_VC; v++) begin
      int len;
      len = (v % 2 == 0) ? 1 : MAX_WORDS;
      exp[v] = '0;
      exp[v].hdr.mtype = (v % 2 == 0) ? MSG_RD_REQ : MSG_WR_REQ;
      exp[v].hdr.seq = SEQ_W'(v + 10);
      exp[v].hdr.len = LEN_W'(len);
      exp[v].hdr.addr = 32'hABC0_0000 + 32'(v);
      pkt_in[v].data[0] = FLIT_W'(exp[v].hdr);
      pkt_in[v].nflits = (v % 2 == 0) ? 4'd1 : 4'(len + 1);
      if (v % 2 == 1)
        for (int w = 0; w < len; w++) begin
          exp[v].data[w] = {$urandom, $urandom};
          pkt_in[v].data[w+1] = exp[v].data[w];
        end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    pkt_ready = 6'b101101;
    @(negedge clk);
    check(!mq_wr && !free_valid, "nothing converted while the queue is full");
    mq_full = 0;
    // expect VCs 0,2,3,5 in round-robin order
    foreach (exp[v]) begin
      if (pkt_ready[v]) begin
        #1;
        check(mq_wr && free_valid && free_vc == VC_W'(v), $sformatf("VC %0d converted in turn", v));
        check(mq_msg == exp[v], $sformatf("message of VC %0d", v));
        @(negedge clk);
        pkt_ready[v] = 0;
      end
    end
    #1 check(!mq_wr, "idle when no packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
