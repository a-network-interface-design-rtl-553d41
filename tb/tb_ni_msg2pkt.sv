// tb_ni_msg2pkt: self-checking test of message packaging. For each message
// type and every length 1..8 it checks the flit count, the flit types
// (head/tail, head, body, tail), the virtual network, the header in the
// head flit and each data word in its flit.
module tb_ni_msg2pkt;
  import ni_pkg::*;
  msg_t msg;
  pkt_t pkt;
  int checks = 0, failures = 0;

  ni_msg2pkt dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3; t++) begin
      for (int len = 1; len <= MAX_WORDS; len++) begin
        int n, vn;
        msg = '0;
        msg.hdr.mtype = msg_type_t'(t);
        msg.hdr.dst = 6'(len); msg.hdr.src = 6'(t); msg.hdr.seq = 8'(len * 3);
        msg.hdr.len = LEN_W'(len); msg.hdr.addr = 32'h0800_0000 + 32'(len);
        for (int w = 0; w < MAX_WORDS; w++) msg.data[w] = {$urandom, $urandom};
        #1;
        n  = (t == 0) ? 1 : len + 1;
        vn = t;   // RD_REQ->0, WR_REQ->1, RD_RESP->2
        check(pkt.nflits == n, "flit count");
        check(pkt.vnet == vn, "virtual network");
        check(pkt.data[0][HDR_W-1:0] == msg.hdr, "header in head flit");
        if (n == 1) check(pkt.ftype[0] == FLIT_HEAD_TAIL, "single flit is head/tail");
        else begin
          check(pkt.ftype[0] == FLIT_HEAD, "first flit is head");
          check(pkt.ftype[n-1] == FLIT_TAIL, "last flit is tail");
          for (int f = 1; f < n - 1; f++) check(pkt.ftype[f] == FLIT_BODY, "middle flits are body");
          for (int w = 0; w < n - 1; w++) check(pkt.data[w+1] == msg.data[w], "data word in flit");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
