// tb_ni_input_port: self-checking test of the Input Port (BW stage).
// Interleaves flits of packets on several VCs, checks that a buffer reports
// a complete packet exactly when its tail has been written (the cycle after
// the tail arrives), that the stored flits, count and virtual network are
// right, and that freeing a buffer returns a credit for all its flits one
// cycle later.
module tb_ni_input_port;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic flit_in_valid, free_valid;
  flit_t flit_in;
  credit_t credit_out;
  logic [NUM_VC-1:0] pkt_ready;
  pkt_t [NUM_VC-1:0] pkt_out;
  logic [VC_W-1:0] free_vc;
  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] exp_data [NUM_VC][MAX_PKT_FLITS];
  int exp_len [NUM_VC];

  ni_input_port dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(int vc, int f, int n);
    flit_in_valid = 1;
    flit_in.vc = VC_W'(vc);
    flit_in.ftype = (n == 1) ? FLIT_HEAD_TAIL : (f == 0) ? FLIT_HEAD :
                    (f == n - 1) ? FLIT_TAIL : FLIT_BODY;
    flit_in.data = {$urandom, $urandom};
    exp_data[vc][f] = flit_in.data;
    exp_len[vc] = n;
    @(negedge clk);
    flit_in_valid = 0;
  endtask

  task automatic check_pkt(int vc);
    check(pkt_ready[vc], "packet complete");
    check(int'(pkt_out[vc].nflits) == exp_len[vc], "flit count");
    check(int'(pkt_out[vc].vnet) == vc / VC_PER_VNET, "vnet of VC");
    for (int f = 0; f < exp_len[vc]; f++)
      check(pkt_out[vc].data[f] == exp_data[vc][f], "stored flit data");
    check(is_tail(pkt_out[vc].ftype[exp_len[vc]-1]), "tail type stored");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_in_valid = 0; flit_in = '0; free_valid = 0; free_vc = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(pkt_ready == '0 && !credit_out.valid, "idle after reset");
    // 9-flit packet on VC 5 interleaved with a 3-flit packet on VC 2 and a
    // single-flit packet on VC 0
    send(5, 0, 9);
    send(2, 0, 3);
    send(5, 1, 9);
    send(0, 0, 1);
    check(pkt_ready == 6'b000001, "head/tail packet complete at once, others not");
    send(2, 1, 3);
    send(2, 2, 3);
    check(pkt_ready[2], "VC2 complete after its tail");
    for (int f = 2; f < 9; f++) begin
      check(!pkt_ready[5], "VC5 not complete before its tail");
      send(5, f, 9);
    end
    check_pkt(0); check_pkt(2); check_pkt(5);
    // free VC 5: credit of 9 one cycle later
    free_valid = 1; free_vc = 3'd5; @(negedge clk); free_valid = 0;
    check(credit_out.valid && credit_out.vc == 3'd5 && credit_out.count == 4'd9, "credit for 9 flits");
    check(!pkt_ready[5] && pkt_ready[2] && pkt_ready[0], "only VC5 freed");
    @(negedge clk);
    check(!credit_out.valid, "credit is a one-cycle pulse");
    free_valid = 1; free_vc = 3'd2; @(negedge clk); free_valid = 0;
    check(credit_out.valid && credit_out.vc == 3'd2 && credit_out.count == 4'd3, "credit for 3 flits");
    // reuse VC 5 with a new packet
    send(5, 0, 2); send(5, 1, 2);
    check_pkt(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
