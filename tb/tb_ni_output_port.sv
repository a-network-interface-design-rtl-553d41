// tb_ni_output_port: self-checking test of the Output Port. Checks that a
// sent flit is on the link one cycle later, that each flit uses one credit
// of its VC (4 at reset), that returned credits are added back, and that a
// VC becomes idle only when its tail has left and all credits are back.
module tb_ni_output_port;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic [NUM_VC-1:0] vc_claim, vc_idle, vc_has_credit;
  logic send, flit_out_valid;
  flit_t send_flit, flit_out;
  credit_t credit_in;
  int checks = 0, failures = 0;

  ni_output_port dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tx(int vc, flit_type_t t);
    send = 1; send_flit.vc = VC_W'(vc); send_flit.ftype = t; send_flit.data = {$urandom, $urandom};
    @(negedge clk);
    send = 0;
    check(flit_out_valid && flit_out == send_flit, "flit on link one cycle after winning");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vc_claim = '0; send = 0; send_flit = '0; credit_in = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(vc_idle == '1 && vc_has_credit == '1, "all VCs idle with credit");
    vc_claim = 6'b100000; @(negedge clk); vc_claim = '0;
    check(!vc_idle[5] && vc_idle[4], "claimed VC busy");
    tx(5, FLIT_HEAD); tx(5, FLIT_BODY); tx(5, FLIT_BODY); tx(5, FLIT_BODY);
    check(!vc_has_credit[5], "4 flits use the 4 credits");
    @(negedge clk);
    check(!flit_out_valid, "link idle without send");
    credit_in = '{valid: 1'b1, vc: 3'd5, count: 4'd1}; @(negedge clk); credit_in = '0;
    check(vc_has_credit[5], "returned credit usable");
    tx(5, FLIT_TAIL);
    check(!vc_idle[5], "VC stays busy until credits return");
    credit_in = '{valid: 1'b1, vc: 3'd5, count: 4'd3}; @(negedge clk); credit_in = '0;
    check(!vc_idle[5], "still busy with one credit missing");
    credit_in = '{valid: 1'b1, vc: 3'd5, count: 4'd1}; @(negedge clk); credit_in = '0;
    check(vc_idle[5] && vc_has_credit[5], "idle again when tail sent and credits full");
    // single-flit packet; credit returns in the same cycle the flit leaves
    vc_claim = 6'b000001; @(negedge clk); vc_claim = '0;
    tx(0, FLIT_HEAD_TAIL);
    credit_in = '{valid: 1'b1, vc: 3'd0, count: 4'd1}; @(negedge clk); credit_in = '0;
    check(vc_idle[0], "head/tail packet frees its VC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
