// tb_ni_packet_buffer: self-checking test of the Packet Buffer. Fills all 4
// slots, checks the free count, that a stored packet asks for a VC first
// and for the link only after a VC grant, that link grants deliver its
// flits in order stamped with the granted VC, and that the slot is free
// (and refillable) the cycle after its tail won the link.
module tb_ni_packet_buffer;
  import ni_pkg::*;
  localparam int D = PB_DEPTH;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic wr, la_gnt;
  pkt_t wr_pkt;
  logic [2:0] free_cnt;
  logic [D-1:0] va_req, va_gnt, la_req;
  logic [D-1:0][VNET_W-1:0] slot_vnet;
  logic [VC_W-1:0] va_vc [D];
  logic [D-1:0][VC_W-1:0] slot_vc;
  logic [1:0] la_idx;
  flit_t la_flit;
  msg_t msgs [D];
  pkt_t pkts [D];
  int checks = 0, failures = 0;

  ni_packet_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference packet built independently of the RTL packaging
  function automatic pkt_t ref_pkt(int k);
    pkt_t p;
    int n;
    p = '0;
    n = (k % 2 == 0) ? 1 + MAX_WORDS : 1;
    p.nflits = 4'(n);
    p.vnet = (k % 2 == 0) ? 2'd1 : 2'd0;
    for (int f = 0; f < n; f++) begin
      p.data[f] = {32'(k), 32'(f)};
      p.ftype[f] = (n == 1) ? FLIT_HEAD_TAIL : (f == 0) ? FLIT_HEAD :
                   (f == n - 1) ? FLIT_TAIL : FLIT_BODY;
    end
    return p;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; wr_pkt = '0; va_gnt = '0; la_gnt = 0; la_idx = '0;
    for (int s = 0; s < D; s++) begin va_vc[s] = '0; msgs[s] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(free_cnt == 3'd4 && va_req == '0 && la_req == '0, "empty after reset");
    for (int k = 0; k < D; k++) begin
      pkts[k] = ref_pkt(k);
      wr = 1; wr_pkt = pkts[k]; @(negedge clk);
    end
    wr = 0;
    check(free_cnt == 3'd0, "full after 4 packets");
    check(va_req == 4'b1111 && la_req == '0, "all wait for a VC, none for the link");
    check(slot_vnet[0] == 2'd1 && slot_vnet[1] == 2'd0, "virtual network per slot");
    // grant VC 3 to slot 0 and VC 1 to slot 1
    va_gnt = 4'b0011; va_vc[0] = 3'd3; va_vc[1] = 3'd1; @(negedge clk); va_gnt = '0;
    check(la_req == 4'b0011 && va_req == 4'b1100, "granted slots move to link allocation");
    check(slot_vc[0] == 3'd3 && slot_vc[1] == 3'd1, "granted VC recorded");
    // send slot 1 (single flit)
    la_gnt = 1; la_idx = 2'd1; #1;
    check(la_flit.ftype == FLIT_HEAD_TAIL && la_flit.vc == 3'd1 && la_flit.data == pkts[1].data[0], "single flit out");
    @(negedge clk); la_gnt = 0;
    check(free_cnt == 3'd1 && !la_req[1], "slot free the cycle after its tail won");
    // refill slot 1 while sending slot 0 flit by flit
    wr = 1; wr_pkt = ref_pkt(7);
    for (int f = 0; f < 1 + MAX_WORDS; f++) begin
      la_gnt = 1; la_idx = 2'd0; #1;
      check(la_flit.vc == 3'd3 && la_flit.data == pkts[0].data[f] && la_flit.ftype == flit_type_t'(pkts[0].ftype[f]),
            $sformatf("flit %0d of slot 0 in order", f));
      @(negedge clk);
      wr = 0;
    end
    la_gnt = 0;
    check(free_cnt == 3'd1 && va_req[1] && !va_req[0], "slot 0 freed, slot 1 refilled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
