// tb_ni_wb2noc: self-checking test of the Node-to-NoC pipeline. A bus
// master task drives the slave port; the testbench plays the router: it
// collects the flits and returns one credit per flit unless told to hold.
// Checks:
//  * MW -> MSG2PKT -> VA -> LA timing: the head flit of a one-word write is
//    on the link 5 edges after the edge where the strobe is first sampled
//    (ACK, Packet Buffer write, VC grant, link grant, link register);
//  * packet contents: header, data words, flit types, VC of the right
//    virtual network, flits of one VC in order;
//  * a read request is one head/tail flit on virtual network 0 and enters
//    the On-the-Fly table; the reply data complete the bus read;
//  * with credits withheld: at most 4 flits per VC, credit stall, VC
//    allocation stall, and finally a full Packet Buffer stalling the bus;
//  * a reserved read reply from the Master Wrapper leaves on network 2.
module tb_ni_wb2noc;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic [NODE_W-1:0] node_id = 6'd2;
  logic wbs_cyc_i, wbs_stb_i, wbs_we_i, wbs_ack_o;
  logic [ADDR_W-1:0] wbs_adr_i;
  logic [BUS_W-1:0] wbs_dat_i, wbs_dat_o;
  logic [SEL_W-1:0] wbs_sel_i = '1;
  logic [2:0] wbs_cti_i;
  logic flit_out_valid;
  flit_t flit_out;
  credit_t credit_in;
  logic rsv_req, rsv_gnt, rsp_valid, rsp_ready, otf_valid, otf_ready, otf_full, otf_ins;
  msg_t rsp_msg;
  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data;
  logic [NODE_W-1:0] otf_dst;
  logic [SEQ_W-1:0] otf_seq;
  logic [LEN_W-1:0] otf_len;
  logic [ADDR_W-1:0] otf_addr;
  logic pb_stall, credit_stall, va_stall;
  int checks = 0, failures = 0;
  int n_cr = 0, n_va = 0, n_pb = 0;

  ni_wb2noc dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // router model: per-VC received flits, credits returned 2 cycles later
  flit_t rx [NUM_VC][$];
  int    in_router [NUM_VC];
  logic  hold;
  int    owed [$];
  always @(posedge clk) begin
    credit_in <= '0;
    if (rst_n) begin
      if (flit_out_valid) begin
        rx[flit_out.vc].push_back(flit_out);
        in_router[flit_out.vc]++;
        check(in_router[flit_out.vc] <= ROUTER_BUF, "never more than 4 flits in a router buffer");
        owed.push_back(int'(flit_out.vc));
      end
      if (!hold && owed.size() > 0) begin
        int v;
        v = owed.pop_front();
        in_router[v]--;
        credit_in <= '{valid: 1'b1, vc: VC_W'(v), count: FLITCNT_W'(1)};
      end
      n_cr += int'(credit_stall);
      n_va += int'(va_stall);
      n_pb += int'(pb_stall);
    end
  end

  task automatic bus(bit we, logic [31:0] adr, int len, output logic [63:0] rd [MAX_WORDS]);
    wbs_cyc_i = 1; wbs_we_i = we;
    for (int b = 0; b < len; b++) begin
      wbs_stb_i = 1; wbs_adr_i = adr + 32'(8 * b); wbs_dat_i = {adr, 32'(b)};
      wbs_cti_i = (len == 1) ? 3'b000 : (b == len - 1) ? 3'b111 : 3'b010;
      @(posedge clk);
      while (!wbs_ack_o) @(posedge clk);
      rd[b] = wbs_dat_o;
      #1;
    end
    wbs_cyc_i = 0; wbs_stb_i = 0;
  endtask

  // check the packet at the front of VC v: header fields and data words
  task automatic check_pkt(int v, msg_type_t t, logic [31:0] adr, int len);
    msg_hdr_t h;
    int n;
    n = (t == MSG_RD_REQ) ? 1 : len + 1;
    check(rx[v].size() >= n, $sformatf("packet of %0d flits on VC %0d", n, v));
    if (rx[v].size() < n) return;
    check(v / VC_PER_VNET == int'(t), "VC in the message type's virtual network");
    h = msg_hdr_t'(rx[v][0].data[HDR_W-1:0]);
    check(h.mtype == t && h.addr == adr && h.dst == adr[31:26] && h.src == node_id
          && int'(h.len) == ((t == MSG_RD_REQ && len == 8) ? 8 : len), "header fields");
    for (int f = 0; f < n; f++) begin
      flit_t fl;
      fl = rx[v].pop_front();
      check(fl.ftype == ((n == 1) ? FLIT_HEAD_TAIL : (f == 0) ? FLIT_HEAD : (f == n - 1) ? FLIT_TAIL : FLIT_BODY), "flit type");
      if (f > 0 && t == MSG_WR_REQ) check(fl.data == {adr, 32'(f - 1)}, "data flit");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reply data for reads held by the Slave Wrapper
  initial begin
    otf_valid = 0; otf_data = '0;
    forever begin
      @(negedge clk);
      if (otf_ready) begin
        repeat (5) @(negedge clk);
        for (int w = 0; w < MAX_WORDS; w++) otf_data[w] = 64'hBEEF_0000_0000_0000 | 64'(w);
        otf_valid = 1; @(negedge clk); otf_valid = 0;
      end
    end
  end

  initial begin
    logic [63:0] rd [MAX_WORDS];
    int te, tf;
    wbs_cyc_i = 0; wbs_stb_i = 0; wbs_we_i = 0; wbs_adr_i = 0; wbs_dat_i = 0; wbs_cti_i = 0;
    rsv_req = 0; rsp_valid = 0; rsp_msg = '0; otf_full = 0; hold = 0;
    for (int v = 0; v < NUM_VC; v++) in_router[v] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk); #1;
    // ---- one-word write to node 9: timing and contents
    fork
      bus(1, {6'd9, 26'h100}, 1, rd);
      begin
        @(posedge clk iff (wbs_cyc_i && wbs_stb_i)); te = $time;
        @(posedge clk iff flit_out_valid); tf = $time;
      end
    join
    check((tf - te) / 10 == 5, $sformatf("strobe to head flit on link: %0d edges (expect 5)", (tf - te) / 10));
    repeat (5) @(negedge clk);
    check_pkt(2, MSG_WR_REQ, {6'd9, 26'h100}, 1);
    // ---- 8-word write
    bus(1, {6'd4, 26'h200}, 8, rd);
    repeat (15) @(negedge clk);
    check_pkt(2, MSG_WR_REQ, {6'd4, 26'h200}, 8);
    // ---- single read and line read
    fork
      bus(0, {6'd7, 26'h40}, 1, rd);
      begin @(posedge otf_ins); #1 check(otf_dst == 6'd7 && otf_len == 4'd1, "On-the-Fly entry for the read"); end
    join
    check(rd[0] == 64'hBEEF_0000_0000_0000, "read completed with the reply data");
    check_pkt(0, MSG_RD_REQ, {6'd7, 26'h40}, 1);
    bus(0, {6'd7, 26'h80}, 8, rd);
    for (int w = 0; w < 8; w++) check(rd[w] == (64'hBEEF_0000_0000_0000 | 64'(w)), "line read data");
    check_pkt(0, MSG_RD_REQ, {6'd7, 26'h80}, 8);
    // ---- reply produced by the Master Wrapper, reserved first
    rsv_req = 1; @(posedge clk iff rsv_gnt); #1 rsv_req = 0;
    rsp_msg = '0; rsp_msg.hdr.mtype = MSG_RD_RESP; rsp_msg.hdr.dst = 6'd1; rsp_msg.hdr.src = node_id;
    rsp_msg.hdr.len = 4'd2; rsp_msg.data[0] = 64'h11; rsp_msg.data[1] = 64'h22;
    rsp_valid = 1; @(posedge clk iff rsp_ready); #1 rsp_valid = 0;
    repeat (10) @(negedge clk);
    check(rx[4].size() == 3 && rx[4][1].data == 64'h11 && rx[4][2].data == 64'h22 && rx[4][2].ftype == FLIT_TAIL,
          "read reply on virtual network 2");
    rx[4].delete();
    // ---- back-pressure: no credits come back
    hold = 1;
    fork
      for (int k = 0; k < 6; k++) bus(1, {6'd3, 26'(k * 64)}, 8, rd);
      begin
        repeat (150) @(negedge clk);
        check(in_router[2] == 4 && in_router[3] == 4, "each VC stops after 4 flits");
        check(n_cr > 0, "credit stall seen");
        check(n_va > 0, "VC allocation stall seen");
        check(n_pb > 0, "bus stalled on a full Packet Buffer");
        check(pb_stall && !wbs_ack_o, "fifth write held without ACK");
        hold = 0;
      end
    join
    repeat (200) @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      int v;
      msg_hdr_t h2;
      h2 = (rx[2].size() > 0) ? msg_hdr_t'(rx[2][0].data[HDR_W-1:0]) : '0;
      v = (rx[2].size() > 0 && h2.addr == {6'd3, 26'(k * 64)}) ? 2 : 3;
      check_pkt(v, MSG_WR_REQ, {6'd3, 26'(k * 64)}, 8);
    end
    check(rx[2].size() == 0 && rx[3].size() == 0, "no extra flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
