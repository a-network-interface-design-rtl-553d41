// tb_ni_noc2wb: self-checking test of the NoC-to-Node pipeline with a
// behavioural bus memory. Flits are driven as a router would. Checks:
//  * BW -> PKT2MSG -> BA timing: the bus strobe of a write packet is seen
//    three clock edges after the edge that wrote its tail flit;
//  * write packets of 1 and 8 words land in memory;
//  * a read request is served after a reservation and produces the right
//    read-reply message; a read reply is looked up and handed over;
//  * credits: each freed VC buffer returns the packet's flit count;
//  * a slow memory fills the 6-message queue and packets then wait in the
//    Input Port (no credit returned) until the queue drains.
module tb_ni_noc2wb;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic [NODE_W-1:0] node_id = 6'd3;
  logic flit_in_valid;
  flit_t flit_in;
  credit_t credit_out;
  logic wbm_cyc_o, wbm_stb_o, wbm_we_o, wbm_ack_i, mem_ack, bus_stall;
  logic [ADDR_W-1:0] wbm_adr_o;
  logic [BUS_W-1:0] wbm_dat_o, wbm_dat_i;
  logic [SEL_W-1:0] wbm_sel_o;
  logic [2:0] wbm_cti_o;
  logic rsv_req, rsv_gnt, rsp_valid, rsp_ready, lk_hit, lk_clr, otf_valid, otf_ready;
  msg_t rsp_msg;
  logic [NODE_W-1:0] lk_src;
  logic [SEQ_W-1:0] lk_seq;
  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data;
  logic stray_reply, mq_full;
  int writes, reads, wait_cycles;
  int checks = 0, failures = 0;
  int credits [NUM_VC];

  ni_noc2wb dut (.*);
  // the bus can be stalled: then the memory sees no strobe and gives no ACK
  assign wbm_ack_i = mem_ack && !bus_stall;
  tb_wb_mem #(.AW(10), .WAIT(0)) mem (
    .clk, .rst_n, .cyc_i (wbm_cyc_o && !bus_stall), .stb_i (wbm_stb_o), .we_i (wbm_we_o), .adr_i (wbm_adr_o),
    .dat_i (wbm_dat_o), .ack_o (mem_ack), .dat_o (wbm_dat_i), .writes, .reads
  );

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NUM_VC-1:0] pending;
  always @(posedge clk) if (credit_out.valid) begin
    credits[credit_out.vc] += int'(credit_out.count);
    pending[credit_out.vc] = 1'b0;
  end

  // send a packet for message m on VC vc, one flit per cycle
  task automatic send(msg_t m, int vc);
    int n;
    n = (m.hdr.mtype == MSG_RD_REQ) ? 1 : int'(m.hdr.len) + 1;
    for (int f = 0; f < n; f++) begin
      flit_in_valid = 1;
      flit_in.vc = VC_W'(vc);
      flit_in.ftype = (n == 1) ? FLIT_HEAD_TAIL : (f == 0) ? FLIT_HEAD : (f == n - 1) ? FLIT_TAIL : FLIT_BODY;
      flit_in.data = (f == 0) ? FLIT_W'(m.hdr) : m.data[f-1];
      @(negedge clk);
    end
    flit_in_valid = 0;
  endtask

  function automatic msg_t wmsg(int word, int len, int k);
    msg_t m;
    m = '0;
    m.hdr.mtype = MSG_WR_REQ; m.hdr.src = 6'd1; m.hdr.dst = 6'd3; m.hdr.seq = 8'(k);
    m.hdr.len = LEN_W'(len); m.hdr.addr = 32'(8 * word);
    for (int w = 0; w < len; w++) m.data[w] = {32'(k), 32'(w) ^ 32'h5A5A};
    return m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t m;
    int te, tb;
    flit_in_valid = 0; flit_in = '0; rsv_gnt = 0; bus_stall = 0; pending = '0; rsp_ready = 0; lk_hit = 0; otf_ready = 0;
    credits = '{default: 0};
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // ---- timing of a one-word write (head + tail flit)
    m = wmsg(100, 1, 1);
    fork
      send(m, 2);
      begin
        @(posedge clk iff (flit_in_valid && is_tail(flit_in.ftype))); te = $time;
        @(posedge clk iff wbm_stb_o); tb = $time;
      end
    join
    check((tb - te) / 10 == 3, $sformatf("tail written to bus strobe: %0d edges (expect 3)", (tb - te) / 10));
    repeat (4) @(negedge clk);
    check(mem.mem[100] == m.data[0], "one-word write in memory");
    check(credits[2] == 2, "credit for both flits of VC 2");
    // ---- 8-word write on VC 3
    m = wmsg(200, 8, 2);
    send(m, 3);
    repeat (30) @(negedge clk);
    for (int w = 0; w < 8; w++) check(mem.mem[200 + w] == m.data[w], "8-word write in memory");
    check(credits[3] == 9, "credit for 9 flits of VC 3");
    // ---- read request from node 5, seq 77, 8 words at word 200
    m = '0; m.hdr.mtype = MSG_RD_REQ; m.hdr.src = 6'd5; m.hdr.dst = 6'd3; m.hdr.seq = 8'd77;
    m.hdr.len = 4'd8; m.hdr.addr = 32'(8 * 200);
    send(m, 0);
    repeat (3) @(negedge clk);
    check(rsv_req && !wbm_cyc_o, "read waits for reservation");
    rsv_gnt = 1; @(negedge clk); rsv_gnt = 0;
    while (!rsp_valid) @(negedge clk);
    check(rsp_msg.hdr.mtype == MSG_RD_RESP && rsp_msg.hdr.dst == 6'd5 && rsp_msg.hdr.src == 6'd3
          && rsp_msg.hdr.seq == 8'd77 && rsp_msg.hdr.len == 4'd8, "read reply header");
    for (int w = 0; w < 8; w++) check(rsp_msg.data[w] == mem.mem[200 + w], "read reply data");
    rsp_ready = 1; @(negedge clk); rsp_ready = 0;
    check(credits[0] == 1, "credit for the read request");
    // ---- read reply (answer to a read this node's Slave Wrapper holds)
    m = '0; m.hdr.mtype = MSG_RD_RESP; m.hdr.src = 6'd5; m.hdr.dst = 6'd3; m.hdr.seq = 8'd12;
    m.hdr.len = 4'd1; m.data[0] = 64'hCAFE_F00D_0000_0001;
    lk_hit = 1;
    send(m, 4);
    while (!otf_valid) @(negedge clk);
    check(lk_src == 6'd5 && lk_seq == 8'd12 && otf_data[0] == 64'hCAFE_F00D_0000_0001, "reply lookup and data");
    otf_ready = 1; #1 check(lk_clr, "entry cleared on hand-over");
    @(negedge clk); otf_ready = 0; lk_hit = 0;
    // ---- Message Queue full: stall the bus and send 12 packets. The one
    // in BA stays in the queue until delivered, so 6 packets fill it; the
    // next 6 stay in the Input Port, one per VC, and return no credit.
    bus_stall = 1;
    for (int k = 0; k < 12; k++) begin
      int v;
      v = k % NUM_VC;
      while (pending[v]) @(negedge clk);
      pending[v] = 1;
      send(wmsg(300 + k, 1, 10 + k), v);
    end
    repeat (5) @(negedge clk);
    check(mq_full, "Message Queue full behind a stalled bus");
    check(pending == '1, "six complete packets held in the Input Port, no credits");
    check(writes == 8 + 1, "nothing written while the bus is stalled");
    bus_stall = 0;
    repeat (200) @(negedge clk);
    for (int k = 0; k < 12; k++) check(mem.mem[300 + k] == wmsg(300 + k, 1, 10 + k).data[0], "queued write delivered");
    check(pending == '0 && !mq_full, "all buffers freed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
