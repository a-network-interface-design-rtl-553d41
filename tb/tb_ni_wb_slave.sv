// tb_ni_wb_slave: self-checking test of the WISHBONE Slave Wrapper (MW
// stage). A bus master task drives it; the Packet Buffer free count, the
// Master Wrapper and the On-the-Fly table are modelled by the testbench.
// It checks that a write burst becomes one write-request message (header
// from the address, all words, increasing sequence numbers), that a full
// Packet Buffer stalls the bus without ACK, that a read becomes a read
// request plus an On-the-Fly entry and the bus is held until the reply data
// arrive, and that reservations for the Master Wrapper's replies are
// honoured.
module tb_ni_wb_slave;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic [NODE_W-1:0] node_id = 6'd1;
  logic cyc_i, stb_i, we_i, ack_o;
  logic [ADDR_W-1:0] adr_i;
  logic [BUS_W-1:0] dat_i, dat_o;
  logic [SEL_W-1:0] sel_i;
  logic [2:0] cti_i;
  logic [2:0] pb_free;
  logic pb_wr, rsv_req, rsv_gnt, rsp_valid, rsp_ready, otf_valid, otf_ready;
  msg_t pb_msg, rsp_msg;
  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data;
  logic otf_full, otf_ins, pb_stall;
  logic [NODE_W-1:0] otf_dst;
  logic [SEQ_W-1:0] otf_seq;
  logic [LEN_W-1:0] otf_len;
  logic [ADDR_W-1:0] otf_addr;
  int checks = 0, failures = 0;
  int stall_cycles = 0;
  msg_t got [$];
  logic [BUS_W-1:0] rd_words [$];

  ni_wb_slave dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (pb_wr) got.push_back(pb_msg);
    if (pb_stall) stall_cycles++;
  end

  // WISHBONE bus master: burst of n beats (n == 1: classic cycle)
  task automatic bus(bit we, logic [31:0] adr, int n);
    cyc_i = 1; we_i = we;
    for (int b = 0; b < n; b++) begin
      stb_i = 1; adr_i = adr + 32'(8 * b);
      dat_i = {adr, 32'(b)};
      cti_i = (n == 1) ? 3'b000 : (b == n - 1) ? 3'b111 : 3'b010;
      @(posedge clk);
      while (!ack_o) @(posedge clk);
      if (!we) rd_words.push_back(dat_o);
      #1;
    end
    cyc_i = 0; stb_i = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Master Wrapper / table model: answers a pending read with known data
  initial begin
    otf_valid = 0; otf_data = '0;
    forever begin
      @(negedge clk);
      if (otf_ready && !otf_valid) begin
        repeat (6) @(negedge clk);
        for (int w = 0; w < MAX_WORDS; w++) otf_data[w] = 64'hFEED_0000_0000_0000 | 64'(w);
        otf_valid = 1;
        @(negedge clk);
        otf_valid = 0;
      end
    end
  end

  initial begin
    cyc_i = 0; stb_i = 0; we_i = 0; adr_i = 0; dat_i = 0; sel_i = '1; cti_i = 0;
    pb_free = 3'd4; rsv_req = 0; rsp_valid = 0; rsp_msg = '0; otf_full = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // ---- 4-word write to node 5
    bus(1, {6'd5, 26'h40}, 4);
    repeat (3) @(negedge clk);
    check(got.size() == 1, "one message per write burst");
    check(got[0].hdr.mtype == MSG_WR_REQ && got[0].hdr.dst == 6'd5 && got[0].hdr.src == 6'd1
          && got[0].hdr.len == 4'd4 && got[0].hdr.seq == 8'd0 && got[0].hdr.addr == {6'd5, 26'h40}, "write header");
    for (int w = 0; w < 4; w++) check(got[0].data[w] == {{6'd5, 26'h40}, 32'(w)}, "write data");
    // ---- Packet Buffer full: bus stalls until a slot frees
    pb_free = 3'd0;
    fork
      bus(1, {6'd2, 26'h0}, 1);
      begin
        repeat (10) @(negedge clk);
        check(!ack_o && got.size() == 1, "no ACK while the Packet Buffer is full");
        pb_free = 3'd1;
      end
    join
    repeat (3) @(negedge clk);
    check(stall_cycles >= 9, "stall observed");
    check(got.size() == 2 && got[1].hdr.seq == 8'd1 && got[1].hdr.len == 4'd1, "stalled write delivered");
    pb_free = 3'd4;
    // ---- single-word read from node 6
    bus(0, {6'd6, 26'h88}, 1);
    check(got.size() == 3 && got[2].hdr.mtype == MSG_RD_REQ && got[2].hdr.len == 4'd1
          && got[2].hdr.dst == 6'd6 && got[2].hdr.seq == 8'd2, "read request message");
    check(rd_words.size() == 1 && rd_words[0] == 64'hFEED_0000_0000_0000, "read data from reply");
    // ---- burst read: a line of 8 words
    fork
      bus(0, {6'd6, 26'h100}, 8);
      begin
        @(posedge otf_ins);
        #1 check(otf_dst == 6'd6 && otf_seq == 8'd3 && otf_len == 4'd8 && otf_addr == {6'd6, 26'h100}, "On-the-Fly entry");
      end
    join
    check(got[3].hdr.len == 4'd8, "burst read asks for a line");
    for (int w = 0; w < 8; w++) check(rd_words[1 + w] == (64'hFEED_0000_0000_0000 | 64'(w)), "burst read data");
    // ---- reservation: one free slot reserved for a reply blocks a new write
    pb_free = 3'd1;
    rsv_req = 1; #1 check(rsv_gnt, "reservation granted with a free slot");
    @(posedge clk); #1 rsv_req = 0;
    fork
      bus(1, {6'd4, 26'h0}, 1);
      begin
        repeat (4) @(negedge clk);
        check(!ack_o && got.size() == 4, "write waits: the only slot is reserved");
        rsp_valid = 1; rsp_msg = '0; rsp_msg.hdr.mtype = MSG_RD_RESP; rsp_msg.hdr.seq = 8'hAB;
        #1 check(rsp_ready && pb_wr && pb_msg == rsp_msg, "reply written into the reserved slot");
        @(negedge clk); rsp_valid = 0;
        check(got.size() == 5 && got[4].hdr.seq == 8'hAB, "reply stored");
        // slot consumed by the reply; freeing one lets the write go
        pb_free = 3'd0; repeat (2) @(negedge clk); pb_free = 3'd1;
      end
    join
    repeat (3) @(negedge clk);
    check(got.size() == 6 && got[5].hdr.mtype == MSG_WR_REQ && got[5].hdr.dst == 6'd4, "write after the reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
