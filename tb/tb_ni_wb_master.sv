// tb_ni_wb_master: self-checking test of the WISHBONE Master Wrapper (BA
// stage) against a behavioural bus memory. It checks:
//  * a 4-word write request becomes a 4-beat burst (CTI 010...111) at
//    consecutive word addresses, and the message is then deleted;
//  * a read request waits for a Packet Buffer reservation, reads 8 words
//    and offers a read-reply message to the requester with the same
//    sequence number and the words read;
//  * a read reply with an On-the-Fly entry is handed over and clears the
//    entry; one without is dropped and flagged.
module tb_ni_wb_master;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic [NODE_W-1:0] node_id = 6'd3;
  logic mq_valid, mq_pop;
  msg_t mq_msg;
  logic cyc_o, stb_o, we_o, ack_i;
  logic [ADDR_W-1:0] adr_o;
  logic [BUS_W-1:0] dat_o, dat_i;
  logic [SEL_W-1:0] sel_o;
  logic [2:0] cti_o;
  logic rsv_req, rsv_gnt, rsp_valid, rsp_ready;
  msg_t rsp_msg;
  logic [NODE_W-1:0] lk_src;
  logic [SEQ_W-1:0] lk_seq;
  logic lk_hit, lk_clr, otf_valid, otf_ready, stray_reply;
  logic [MAX_WORDS-1:0][BUS_W-1:0] otf_data;
  int writes, reads;
  int checks = 0, failures = 0;

  ni_wb_master dut (.*);
  tb_wb_mem #(.AW(10), .WAIT(1)) mem (
    .clk, .rst_n, .cyc_i (cyc_o), .stb_i (stb_o), .we_i (we_o), .adr_i (adr_o),
    .dat_i (dat_o), .ack_o (ack_i), .dat_o (dat_i), .writes, .reads
  );

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus monitor: record each acknowledged beat
  logic [ADDR_W-1:0] beat_adr [$];
  logic [2:0]        beat_cti [$];
  always @(posedge clk) if (cyc_o && stb_o && ack_i) begin
    beat_adr.push_back(adr_o); beat_cti.push_back(cti_o);
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    mq_valid = 0; mq_msg = '0; rsv_gnt = 0; rsp_ready = 0; lk_hit = 0; otf_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // ---- write request, 4 words at word 0x10
    mq_msg = '0;
    mq_msg.hdr.mtype = MSG_WR_REQ; mq_msg.hdr.src = 6'd1; mq_msg.hdr.len = 4'd4;
    mq_msg.hdr.addr = 32'h0C00_0080;
    for (int w = 0; w < 4; w++) mq_msg.data[w] = 64'hD000_0000_0000_0000 | 64'(w);
    mq_valid = 1;
    t = 0;
    while (!mq_pop) begin @(negedge clk); t++; end
    @(negedge clk); mq_valid = 0;
    check(writes == 4, "4 bus writes");
    check(beat_adr.size() == 4, "4 beats");
    for (int w = 0; w < 4; w++) begin
      check(beat_adr[w] == 32'h0C00_0080 + 32'(8 * w), "consecutive word addresses");
      check(beat_cti[w] == ((w == 3) ? 3'b111 : 3'b010), "burst CTI");
      check(mem.mem[16 + w] == mq_msg.data[w], "word written to memory");
    end
    check(t >= 8, "one bus beat per word (registered ACK plus wait state)");
    beat_adr.delete(); beat_cti.delete();
    // ---- read request, 8 words at word 0x20, from node 2 seq 9
    mq_msg = '0;
    mq_msg.hdr.mtype = MSG_RD_REQ; mq_msg.hdr.src = 6'd2; mq_msg.hdr.dst = node_id;
    mq_msg.hdr.seq = 8'd9; mq_msg.hdr.len = 4'd8; mq_msg.hdr.addr = 32'h0C00_0100;
    mq_valid = 1;
    repeat (5) begin
      @(negedge clk);
      check(rsv_req && !cyc_o, "read waits for a Packet Buffer reservation");
    end
    rsv_gnt = 1; @(negedge clk); rsv_gnt = 0;
    while (!rsp_valid) @(negedge clk);
    check(reads == 8, "8 bus reads");
    check(rsp_msg.hdr.mtype == MSG_RD_RESP && rsp_msg.hdr.dst == 6'd2 && rsp_msg.hdr.src == node_id
          && rsp_msg.hdr.seq == 8'd9 && rsp_msg.hdr.len == 4'd8, "read reply header");
    for (int w = 0; w < 8; w++) check(rsp_msg.data[w] == mem.mem[32 + w], "read reply data");
    check(!mq_pop, "message kept until the reply is taken");
    rsp_ready = 1; #1 check(mq_pop, "message deleted when the reply is taken");
    @(negedge clk); rsp_ready = 0; mq_valid = 0;
    // ---- read reply matching an On-the-Fly entry
    mq_msg = '0;
    mq_msg.hdr.mtype = MSG_RD_RESP; mq_msg.hdr.src = 6'd7; mq_msg.hdr.seq = 8'd44; mq_msg.hdr.len = 4'd1;
    mq_msg.data[0] = 64'h1234_5678_9ABC_DEF0;
    mq_valid = 1; lk_hit = 1; #1;
    check(lk_src == 6'd7 && lk_seq == 8'd44, "lookup by source and sequence");
    check(otf_valid && otf_data[0] == 64'h1234_5678_9ABC_DEF0 && !mq_pop, "reply offered to the Slave Wrapper");
    @(negedge clk); otf_ready = 1; #1;
    check(lk_clr && mq_pop, "entry cleared and message deleted on hand-over");
    @(negedge clk); otf_ready = 0; lk_hit = 0; #1;
    check(stray_reply && mq_pop, "reply without entry dropped");
    @(negedge clk); mq_valid = 0;
    check(reads == 8 && writes == 4, "replies use no bus cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
