// tb_ni_top: end-to-end test of the network interface at its default sizes.
//
// Two NIs (nodes 0 and 1) are joined by two behavioural NoC links. On each
// node a bus-master task plays the cores and a behavioural memory plays the
// memory slave. The test runs:
//   1. remote line write (8 words) node 0 -> node 1, checked in memory 1;
//   2. remote line read and single-word read, node 0 <- node 1, checked
//      against memory 1 (On-the-Fly table, read-reply path);
//   3. both nodes writing and reading each other at the same time;
//   4. a burst of writes into a slow memory with the link held, which
//      fills the Message Queue and Packet Buffer and exhausts credits;
// then checks every word and counts the mechanisms: write and read
// messages, reply hand-overs, Packet Buffer stalls, credit stalls, VC
// allocation stalls and a full Message Queue. Each must occur at least
// once. It also measures the uncontended latency of a one-word remote
// write, from the bus cycle on node 0 to the bus cycle on node 1.
module tb_ni_top;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- per-node signals
  logic              flit_in_valid [2], flit_out_valid [2];
  flit_t             flit_in [2], flit_out [2];
  credit_t           credit_in [2], credit_out [2];
  logic              wbm_cyc [2], wbm_stb [2], wbm_we [2], wbm_ack [2];
  logic [ADDR_W-1:0] wbm_adr [2];
  logic [BUS_W-1:0]  wbm_dato [2], wbm_dati [2];
  logic [SEL_W-1:0]  wbm_sel [2];
  logic [2:0]        wbm_cti [2];
  logic              wbs_cyc [2], wbs_stb [2], wbs_we [2], wbs_ack [2];
  logic [ADDR_W-1:0] wbs_adr [2];
  logic [BUS_W-1:0]  wbs_dati [2], wbs_dato [2];
  logic [2:0]        wbs_cti [2];
  logic              s_pb [2], s_cr [2], s_va [2], s_mq [2], s_stray [2];
  int                mem_w [2], mem_r [2], fwd [2];
  logic              hold [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    ni_top u_ni (
      .clk, .rst_n, .node_id (6'(n)),
      .flit_in_valid (flit_in_valid[n]), .flit_in (flit_in[n]), .credit_out (credit_out[n]),
      .flit_out_valid (flit_out_valid[n]), .flit_out (flit_out[n]), .credit_in (credit_in[n]),
      .wbm_cyc_o (wbm_cyc[n]), .wbm_stb_o (wbm_stb[n]), .wbm_we_o (wbm_we[n]),
      .wbm_adr_o (wbm_adr[n]), .wbm_dat_o (wbm_dato[n]), .wbm_sel_o (wbm_sel[n]),
      .wbm_cti_o (wbm_cti[n]), .wbm_ack_i (wbm_ack[n]), .wbm_dat_i (wbm_dati[n]),
      .wbs_cyc_i (wbs_cyc[n]), .wbs_stb_i (wbs_stb[n]), .wbs_we_i (wbs_we[n]),
      .wbs_adr_i (wbs_adr[n]), .wbs_dat_i (wbs_dati[n]), .wbs_sel_i ('1),
      .wbs_cti_i (wbs_cti[n]), .wbs_ack_o (wbs_ack[n]), .wbs_dat_o (wbs_dato[n]),
      .stat_pb_stall (s_pb[n]), .stat_credit_stall (s_cr[n]), .stat_va_stall (s_va[n]),
      .stat_mq_full (s_mq[n]), .stat_stray_reply (s_stray[n])
    );
    tb_wb_mem #(.AW(10), .WAIT(n == 1 ? 12 : 1)) u_mem (
      .clk, .rst_n, .cyc_i (wbm_cyc[n]), .stb_i (wbm_stb[n]), .we_i (wbm_we[n]),
      .adr_i (wbm_adr[n]), .dat_i (wbm_dato[n]), .ack_o (wbm_ack[n]), .dat_o (wbm_dati[n]),
      .writes (mem_w[n]), .reads (mem_r[n])
    );
    // link from node n to node 1-n
    tb_noc_link u_link (
      .clk, .rst_n, .hold (hold[n]),
      .in_valid (flit_out_valid[n]), .in_flit (flit_out[n]), .in_credit (credit_in[n]),
      .out_valid (flit_in_valid[1-n]), .out_flit (flit_in[1-n]), .out_credit (credit_out[1-n]),
      .forwarded (fwd[n])
    );
  end

  // ---- mechanism counters
  int n_pb, n_cr, n_va, n_mq, n_wr, n_rd, n_hand, n_rsv, n_stray;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 2; n++) begin
      n_pb    += int'(s_pb[n]);
      n_cr    += int'(s_cr[n]);
      n_va    += int'(s_va[n]);
      n_mq    += int'(s_mq[n]);
      n_stray += int'(s_stray[n]);
    end
    n_hand += int'(g_node[0].u_ni.lk_clr) + int'(g_node[1].u_ni.lk_clr);
    n_rsv  += int'(g_node[0].u_ni.rsv_gnt) + int'(g_node[1].u_ni.rsv_gnt);
    n_wr   += int'(g_node[0].u_ni.otf_ins === 1'b0 && g_node[0].u_ni.u_wb2noc.pb_wr
                   && g_node[0].u_ni.u_wb2noc.pb_msg.hdr.mtype == MSG_WR_REQ);
    n_rd   += int'(g_node[0].u_ni.otf_ins);
  end

  // ---- bus master on node n: burst of `len` beats (1 = classic cycle)
  task automatic bus(int n, bit we, logic [31:0] adr, int len,
                     input logic [63:0] wdata [MAX_WORDS], output logic [63:0] rdata [MAX_WORDS]);
    wbs_cyc[n] = 1; wbs_we[n] = we;
    for (int b = 0; b < len; b++) begin
      wbs_stb[n] = 1; wbs_adr[n] = adr + 32'(8 * b); wbs_dati[n] = wdata[b];
      wbs_cti[n] = (len == 1) ? 3'b000 : (b == len - 1) ? 3'b111 : 3'b010;
      @(posedge clk);
      while (!wbs_ack[n]) @(posedge clk);
      rdata[b] = wbs_dato[n];
      #1;
    end
    wbs_cyc[n] = 0; wbs_stb[n] = 0;
  endtask

  function automatic logic [63:0] pat(int n, int k, int w);
    return {8'hA0 + 8'(n), 24'(k), 32'(w) * 32'h0101_0101};
  endfunction

  logic [31:0] base [2];
  initial begin base[0] = 32'h0000_0000; base[1] = {6'd1, 26'h0}; end

  // remote write of a line and check in the far memory
  task automatic wr_line(int n, int k, int word, int len);
    logic [63:0] wd [MAX_WORDS], rd [MAX_WORDS];
    for (int w = 0; w < MAX_WORDS; w++) wd[w] = pat(n, k, w);
    bus(n, 1, base[1-n] + 32'(8 * word), len, wd, rd);
  endtask

  task automatic rd_check(int n, int word, int len, string what);
    logic [63:0] wd [MAX_WORDS], rd [MAX_WORDS];
    for (int w = 0; w < MAX_WORDS; w++) wd[w] = '0;
    bus(n, 0, base[1-n] + 32'(8 * word), len, wd, rd);
    for (int w = 0; w < len; w++)
      check(rd[w] == ((1 - n) == 1 ? g_node[1].u_mem.mem[word + w] : g_node[0].u_mem.mem[word + w]), what);
  endtask

  task automatic wait_quiet();
    int q;
    q = 0;
    while (q < 40) begin
      @(posedge clk);
      if (flit_out_valid[0] || flit_out_valid[1] || wbm_cyc[0] || wbm_cyc[1]) q = 0; else q++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    n_pb = 0; n_cr = 0; n_va = 0; n_mq = 0; n_wr = 0; n_rd = 0; n_hand = 0; n_rsv = 0; n_stray = 0;
    for (int n = 0; n < 2; n++) begin
      wbs_cyc[n] = 0; wbs_stb[n] = 0; wbs_we[n] = 0; wbs_adr[n] = 0; wbs_dati[n] = 0; wbs_cti[n] = 0;
      hold[n] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk); #1;

    // ---- 0. latency of a one-word remote write, no contention
    fork
      wr_line(0, 99, 512, 1);
      begin
        @(posedge clk iff (wbs_cyc[0] && wbs_stb[0])); t0 = $time;
        @(posedge clk iff (wbm_cyc[1] && wbm_stb[1])); t1 = $time;
      end
    join
    wait_quiet();
    // Edges after the first strobe on node 0 (edge 0): ACK 1, Packet Buffer
    // write 2, VC grant 3, link grant and link register 4 (head) and 5
    // (tail); the link model queues a flit at the next edge and forwards it
    // at the one after (head 6, tail 7); node 1 writes the flits 7 and 8,
    // converts the packet 9, the Master Wrapper leaves idle 10 and the
    // strobe is seen at edge 11.
    $display("one-word remote write: bus to bus %0d cycles", (t1 - t0) / 10);
    check((t1 - t0) / 10 == 11, "uncontended one-word write latency (11 cycles)");
    check(g_node[1].u_mem.mem[512] == pat(0, 99, 0), "single word written");

    // ---- 1. remote line write
    wr_line(0, 1, 16, 8);
    wait_quiet();
    for (int w = 0; w < 8; w++) check(g_node[1].u_mem.mem[16 + w] == pat(0, 1, w), "line written in node 1 memory");

    // ---- 2. remote reads
    rd_check(0, 16, 8, "line read back");
    rd_check(0, 40, 1, "single word read");
    wait_quiet();

    // ---- 3. both directions at once
    fork
      begin wr_line(0, 2, 64, 8); rd_check(0, 16, 8, "concurrent read 0<-1"); end
      begin wr_line(1, 3, 128, 8); rd_check(1, 136, 8, "concurrent read 1<-0"); end
    join
    rd_check(1, 200, 4, "node 1 reads 4 words of node 0");
    wait_quiet();
    for (int w = 0; w < 8; w++) begin
      check(g_node[1].u_mem.mem[64 + w] == pat(0, 2, w), "node 0 line in node 1");
      check(g_node[0].u_mem.mem[128 + w] == pat(1, 3, w), "node 1 line in node 0");
    end

    // ---- 4. congestion: hold the link from node 0, write 12 lines, release
    hold[0] = 1;
    fork
      begin
        for (int k = 0; k < 12; k++) wr_line(0, 10 + k, 256 + 8 * k, 8);
      end
      begin
        repeat (300) @(posedge clk);
        hold[0] = 0;
      end
    join
    wait_quiet();
    for (int k = 0; k < 12; k++)
      for (int w = 0; w < 8; w++)
        check(g_node[1].u_mem.mem[256 + 8 * k + w] == pat(0, 10 + k, w), "congested line delivered");
    rd_check(0, 256 + 8 * 11, 8, "last congested line read back");
    wait_quiet();

    // ---- mechanisms
    $display("mechanisms: wr_msgs=%0d rd_reqs=%0d reply_handovers=%0d reservations=%0d pb_stall=%0d credit_stall=%0d va_stall=%0d mq_full=%0d",
             n_wr, n_rd, n_hand, n_rsv, n_pb, n_cr, n_va, n_mq);
    check(n_wr > 0,   "write messages sent");
    check(n_rd > 0,   "read requests with On-the-Fly entries");
    check(n_hand > 0, "read replies handed to the Slave Wrapper");
    check(n_rsv > 0,  "Packet Buffer reservations for replies");
    check(n_pb > 0,   "bus stalled on a full Packet Buffer");
    check(n_cr > 0,   "link allocation stalled on credits");
    check(n_va > 0,   "VC allocation stalled on busy VCs");
    check(n_mq > 0,   "Message Queue full");
    check(n_stray == 0, "no reply without an On-the-Fly entry");
    check(mem_w[1] == 1 + 8 + 8 + 96 && mem_w[0] == 8, "bus write count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
