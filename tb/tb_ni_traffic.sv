// tb_ni_traffic: synthetic traffic through the network interfaces of a
// K x K mesh of tiles (8 x 8 by default, 64 tiles), with every NI at its
// default parameters.
//
// Each tile has an ni_top, a memory on the NI's master port and a traffic
// generator driving the NI's slave port, as a core would. The tiles are
// joined by a behavioural mesh network (tb_noc_mesh). Three destination
// patterns run one after the other, T transactions per tile each:
//   uniform random  - any other tile,
//   tornado         - x' = (x + K/2 - 1) mod K, same row,
//   bit complement  - node id with every bit inverted.
// A transaction is a remote write of 2, 4 or 8 words (3, 5 or 9 flit
// packets) or a remote read of 1 or 8 words (a 1-flit request, answered by
// a 2- or 9-flit reply). Tiles issue transactions back to back.
//
// Checks: every read returns the destination memory's contents (reads go
// to a region no one writes); every written word is found in the
// destination memory at the end of each pattern (each source writes its
// own slots, each slot once, so arrival order does not matter); packets of
// 1, 3, 5 and 9 flits all occur in each pattern; no read reply goes
// unmatched; every transaction completes before the watchdog. The average
// bus time of a transaction per pattern is printed.
module tb_ni_traffic;
  import ni_pkg::*;
  localparam int K    = 8;
  localparam int NN   = K * K;
  localparam int T    = 24;                 // transactions per tile and pattern
  localparam int AW   = 12;                 // memory: 4096 words per tile
  localparam int WREG = 2048 / NN;          // words each source may write in a tile
  localparam int RBASE = 2048;              // read-only region

  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic              flit_in_valid [NN], flit_out_valid [NN];
  flit_t             flit_in [NN], flit_out [NN];
  credit_t           credit_in [NN], credit_out [NN];
  logic              wbm_cyc [NN], wbm_stb [NN], wbm_we [NN], wbm_ack [NN];
  logic [ADDR_W-1:0] wbm_adr [NN];
  logic [BUS_W-1:0]  wbm_dato [NN], wbm_dati [NN];
  logic [SEL_W-1:0]  wbm_sel [NN];
  logic [2:0]        wbm_cti [NN];
  logic              wbs_cyc [NN], wbs_stb [NN], wbs_we [NN], wbs_ack [NN];
  logic [ADDR_W-1:0] wbs_adr [NN];
  logic [BUS_W-1:0]  wbs_dati [NN], wbs_dato [NN];
  logic [2:0]        wbs_cti [NN];
  logic              s_pb [NN], s_cr [NN], s_va [NN], s_mq [NN], s_stray [NN];
  int                mem_w [NN], mem_r [NN];
  int                pkts_by_len [MAX_PKT_FLITS+1];
  int                in_flight;

  // expected contents of the written region of every tile
  logic [63:0] exp_mem [NN][2048];
  bit          exp_v   [NN][2048];
  int          bad [NN], cmp [NN];
  logic        do_cmp = 0;

  for (genvar n = 0; n < NN; n++) begin : g_node
    ni_top u_ni (
      .clk, .rst_n, .node_id (NODE_W'(n)),
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
    tb_wb_mem #(.AW(AW), .WAIT(1 + n % 3)) u_mem (
      .clk, .rst_n, .cyc_i (wbm_cyc[n]), .stb_i (wbm_stb[n]), .we_i (wbm_we[n]),
      .adr_i (wbm_adr[n]), .dat_i (wbm_dato[n]), .ack_o (wbm_ack[n]), .dat_o (wbm_dati[n]),
      .writes (mem_w[n]), .reads (mem_r[n])
    );
    // compare this tile's memory with the expected image
    always @(posedge do_cmp) begin
      bad[n] = 0; cmp[n] = 0;
      for (int w = 0; w < 2048; w++)
        if (exp_v[n][w]) begin
          cmp[n]++;
          if (u_mem.mem[w] != exp_mem[n][w]) bad[n]++;
        end
    end
  end

  tb_noc_mesh #(.K(K)) u_net (
    .clk, .rst_n,
    .in_valid (flit_out_valid), .in_flit (flit_out), .in_credit (credit_in),
    .out_valid (flit_in_valid), .out_flit (flit_in), .out_credit (credit_out),
    .pkts_by_len, .in_flight
  );

  int n_stray, n_pb, n_cr, n_va, n_mq;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      n_stray += int'(s_stray[n]);
      n_pb    += int'(s_pb[n]);
      n_cr    += int'(s_cr[n]);
      n_va    += int'(s_va[n]);
      n_mq    += int'(s_mq[n]);
    end
  end

  // ---- one bus transaction on the slave port of tile n
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

  // initial memory contents (as tb_wb_mem fills it)
  function automatic logic [63:0] init_word(int i);
    return {32'hC0DE_0000 | 32'(i), 32'(i) * 32'd7};
  endfunction

  function automatic int dest(int pat, int n, int r);
    int d;
    case (pat)
      0: begin d = r % (NN - 1); if (d >= n) d++; end
      1: d = (n / K) * K + ((n % K) + K / 2 - 1) % K;
      default: d = ~n & (NN - 1);
    endcase
    return d;
  endfunction

  int     wptr   [NN][NN];     // next free write slot per (source, destination)
  int     n_tr   [3], tr_cyc [3];
  int     rd_err, rd_words;
  string  pname [3] = '{"uniform random", "tornado", "bit complement"};

  task automatic tile(int pat, int n);
    int unsigned seed;
    logic [63:0] wd [MAX_WORDS], rd [MAX_WORDS];
    seed = 32'h1234_5678 ^ (32'(n) * 32'h9E37_79B9) ^ 32'(pat);
    for (int t = 0; t < T; t++) begin
      int r, d, len, kind;
      longint t0;
      seed = seed * 32'd1664525 + 32'd1013904223;
      r    = int'(seed >> 8);
      d    = dest(pat, n, r);
      kind = (r >> 12) % 10;
      len  = kind < 3 ? 8 : kind < 4 ? 1 : kind < 6 ? 2 : kind < 8 ? 4 : 8;
      t0   = $time;
      if (kind >= 4 && wptr[n][d] + len <= WREG) begin
        int base;
        base = n * WREG + wptr[n][d];
        wptr[n][d] += len;
        for (int w = 0; w < MAX_WORDS; w++) wd[w] = {8'(pat + 1), 8'(n), 8'(d), 8'(t), 32'(base + w)};
        for (int w = 0; w < len; w++) begin
          exp_mem[d][base + w] = wd[w];
          exp_v[d][base + w]   = 1;
        end
        bus(n, 1, {NODE_W'(d), 26'(8 * base)}, len, wd, rd);
      end else begin
        int word;
        if (kind >= 4) len = 1;
        word = RBASE + ((r >> 4) % 255) * 8;
        for (int w = 0; w < MAX_WORDS; w++) wd[w] = '0;
        bus(n, 0, {NODE_W'(d), 26'(8 * word)}, len, wd, rd);
        for (int w = 0; w < len; w++) begin
          rd_words++;
          if (rd[w] != init_word(word + w)) rd_err++;
        end
      end
      n_tr[pat]++;
      tr_cyc[pat] += int'(($time - t0) / 10);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len_before [MAX_PKT_FLITS+1];
    n_stray = 0; n_pb = 0; n_cr = 0; n_va = 0; n_mq = 0; rd_err = 0; rd_words = 0;
    for (int n = 0; n < NN; n++) begin
      wbs_cyc[n] = 0; wbs_stb[n] = 0; wbs_we[n] = 0; wbs_adr[n] = 0; wbs_dati[n] = 0; wbs_cti[n] = 0;
      for (int d = 0; d < NN; d++) wptr[n][d] = 0;
      for (int w = 0; w < 2048; w++) begin exp_v[n][w] = 0; exp_mem[n][w] = '0; end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk); #1;

    for (int pat = 0; pat < 3; pat++) begin
      n_tr[pat] = 0; tr_cyc[pat] = 0;
      for (int l = 0; l <= MAX_PKT_FLITS; l++) len_before[l] = pkts_by_len[l];
      for (int n = 0; n < NN; n++) begin
        automatic int nn = n, pp = pat;
        fork tile(pp, nn); join_none
      end
      wait fork;
      // let the last writes land
      while (in_flight != 0) @(posedge clk);
      repeat (60) @(posedge clk);
      do_cmp = 1; #1 do_cmp = 0;
      begin
        int nb, nc;
        nb = 0; nc = 0;
        for (int n = 0; n < NN; n++) begin nb += bad[n]; nc += cmp[n]; end
        check(nb == 0, $sformatf("%s: %0d of %0d written words wrong", pname[pat], nb, nc));
        check(nc > 0, $sformatf("%s: words written", pname[pat]));
      end
      check(n_tr[pat] == NN * T, $sformatf("%s: all transactions done", pname[pat]));
      for (int l = 1; l <= MAX_PKT_FLITS; l++)
        if (l == 1 || l == 3 || l == 5 || l == 9)
          check(pkts_by_len[l] > len_before[l], $sformatf("%s: %0d-flit packets occur", pname[pat], l));
      $display("%s: %0d transactions, average %0d bus cycles each; packets of 1/2/3/5/9 flits: %0d/%0d/%0d/%0d/%0d",
               pname[pat], n_tr[pat], tr_cyc[pat] / n_tr[pat],
               pkts_by_len[1] - len_before[1], pkts_by_len[2] - len_before[2], pkts_by_len[3] - len_before[3],
               pkts_by_len[5] - len_before[5], pkts_by_len[9] - len_before[9]);
    end
    check(rd_err == 0, $sformatf("%0d of %0d words read wrong", rd_err, rd_words));
    check(rd_words > 0, "words read");
    check(n_stray == 0, "no unmatched read replies");
    $display("stalls: packet buffer %0d, credit %0d, VC allocation %0d, message queue full %0d",
             n_pb, n_cr, n_va, n_mq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
