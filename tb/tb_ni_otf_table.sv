// tb_ni_otf_table: self-checking test of the On-the-Fly table (one entry).
// Inserts a pending read, checks that only the matching (node, sequence)
// pair hits, that the table reports full, and that a clear frees it.
module tb_ni_otf_table;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic ins_valid, full, lk_hit, clr;
  logic [NODE_W-1:0] ins_dst, lk_src;
  logic [SEQ_W-1:0] ins_seq, lk_seq;
  logic [LEN_W-1:0] ins_len, lk_len;
  logic [ADDR_W-1:0] ins_addr, lk_addr;
  int checks = 0, failures = 0;

  ni_otf_table dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_valid = 0; clr = 0; ins_dst = 0; ins_seq = 0; ins_len = 0; ins_addr = 0;
    lk_src = 0; lk_seq = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!full && !lk_hit, "empty after reset");
    ins_valid = 1; ins_dst = 6'd5; ins_seq = 8'd17; ins_len = 4'd8; ins_addr = 32'h1400_0040;
    @(negedge clk); ins_valid = 0;
    check(full, "full with one pending read");
    lk_src = 6'd5; lk_seq = 8'd17; #1;
    check(lk_hit && lk_len == 4'd8 && lk_addr == 32'h1400_0040, "matching reply hits");
    lk_src = 6'd4; #1;
    check(!lk_hit, "other node misses");
    lk_src = 6'd5; lk_seq = 8'd18; #1;
    check(!lk_hit, "other sequence number misses");
    lk_seq = 8'd17; clr = 1; @(negedge clk); clr = 0;
    check(!full && !lk_hit, "clear frees the entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
