// tb_ni_link_allocator: self-checking test of the Link Allocator. Checks
// one grant per cycle among slots holding a VC, round-robin fairness, that
// slots whose VC has no credit are skipped, and the credit-stall flag.
module tb_ni_link_allocator;
  import ni_pkg::*;
  localparam int N = PB_DEPTH;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic [N-1:0] la_req;
  logic [N-1:0][VC_W-1:0] slot_vc;
  logic [NUM_VC-1:0] vc_has_credit;
  logic la_gnt, credit_stall;
  logic [1:0] la_idx;
  int checks = 0, failures = 0;

  ni_link_allocator dut (.*);

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
    int wins[N];
    la_req = '0; slot_vc = '0; vc_has_credit = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    #1 check(!la_gnt && !credit_stall, "no request, no grant");
    slot_vc[0] = 0; slot_vc[1] = 2; slot_vc[2] = 4; slot_vc[3] = 5;
    la_req = 4'b1111;
    wins = '{default: 0};
    for (int c = 0; c < 12; c++) begin
      #1 check(la_gnt, "grant while requests present");
      wins[la_idx]++;
      @(negedge clk);
    end
    check(wins[0] == 3 && wins[1] == 3 && wins[2] == 3 && wins[3] == 3, "round-robin over all slots");
    // VC 2 and VC 4 have no credit: slots 1 and 2 never win
    vc_has_credit = 6'b101011;
    for (int c = 0; c < 8; c++) begin
      #1 check(la_gnt && (la_idx == 0 || la_idx == 3), "slot without credit skipped");
      @(negedge clk);
    end
    vc_has_credit = 6'b000000; #1;
    check(!la_gnt && credit_stall, "credit stall flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
