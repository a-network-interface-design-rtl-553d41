// tb_ni_vc_allocator: self-checking test of the VC Allocator. Checks that
// each virtual network grants at most one slot per cycle, always an idle VC
// of the slot's own network (the lowest one), that different networks are
// served in the same cycle, that nothing is granted while all VCs of a
// network are busy, and that competing slots are served in turn.
module tb_ni_vc_allocator;
  import ni_pkg::*;
  localparam int N = PB_DEPTH;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic [N-1:0] va_req, va_gnt;
  logic [N-1:0][VNET_W-1:0] slot_vnet;
  logic [NUM_VC-1:0] vc_idle, vc_claim;
  logic [VC_W-1:0] va_vc [N];
  int checks = 0, failures = 0;

  ni_vc_allocator dut (.*);

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
    int first, second;
    va_req = '0; slot_vnet = '0; vc_idle = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // slots 0 and 2 in vnet 2, slot 1 in vnet 0, slot 3 in vnet 1
    slot_vnet[0] = 2; slot_vnet[1] = 0; slot_vnet[2] = 2; slot_vnet[3] = 1;
    va_req = 4'b1111; #1;
    check(va_gnt[1] && va_vc[1] == 3'd0, "vnet0 slot gets VC0");
    check(va_gnt[3] && va_vc[3] == 3'd2, "vnet1 slot gets VC2");
    check(va_gnt[0] ^ va_gnt[2], "one vnet2 slot per cycle");
    first = va_gnt[0] ? 0 : 2;
    check(va_vc[first] == 3'd4, "vnet2 slot gets VC4");
    check(vc_claim == 6'b010101, "claimed VCs reported");
    @(negedge clk);
    // next cycle: the other vnet2 slot wins; VC4 is now busy
    va_req = '0; va_req[2 - first] = 1'b1; vc_idle = 6'b101010; #1;
    second = 2 - first;
    check(va_gnt[second] && va_vc[second] == 3'd5, "other vnet2 slot gets VC5");
    @(negedge clk);
    // all vnet2 VCs busy: no grant
    vc_idle = 6'b001111; va_req = 4'b0101; #1;
    check(va_gnt == '0 && vc_claim == '0, "no grant while network's VCs are busy");
    // fairness: both vnet2 slots ask repeatedly with one VC idle
    vc_idle = 6'b010000;
    begin
      int wins[2];
      wins = '{0, 0};
      for (int c = 0; c < 8; c++) begin
        #1;
        check($countones(va_gnt) == 1, "exactly one grant");
        if (va_gnt[0]) wins[0]++;
        if (va_gnt[2]) wins[1]++;
        @(negedge clk);
      end
      check(wins[0] == 4 && wins[1] == 4, "round-robin between competing slots");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
