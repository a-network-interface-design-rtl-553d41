// tb_ni_message_queue: self-checking test of the Message Queue.
// Fills all 6 buffers, checks `full`, that a message is readable the cycle
// after it was written, first-in first-out order against a reference
// queue, and simultaneous write and delete.
module tb_ni_message_queue;
  import ni_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  logic wr, full, head_valid, pop;
  msg_t wr_msg, head;
  logic [$clog2(MQ_DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  msg_t ref_q [$];

  ni_message_queue dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic msg_t mk(int k);
    msg_t m;
    m = '0;
    m.hdr.seq  = SEQ_W'(k);
    m.hdr.addr = ADDR_W'(32'h1000 * k);
    for (int w = 0; w < MAX_WORDS; w++) m.data[w] = {32'(k), 32'(w)};
    return m;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; pop = 0; wr_msg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!head_valid && !full, "empty after reset");
    // write one, readable next cycle
    wr = 1; wr_msg = mk(1); ref_q.push_back(wr_msg);
    @(negedge clk); wr = 0;
    check(head_valid && head == mk(1), "head visible the cycle after the write");
    // fill up
    for (int k = 2; k <= MQ_DEPTH; k++) begin
      check(!full, "not full before depth reached");
      wr = 1; wr_msg = mk(k); ref_q.push_back(wr_msg);
      @(negedge clk);
    end
    wr = 0;
    check(full && count == 3'(MQ_DEPTH), "full at depth 6");
    // simultaneous pop and write while not full
    pop = 1; @(negedge clk); pop = 0;
    void'(ref_q.pop_front());
    check(!full, "not full after a delete");
    wr = 1; pop = 1; wr_msg = mk(50); @(negedge clk);
    ref_q.push_back(wr_msg); void'(ref_q.pop_front());
    wr = 0; pop = 0;
    check(!full && count == 3'(MQ_DEPTH - 1), "write and delete together keep the count");
    // drain in order
    while (ref_q.size() > 0) begin
      check(head_valid && head == ref_q[0], "FIFO order");
      pop = 1; @(negedge clk); pop = 0;
      void'(ref_q.pop_front());
    end
    check(!head_valid && count == 0, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
