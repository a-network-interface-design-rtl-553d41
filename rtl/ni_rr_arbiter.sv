// ni_rr_arbiter: N:1 round-robin arbiter, the building block of the NI's
// Virtual Channel Allocator, Link Allocator and packet-to-message selection.
//
// Combinational grant: the first requester at or after the priority pointer
// wins (one-hot `gnt`, index `gnt_idx`, `gnt_valid`). When `advance` is high
// at a clock edge and a grant was given, the pointer moves to the position
// just after the winner, so every requester is served within N grants.
// The round-robin policy is this design's choice; the document says only
// that an N:1 arbiter picks one requester.
module ni_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               req,
  input  logic                       advance,
  output logic [N-1:0]               gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx,
  output logic                       gnt_valid
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(i);
        gnt[i]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && gnt_valid) begin
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + IW'(1);
    end
  end

endmodule
