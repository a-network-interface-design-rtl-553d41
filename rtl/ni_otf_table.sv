// ni_otf_table: the On-the-Fly table.
//
// WISHBONE has no split transactions, so when a bus master reads from the
// NI, the Slave Wrapper keeps the bus cycle open, sends the read request
// into the NoC and records it here: the node the request went to, its
// sequence number, length and address. When a read reply comes back from
// the NoC, the Master Wrapper looks it up by (source node, sequence number);
// on a hit it hands the data to the Slave Wrapper, which completes the
// waiting bus cycle, and clears the entry.
//
// Insert and clear take effect at the clock edge; lookup is combinational.
// ENTRIES defaults to 1 because a blocking bus can hold only one read to
// the NI at a time; the document does not size the table. A table with
// more entries serves several slave ports or a future split bus.
module ni_otf_table
  import ni_pkg::*;
#(
  parameter int unsigned ENTRIES = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // insert, from the Slave Wrapper
  input  logic                 ins_valid,
  input  logic [NODE_W-1:0]    ins_dst,
  input  logic [SEQ_W-1:0]     ins_seq,
  input  logic [LEN_W-1:0]     ins_len,
  input  logic [ADDR_W-1:0]    ins_addr,
  output logic                 full,
  // lookup and clear, from the Master Wrapper
  input  logic [NODE_W-1:0]    lk_src,
  input  logic [SEQ_W-1:0]     lk_seq,
  output logic                 lk_hit,
  output logic [LEN_W-1:0]     lk_len,
  output logic [ADDR_W-1:0]    lk_addr,
  input  logic                 clr
);
  localparam int unsigned IW = $clog2(ENTRIES > 1 ? ENTRIES : 2);

  typedef struct packed {
    logic                valid;
    logic [NODE_W-1:0]   dst;
    logic [SEQ_W-1:0]    seq;
    logic [LEN_W-1:0]    len;
    logic [ADDR_W-1:0]   addr;
  } otf_entry_t;

  otf_entry_t [ENTRIES-1:0] tab;
  logic [IW-1:0]            free_idx, hit_idx;
  logic                     have_free;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    lk_hit    = 1'b0;
    hit_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!tab[i].valid) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
      if (tab[i].valid && tab[i].dst == lk_src && tab[i].seq == lk_seq) begin
        lk_hit  = 1'b1;
        hit_idx = IW'(i);
      end
    end
    full    = !have_free;
    lk_len  = tab[hit_idx].len;
    lk_addr = tab[hit_idx].addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tab <= '0;
    end else begin
      if (clr && lk_hit) tab[hit_idx].valid <= 1'b0;
      if (ins_valid && have_free) begin
        tab[free_idx].valid <= 1'b1;
        tab[free_idx].dst   <= ins_dst;
        tab[free_idx].seq   <= ins_seq;
        tab[free_idx].len   <= ins_len;
        tab[free_idx].addr  <= ins_addr;
      end
    end
  end

  a_ins_not_full: assert property (@(posedge clk) disable iff (!rst_n) ins_valid |-> have_free)
    else $error("otf_table: insert while full");

endmodule
