// tb_wb_mem: behavioural WISHBONE slave memory for testbenches (a stand-in
// for the node's memory). 64-bit words, word index taken from address bits
// [3 +: AW]. It acknowledges each strobe with a registered ACK after
// `WAIT` extra wait cycles, and counts the beats it served.
module tb_wb_mem #(
  parameter int AW   = 10,
  parameter int WAIT = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cyc_i,
  input  logic        stb_i,
  input  logic        we_i,
  input  logic [31:0] adr_i,
  input  logic [63:0] dat_i,
  output logic        ack_o,
  output logic [63:0] dat_o,
  output int          writes,
  output int          reads
);
  logic [63:0] mem [1 << AW];
  int          wcnt;

  initial for (int i = 0; i < (1 << AW); i++) mem[i] = {32'hC0DE_0000 | 32'(i), 32'(i) * 32'd7};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_o <= 1'b0; wcnt <= 0; writes <= 0; reads <= 0; dat_o <= '0;
    end else begin
      ack_o <= 1'b0;
      if (cyc_i && stb_i && !ack_o) begin
        if (wcnt < WAIT) wcnt <= wcnt + 1;
        else begin
          wcnt  <= 0;
          ack_o <= 1'b1;
          if (we_i) begin
            mem[adr_i[3 +: AW]] <= dat_i;
            writes <= writes + 1;
          end else begin
            dat_o <= mem[adr_i[3 +: AW]];
            reads <= reads + 1;
          end
        end
      end
    end
  end
endmodule
