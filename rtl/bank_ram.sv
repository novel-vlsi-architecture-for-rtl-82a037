// bank_ram: two-bank buffer RAM with one write port and two read ports.
//
// The pipeline uses it as a ping-pong buffer: one block is written into one
// bank while the previous block is read out of the other, in a different
// order, which is how the stages permute their data. The bank is the top
// address bit. Reads are synchronous: the data for the address presented
// with re*_i appear on rd*_o one cycle later and are held until the next
// read. A write and a read of the same word in the same cycle return the old
// word. The document only names two RAMs for the permutation; their
// organisation is this design's choice.
module bank_ram #(
  parameter int W     = 16,   // word width
  parameter int DEPTH = 13,   // words per bank
  parameter int AW    = 4     // address bits within a bank
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic          wbank_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic          rea_i,
  input  logic          rbank_a_i,
  input  logic [AW-1:0] raddr_a_i,
  output logic [W-1:0]  rda_o,
  input  logic          reb_i,
  input  logic          rbank_b_i,
  input  logic [AW-1:0] raddr_b_i,
  output logic [W-1:0]  rdb_o
);

  logic [W-1:0] mem [2][DEPTH];

  initial begin
    assert (DEPTH <= (1 << AW)) else $error("bank_ram: DEPTH exceeds address range");
  end

  always_ff @(posedge clk) begin
    if (we_i) mem[wbank_i][waddr_i] <= wdata_i;
    if (rea_i) rda_o <= mem[rbank_a_i][raddr_a_i];
    if (reb_i) rdb_o <= mem[rbank_b_i][raddr_b_i];
  end

endmodule
