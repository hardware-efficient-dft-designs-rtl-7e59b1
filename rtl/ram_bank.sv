// ram_bank: one bank of the permutation stage, (N-1)/2 words deep.
//
// A simple two-port RAM: one write port and one read port with a registered output, the way an
// on-chip SRAM macro behaves. Both ports act only when their enable is high, so a stalled
// pipeline keeps the last read word on rdata. The document names the bank ("N/2 RAM"); the
// registered read port is this design's choice.
//
// Timing: a write and a read at the same address in the same cycle return the old word.
module ram_bank #(
  parameter  int DEPTH = 30,
  parameter  int W     = 32,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
