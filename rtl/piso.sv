// piso: parallel-in serial-out register chain of a filter stage.
//
// At the last cycle of a block the filter stage's M partial sums are saved here in parallel,
// so the filter ring can start the next block at once. The following M advances shift them
// out one per cycle, highest index first (dout = reg[DEPTH-1]). Each register has a
// two-input multiplexer, load or shift, as in the document's PISO; zero is shifted in at the
// bottom. Timing: dout is registered; load has priority over shift; nothing moves without en.
module piso #(
  parameter int W     = 39,
  parameter int DEPTH = 30
) (
  input  logic                clk,
  input  logic                en,
  input  logic                load,
  input  logic signed [W-1:0] din [DEPTH],
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] r [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int j = 0; j < DEPTH; j++) begin
        if (load)       r[j] <= din[j];
        else if (j > 0) r[j] <= r[j-1];
        else            r[j] <= '0;
      end
    end
  end

  assign dout = r[DEPTH-1];

endmodule
