// y0_accumulator: separate accumulator for the DC output Y(0) = x(0) + ... + x(N-1).
//
// Y(0) has no place in the cyclic convolution, so it is summed on its own from the same u
// values that feed the cosine stages (u = X(i) + X(N-i)). In the first cycle of a block the
// multiplexer selects x(0) instead of the fed-back sum, so after M = (N-1)/2 cycles the
// register holds x(0) + u(0) + ... + u(M-1). This follows the document's accumulator with its
// multiplexer; here the finished sum is also captured at the last cycle into an output
// register, so that it stays valid while the block is shifted out of the filter stages.
// Interface: F section timing on first/last/x0/u; y0 holds the last finished block's sum.
module y0_accumulator #(
  parameter  int N  = 61,
  parameter  int IW = 16,
  localparam int YW = IW + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 adv,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [IW-1:0] x0,
  input  logic signed [IW:0]   u,
  output logic signed [YW-1:0] y0
);

  logic signed [YW-1:0] acc;
  logic signed [YW-1:0] sum;

  assign sum = (first ? YW'(x0) : acc) + YW'(u);

  always_ff @(posedge clk) begin
    if (adv) begin
      acc <= sum;
      if (last) y0 <= sum;
    end
  end

endmodule
