// filter_stage: cosine or sine filter stage of the prime-length DFT.
//
// The stage computes the M = (N-1)/2 outputs of a length-M cyclic convolution of its input
// sequence m(0..M-1) with the constants h_k, one input per cycle, in transposed direct form:
// the adder network multiplies m by all constants at once, tap j adds m*h_j to the partial
// sum coming from tap j-1, and the last tap's sum is routed back to tap 0. In the first cycle
// of a block the incoming partial sums are taken as zero, so the ring starts empty. After M
// cycles tap j holds
//     sum_t m(t) * h_{(j+1+t) mod M}     (cosine stage, plain feedback)
// and at the last cycle these sums are saved in parallel into the PISO, which shifts them out
// during the next block while the ring already works on it (no gap between blocks).
//
// Cosine constants repeat with period M along the permuted index, sine constants change sign,
// so the sine stage negates the routed-back sum (a negacyclic convolution) and uses
// h_k = -sin(2*pi*a_k/N). The structure, the feedback of the last tap, the PISO and the
// addition of x(0) behind the PISO of the cosine stage follow the document; the negated sine
// feedback and the constant signs are worked out here from the sine symmetry, as the
// document's drawing leaves them out.
//
// Interface: m is the u or v part (signed, IW bits); x0 is x(0)'s matching part (cosine stage
// only, F section timing), scaled by 2^(CW-1) on addition. dout is the O section result, one
// per advance, for PISO slot s = 0..M-1 the sum of tap j = M-1-s.
module filter_stage
  import dft_pkg::*;
#(
  parameter  int         N      = 61,
  parameter  int         IW     = 17,
  parameter  int         CW     = 16,
  parameter  coef_kind_e KIND   = KIND_COS,
  parameter  bit         ADD_X0 = 1'b1,
  parameter  int         XW     = 16,        // width of x0
  localparam int         M      = (N - 1) / 2,
  localparam int         PW     = IW + CW,
  localparam int         AW     = PW + $clog2(M) + 1,
  localparam int         OW     = AW + 1
) (
  input  logic                 clk,
  input  logic                 adv,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [IW-1:0] m,
  input  logic signed [XW-1:0] x0,
  output logic signed [OW-1:0] dout
);

  logic signed [PW-1:0] prod [M];
  logic signed [AW-1:0] ring [M];     // tap registers
  logic signed [AW-1:0] psum [M];     // tap adder outputs
  logic signed [AW-1:0] r;

  adder_network #(.N(N), .IW(IW), .CW(CW), .KIND(KIND)) u_net (.x(m), .prod(prod));

  always_comb begin
    for (int j = 0; j < M; j++) begin
      logic signed [AW-1:0] incoming;
      if (first)       incoming = '0;
      else if (j > 0)  incoming = ring[j-1];
      else if (KIND == KIND_NSIN) incoming = -ring[M-1];
      else             incoming = ring[M-1];
      psum[j] = incoming + AW'(prod[j]);
    end
  end

  always_ff @(posedge clk) begin
    if (adv) ring <= psum;
  end

  piso #(.W(AW), .DEPTH(M)) u_piso (
    .clk(clk), .en(adv), .load(last), .din(psum), .dout(r)
  );

  if (ADD_X0) begin : g_x0
    logic signed [XW-1:0] x0_o;   // x(0) of the block in the PISO
    always_ff @(posedge clk) begin
      if (adv && last) x0_o <= x0;
    end
    assign dout = OW'(r) + (OW'(x0_o) <<< (CW - 1));
  end else begin : g_nox0
    assign dout = OW'(r);
  end

endmodule
