// adder_network: multiplies one input word by every coefficient of a filter stage using
// only shifts and additions.
//
// The stage has M = (N-1)/2 constant coefficients h_k (cosines, or negated sines, of
// 2*pi*a_k/N scaled by 2^(CW-1); see dft_pkg). Each constant is written in canonical signed
// digits. Before the per-constant sums, the network forms a small set of shared
// subexpressions of the input, (x<<d)+x and (x<<d)-x for d = 2..SUBEXPR_MAXD. Each constant
// then takes pairs of its non-zero digits that lie at most SUBEXPR_MAXD apart from that shared
// set, shifted and signed, and its remaining digits as shifted copies of x. That is the
// bit-level common subexpression sharing the architecture relies on; the exact sharing rule
// (greedy two-digit patterns, most significant digit first) is this design's own, the document
// only requires that the constant multiplications be shift-and-add networks that share common
// subexpressions.
//
// Interface: x (signed, IW bits) in, prod[k] = x * h_k (signed, IW+CW bits) out.
// Timing: purely combinational; the caller registers the results.
module adder_network
  import dft_pkg::*;
#(
  parameter int         N    = 61,          // DFT length (prime)
  parameter int         IW   = 17,          // input word width
  parameter int         CW   = 16,          // coefficient word width
  parameter coef_kind_e KIND = KIND_COS,    // cosine or negated-sine constants
  localparam int        M    = (N - 1) / 2,
  localparam int        PW   = IW + CW
) (
  input  logic signed [IW-1:0] x,
  output logic signed [PW-1:0] prod [M]
);

  // Internal width with headroom for the shifted subexpressions.
  localparam int XW   = PW + SUBEXPR_MAXD + 2;
  localparam int MAXT = CW / 2 + 2;

  logic signed [XW-1:0] xs;
  logic signed [XW-1:0] sub_plus  [SUBEXPR_MAXD+1];
  logic signed [XW-1:0] sub_minus [SUBEXPR_MAXD+1];

  assign xs = XW'(x);

  // Shared subexpressions, computed once for all constants.
  always_comb begin
    for (int d = 0; d <= SUBEXPR_MAXD; d++) begin
      sub_plus[d]  = (xs <<< d) + xs;
      sub_minus[d] = (xs <<< d) - xs;
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_const
    localparam int H = coef(N, CW, KIND, k);
    logic signed [XW-1:0] term [MAXT];

    for (genvar t = 0; t < MAXT; t++) begin : g_term
      localparam term_t T = get_term(H, t);
      localparam int    G = int'(T.gap);
      logic signed [XW-1:0] base;
      if (T.kind == TERM_X) begin : g_x
        assign base = xs;
      end else if (T.kind == TERM_PLUS) begin : g_p
        assign base = sub_plus[G];
      end else if (T.kind == TERM_MINUS) begin : g_m
        assign base = sub_minus[G];
      end else begin : g_none
        assign base = '0;
      end
      if (T.neg) begin : g_neg
        assign term[t] = -(base <<< T.shift);
      end else begin : g_pos
        assign term[t] = base <<< T.shift;
      end
    end

    always_comb begin
      logic signed [XW-1:0] acc;
      acc = '0;
      for (int t = 0; t < MAXT; t++) acc = acc + term[t];
      prod[k] = PW'(acc);
    end
  end

endmodule
