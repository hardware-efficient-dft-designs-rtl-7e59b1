// dft_top: prime-length N-point complex DFT built from adders only.
//
// For prime N the transform is rewritten as a cyclic convolution by ordering the non-zero
// indices as powers of a primitive root g (a_t = g^t mod N). The even (cosine) and odd (sine)
// symmetry of the kernel then lets one pass over M = (N-1)/2 sample pairs produce the outputs
// for k and N-k together:
//   permutation stage  -> pairs (x(a_t), x(N-a_t)), t = 0..M-1, four RAM banks in ping-pong
//   u/v pre-adders     -> u = sum, v = difference of each pair
//   4 filter stages    -> R(u) and I(u) through cosine stages, R(v) and I(v) through sine
//                         stages; each is a shift-and-add constant multiplier network feeding
//                         a transposed-form cyclic convolution ring and a PISO
//   Y(0) accumulator   -> x(0) + sum of all u
//   output combiner    -> Y(k) and Y(N-k) from Cr, Ci, Sr, Si
//   DHT combiner       -> Hartley outputs H(k) and H(N-k) from the same four results
// One transform is accepted every M cycles and the blocks overlap with no gap. This is the
// document's architecture at its headline size (N = 61, 16-bit input and coefficient words).
// A four-tap filter with a shared subexpression, the document's introductory example of the
// sharing technique, sits beside it with its own ports.
//
// Input: while in_ready, each cycle with in_valid gives one pair x(n), x(N-n) with n = 1..M in
// order; x(0) comes with the first pair (n = 1). A pause in in_valid inside a block stalls the
// whole pipeline. Output: each out_valid pulse gives Y(out_k_a) and Y(out_k_b = N - out_k_a),
// M pulses per transform; out_ha/out_hb carry the Hartley transform H(out_k_a), H(out_k_b) in
// the same cycle (H(0) = Y(0)); out_y0_valid comes with the first of them and carries Y(0). The
// first output of a block follows its first input by 2M+2 cycles when nothing stalls.
// Scaling: outputs other than Y(0) are the exact integer DFT with coefficients
// round(cos/sin(2*pi*r/N) * 2^(CW-1)), so they carry a factor 2^(CW-1); Y(0) is unscaled.
// REAL_IN = 1 builds the real-input variant: the banks store only real parts and the two
// imaginary filter stages and the imaginary Y(0) accumulator are left out, halving the datapath;
// the in_*_im ports are then ignored.
// The input format, the stall/drain handshake and full-precision outputs are this design's
// own choices; the document leaves the interface open.
module dft_top
  import dft_pkg::*;
#(
  parameter  int N   = 61,       // transform length (prime, >= 5)
  parameter  int IW  = 16,       // input word width (real and imaginary parts)
  parameter  int CW  = 16,       // coefficient word width
  parameter  int FW  = 16,       // word width of the subexpression-sharing FIR example
  parameter  bit REAL_IN = 1'b0, // 1: real input only, half the datapath (imaginary inputs unused)
  localparam int M   = (N - 1) / 2,
  localparam int PHW = (M > 1) ? $clog2(M) : 1,
  localparam int KW  = $clog2(N),
  localparam int UW  = IW + 1,
  localparam int SW  = UW + CW + $clog2(M) + 2,   // filter stage output width
  localparam int YW  = SW + 1,                    // output width
  localparam int ZW  = IW + $clog2(N) + 1         // Y(0) width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sample input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in_x0_re,  in_x0_im,
  input  logic signed [IW-1:0] in_xn_re,  in_xn_im,
  input  logic signed [IW-1:0] in_xnn_re, in_xnn_im,
  // transform output
  output logic                 out_valid,
  output logic [KW-1:0]        out_k_a,
  output logic [KW-1:0]        out_k_b,
  output logic signed [YW-1:0] out_a_re,  out_a_im,
  output logic signed [YW-1:0] out_b_re,  out_b_im,
  output logic signed [YW-1:0] out_ha_re, out_ha_im,
  output logic signed [YW-1:0] out_hb_re, out_hb_im,
  output logic                 out_y0_valid,
  output logic signed [ZW-1:0] out_y0_re, out_y0_im,
  // subexpression-sharing FIR example
  input  logic                 fir_en,
  input  logic signed [FW-1:0] fir_x,
  output logic signed [FW+5:0] fir_y
);

  if (!is_prime(N) || N < 5) begin : g_bad_n
    $error("dft_top: N must be a prime of at least 5");
  end

  // ---------------------------------------------------------------- control
  logic           adv, wr_en, wr_sel, f_first, f_last, f_valid, o_valid;
  logic [PHW-1:0] ph, ph_f;

  dft_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .adv, .wr_en, .wr_sel, .ph, .ph_f,
    .f_first, .f_last, .f_valid, .o_valid, .bubble()
  );

  // ---------------------------------------------------------------- permutation
  logic signed [IW-1:0] xa_re, xa_im, xb_re, xb_im, x0_re, x0_im;

  perm_stage #(.N(N), .IW(IW), .CPLX(!REAL_IN)) u_perm (
    .clk, .adv, .wr_en, .wr_sel, .ph,
    .x0_in_re(in_x0_re), .x0_in_im(in_x0_im),
    .xn_re(in_xn_re),    .xn_im(in_xn_im),
    .xnn_re(in_xnn_re),  .xnn_im(in_xnn_im),
    .xa_re, .xa_im, .xb_re, .xb_im, .x0_re, .x0_im
  );

  // ---------------------------------------------------------------- even/odd split
  logic signed [UW-1:0] u_re, u_im, v_re, v_im;

  uv_preadder #(.IW(IW)) u_uv (
    .a_re(xa_re), .a_im(xa_im), .b_re(xb_re), .b_im(xb_im),
    .u_re, .u_im, .v_re, .v_im
  );

  // ---------------------------------------------------------------- filter stages
  logic signed [SW-1:0] cr, ci, sr, si;

  filter_stage #(.N(N), .IW(UW), .CW(CW), .KIND(KIND_COS), .ADD_X0(1'b1), .XW(IW)) u_cos_re (
    .clk, .adv, .first(f_first), .last(f_last), .m(u_re), .x0(x0_re), .dout(cr)
  );
  filter_stage #(.N(N), .IW(UW), .CW(CW), .KIND(KIND_NSIN), .ADD_X0(1'b0), .XW(IW)) u_sin_re (
    .clk, .adv, .first(f_first), .last(f_last), .m(v_re), .x0(x0_re), .dout(si)
  );

  // ---------------------------------------------------------------- Y(0)
  logic signed [ZW-1:0] y0_re, y0_im;

  y0_accumulator #(.N(N), .IW(IW)) u_y0_re (
    .clk, .adv, .first(f_first), .last(f_last), .x0(x0_re), .u(u_re), .y0(y0_re)
  );

  // The imaginary half: with real input I(u) = I(v) = I(x0) = 0, so Ci, Sr and I(Y(0)) are zero
  // and the two stages and the accumulator that would compute them are left out.
  if (REAL_IN) begin : g_real
    assign ci    = '0;
    assign sr    = '0;
    assign y0_im = '0;
  end else begin : g_cplx
    filter_stage #(.N(N), .IW(UW), .CW(CW), .KIND(KIND_COS), .ADD_X0(1'b1), .XW(IW)) u_cos_im (
      .clk, .adv, .first(f_first), .last(f_last), .m(u_im), .x0(x0_im), .dout(ci)
    );
    filter_stage #(.N(N), .IW(UW), .CW(CW), .KIND(KIND_NSIN), .ADD_X0(1'b0), .XW(IW)) u_sin_im (
      .clk, .adv, .first(f_first), .last(f_last), .m(v_im), .x0(x0_im), .dout(sr)
    );
    y0_accumulator #(.N(N), .IW(IW)) u_y0_im (
      .clk, .adv, .first(f_first), .last(f_last), .x0(x0_im), .u(u_im), .y0(y0_im)
    );
  end

  // ---------------------------------------------------------------- outputs
  logic signed [YW-1:0] ya_re, ya_im, yb_re, yb_im;

  output_combiner #(.W(SW)) u_comb (
    .cr, .ci, .sr, .si, .ya_re, .ya_im, .yb_re, .yb_im
  );

  logic signed [YW-1:0] ha_re, ha_im, hb_re, hb_im;

  dht_combiner #(.W(SW)) u_dht (
    .cr, .ci, .sr, .si, .ha_re, .ha_im, .hb_re, .hb_im
  );

  // Frequency index of PISO slot s: tap j = M-1-s holds the sums for a_{j+1} = a_{M-s}.
  logic [KW-1:0] k_tab [M];
  for (genvar s = 0; s < M; s++) begin : g_ktab
    assign k_tab[s] = KW'(perm_index(N, M - s));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_y0_valid <= 1'b0;
    end else begin
      out_valid    <= adv && o_valid;
      out_y0_valid <= adv && o_valid && (ph_f == '0);
    end
    if (adv && o_valid) begin
      out_k_a  <= k_tab[ph_f];
      out_k_b  <= KW'(N) - k_tab[ph_f];
      out_a_re <= ya_re;
      out_a_im <= ya_im;
      out_b_re <= yb_re;
      out_b_im <= yb_im;
      out_ha_re <= ha_re;
      out_ha_im <= ha_im;
      out_hb_re <= hb_re;
      out_hb_im <= hb_im;
      if (ph_f == '0) begin
        out_y0_re <= y0_re;
        out_y0_im <= y0_im;
      end
    end
  end

  // ---------------------------------------------------------------- FIR example
  cse_fir_example #(.W(FW)) u_fir (.clk, .rst_n, .en(fir_en), .x(fir_x), .y(fir_y));

endmodule
