// dft_len_harness: one dft_top of a given length and word width with its scoreboard.
module dft_len_harness #(
  parameter  int N    = 5,
  parameter  int W    = 8,      // input and coefficient word width
  parameter  int NBLK = 9,
  parameter  bit REAL = 1'b0,   // real-input build of the DFT, driven with real samples
  localparam int M    = (N - 1) / 2,
  localparam int KW   = $clog2(N),
  localparam int YW   = W + 1 + W + $clog2(M) + 3,
  localparam int ZW   = W + $clog2(N) + 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_bubble,
  output int   n_overlap
);

  logic                in_valid, in_ready, out_valid, out_y0_valid;
  logic signed [W-1:0] in_x0_re, in_x0_im, in_xn_re, in_xn_im, in_xnn_re, in_xnn_im;
  logic [KW-1:0]       out_k_a, out_k_b;
  logic signed [YW-1:0] out_a_re, out_a_im, out_b_re, out_b_im;
  logic signed [YW-1:0] out_ha_re, out_ha_im, out_hb_re, out_hb_im;
  logic signed [ZW-1:0] out_y0_re, out_y0_im;
  logic signed [15:0]   fir_y;
  int                   n_y0;

  dft_top #(.N(N), .IW(W), .CW(W), .REAL_IN(REAL)) dut (
    .clk, .rst_n, .in_valid, .in_ready,
    .in_x0_re, .in_x0_im, .in_xn_re, .in_xn_im, .in_xnn_re, .in_xnn_im,
    .out_valid, .out_k_a, .out_k_b, .out_a_re, .out_a_im, .out_b_re, .out_b_im,
    .out_ha_re, .out_ha_im, .out_hb_re, .out_hb_im,
    .out_y0_valid, .out_y0_re, .out_y0_im,
    .fir_en(1'b0), .fir_x(16'sd0), .fir_y(fir_y)
  );

  dft_scoreboard #(.N(N), .IW(W), .CW(W), .NBLK(NBLK), .SEED(N * W + int'(REAL)), .REAL(REAL)) sb (
    .clk, .rst_n, .in_valid, .in_ready,
    .in_x0_re, .in_x0_im, .in_xn_re, .in_xn_im, .in_xnn_re, .in_xnn_im,
    .out_valid, .out_k_a, .out_k_b, .out_a_re, .out_a_im, .out_b_re, .out_b_im,
    .out_ha_re, .out_ha_im, .out_hb_re, .out_hb_im,
    .out_y0_valid, .out_y0_re, .out_y0_im,
    .done, .checks, .failures, .n_stall, .n_bubble, .n_overlap, .n_y0
  );

endmodule
