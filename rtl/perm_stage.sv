// perm_stage: reorders each block of input samples into cyclic-convolution order.
//
// Four RAM banks of M = (N-1)/2 words form two pairs. While one pair is written with the block
// that is arriving, the other pair is read out for the block being computed; the pairs swap
// roles at every block boundary (wr_sel). In a pair, bank A holds x(a_t) and bank B holds
// x(N - a_t) at address t, a_t = g^t mod N, so reading both banks at address t = 0..M-1
// delivers exactly the pairs (X(i), X(N-i)) that the u/v adders need, in the order of the
// cyclic convolution. The address generator places each input pair; x(0) takes no part in the
// convolution and is kept in a small ping-pong register next to the banks.
//
// The four-bank ping-pong organisation and the address generator follow the document. The
// input format, one pair (x(n), x(N-n)) with n = ph+1 per cycle and x(0) with the first pair,
// and the read multiplexer between the two pairs, are this design's own choices.
//
// Timing: read data (xa, xb, x0 out) appear one advance after the read address ph, so they
// belong to the F section of the controller. Samples are signed, IW bits, real and imaginary.
// With CPLX = 0 (real input) the banks and the x(0) register hold only the real parts, half the
// memory, and the imaginary outputs are zero.
module perm_stage #(
  parameter  int N   = 61,
  parameter  int IW  = 16,
  parameter  bit CPLX = 1'b1,    // 0: real input only, the imaginary halves are not stored
  localparam int M   = (N - 1) / 2,
  localparam int DW  = CPLX ? 2 * IW : IW,
  localparam int PHW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 adv,
  input  logic                 wr_en,
  input  logic                 wr_sel,
  input  logic [PHW-1:0]       ph,
  input  logic signed [IW-1:0] x0_in_re, x0_in_im,   // x(0), taken when ph == 0
  input  logic signed [IW-1:0] xn_re,    xn_im,      // x(n), n = ph+1
  input  logic signed [IW-1:0] xnn_re,   xnn_im,     // x(N-n)
  output logic signed [IW-1:0] xa_re,    xa_im,      // x(a_t) of the read block
  output logic signed [IW-1:0] xb_re,    xb_im,      // x(N-a_t)
  output logic signed [IW-1:0] x0_re,    x0_im       // x(0) of the read block
);

  logic [PHW-1:0]   waddr;
  logic             swap;
  logic [DW-1:0]    wdata_a, wdata_b;
  logic [DW-1:0]    rdata [4];
  logic [DW-1:0]    x0_buf [2];
  logic [DW-1:0]    wd_n, wd_nn, wd_x0, rd_x0;
  logic             rd_pair_q;

  perm_addr_gen #(.N(N)) u_addr (.ph(ph), .addr(waddr), .swap(swap));

  // Word packing: {re, im} for complex input, re alone for real input.
  if (CPLX) begin : g_cplx
    assign wd_n  = {xn_re, xn_im};
    assign wd_nn = {xnn_re, xnn_im};
    assign wd_x0 = {x0_in_re, x0_in_im};
    assign {xa_re, xa_im} = rdata[{rd_pair_q, 1'b0}];
    assign {xb_re, xb_im} = rdata[{rd_pair_q, 1'b1}];
    assign {x0_re, x0_im} = rd_x0;
  end else begin : g_real
    assign wd_n  = xn_re;
    assign wd_nn = xnn_re;
    assign wd_x0 = x0_in_re;
    assign xa_re = rdata[{rd_pair_q, 1'b0}];
    assign xb_re = rdata[{rd_pair_q, 1'b1}];
    assign x0_re = rd_x0;
    assign xa_im = '0;
    assign xb_im = '0;
    assign x0_im = '0;
  end

  assign wdata_a = swap ? wd_nn : wd_n;
  assign wdata_b = swap ? wd_n  : wd_nn;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    localparam bit PAIR = b[1];
    localparam bit IS_B = b[0];
    ram_bank #(.DEPTH(M), .W(DW)) u_bank (
      .clk  (clk),
      .we   (wr_en && (wr_sel == PAIR)),
      .waddr(waddr),
      .wdata(IS_B ? wdata_b : wdata_a),
      .re   (adv && (wr_sel != PAIR)),
      .raddr(ph),
      .rdata(rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (wr_en && ph == '0) x0_buf[wr_sel] <= wd_x0;
    if (adv) begin
      rd_pair_q <= !wr_sel;
      rd_x0     <= x0_buf[!wr_sel];
    end
  end

endmodule
