// perm_addr_gen: address generator of the permutation stage.
//
// The cyclic-convolution form needs the non-zero samples in the order x(a_0), x(a_1), ...
// with a_k = g^k mod N for a primitive root g of the prime N. Input pairs arrive as
// (x(n), x(N-n)) for n = ph+1, ph = 0..M-1. With L = log_g(n), sample x(n) belongs at read
// position L: bank A holds x(a_t) and bank B holds x(a_{t+M}) at address t, and
// a_{t+M} = N - a_t. So x(n) goes to bank A at address L if L < M, otherwise to bank B at
// address L-M, and x(N-n) goes to the other bank at the same address.
//
// The logarithm table is computed at elaboration from N; the address generator is named by
// the document, the table form is this design's own.
// Interface: ph in; addr and swap (x(n) goes to bank B) out. Combinational.
module perm_addr_gen
  import dft_pkg::*;
#(
  parameter  int N   = 61,
  localparam int M   = (N - 1) / 2,
  localparam int PHW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [PHW-1:0] ph,
  output logic [PHW-1:0] addr,
  output logic           swap
);

  logic [PHW-1:0] addr_tab [M];
  logic           swap_tab [M];

  for (genvar t = 0; t < M; t++) begin : g_tab
    localparam int L = dlog(N, t + 1);
    assign addr_tab[t] = PHW'(L % M);
    assign swap_tab[t] = (L >= M);
  end

  always_comb begin
    addr = '0;
    swap = 1'b0;
    for (int t = 0; t < M; t++) begin
      if (ph == PHW'(t)) begin
        addr = addr_tab[t];
        swap = swap_tab[t];
      end
    end
  end

endmodule
