// dht_combiner: forms the two discrete Hartley transform outputs of one PISO slot from the
// same four filter stage results that give the DFT.
//
// The Hartley kernel is cas(x) = cos(x) + sin(x), so H(k) = C + S and H(N-k) = C - S, where
// C = sum x(n) cos(2*pi*n*k/N) (with x(0)) and S = sum x(n) sin(2*pi*n*k/N) are the cosine and
// sine convolution results the DFT already computes (the DFT itself is Y(k) = C - jS). With
// Cr, Ci from the cosine stages, Si = R(S) and Sr = I(S) from the sine stages:
//     R(H(k)) = Cr + Si      I(H(k)) = Ci + Sr
//     R(H(N-k)) = Cr - Si    I(H(N-k)) = Ci - Sr
// For real input this equals R(Y(k)) - I(Y(k)) = R(Y(k)) + I(Y(N-k)), i.e. the sum of real and
// imaginary DFT outputs, which is how the DHT extension of this architecture is usually stated;
// taking it from the stage results instead costs the same four adders and also holds for
// complex input. H(0) equals Y(0). Combinational; operands W bits, results W+1 bits.
module dht_combiner #(
  parameter int W = 40
) (
  input  logic signed [W-1:0] cr, ci, sr, si,
  output logic signed [W:0]   ha_re, ha_im,    // H(k)
  output logic signed [W:0]   hb_re, hb_im     // H(N-k)
);

  assign ha_re = (W+1)'(cr) + (W+1)'(si);
  assign hb_re = (W+1)'(cr) - (W+1)'(si);
  assign ha_im = (W+1)'(ci) + (W+1)'(sr);
  assign hb_im = (W+1)'(ci) - (W+1)'(sr);

endmodule
