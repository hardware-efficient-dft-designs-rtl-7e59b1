// output_combiner: forms the two DFT outputs of one PISO slot from the four filter stages.
//
// With Cr = R(u).c + R(x0), Ci = I(u).c + I(x0), Sr = I(v).s and Si = R(v).s the outputs
// of an index pair (k, N-k) are
//     R(Y(k)) = Cr + Sr      I(Y(k)) = Ci - Si
//     R(Y(N-k)) = Cr - Sr    I(Y(N-k)) = Ci + Si
// i.e. the sine results are shared by both outputs with opposite sign. Four adders, as in the
// document's architecture; combinational, operands W bits, results W+1 bits.
module output_combiner #(
  parameter int W = 40
) (
  input  logic signed [W-1:0] cr, ci, sr, si,
  output logic signed [W:0]   ya_re, ya_im,    // Y(k)
  output logic signed [W:0]   yb_re, yb_im     // Y(N-k)
);

  assign ya_re = (W+1)'(cr) + (W+1)'(sr);
  assign yb_re = (W+1)'(cr) - (W+1)'(sr);
  assign ya_im = (W+1)'(ci) - (W+1)'(si);
  assign yb_im = (W+1)'(ci) + (W+1)'(si);

endmodule
