// uv_preadder: even/odd split of a sample pair, u = X(i) + X(N-i), v = X(i) - X(N-i).
//
// The cosine part of the DFT kernel is even and the sine part odd, so the cosine filter
// stages only need u and the sine filter stages only need v; this halves the number of
// constant multiplications. Complex inputs, IW bits each part, outputs one bit wider.
// Combinational; follows the two adders at the front of the document's architecture.
module uv_preadder #(
  parameter int IW = 16
) (
  input  logic signed [IW-1:0] a_re, a_im,   // X(i)
  input  logic signed [IW-1:0] b_re, b_im,   // X(N-i)
  output logic signed [IW:0]   u_re, u_im,
  output logic signed [IW:0]   v_re, v_im
);

  assign u_re = (IW+1)'(a_re) + (IW+1)'(b_re);
  assign u_im = (IW+1)'(a_im) + (IW+1)'(b_im);
  assign v_re = (IW+1)'(a_re) - (IW+1)'(b_re);
  assign v_im = (IW+1)'(a_im) - (IW+1)'(b_im);

endmodule
