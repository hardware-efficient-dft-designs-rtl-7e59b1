// cse_fir_example: four-tap FIR filter built with one shared subexpression.
//
// The filter is y = x[0] - x[0]>>2 - x[1]>>1 + x[1]>>3 + x[2]>>1 - x[3]>>2 - x[3]>>4,
// where x[a] is the input delayed by a samples and >>b a shift by b binary places
// (coefficients 0.75, -0.375, 0.5, -0.3125 in canonical signed digits). The digit pattern
// "1 then -1 one place lower, one sample later" occurs three times, so the subexpression
// w[i] = x[i] - x[i+1]>>1 is formed once and reused through delays and shifts:
//     y = w[0] - w[0]>>2 + w[2]>>1 - x[3]>>4,
// four additions instead of six. This is the document's introductory example of common
// subexpression sharing, with the same delay structure (one delay to form w, two delays on
// w, three on x). To keep it exact the datapath works on values scaled by 16, so y is the
// filter output with four fractional bits: y = 16*(filter output).
//
// Interface: one sample per cycle when en is high; y is registered, one cycle behind x.
// Delay lines reset to zero.
module cse_fir_example #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W+5:0] y
);

  localparam int YW = W + 6;

  logic signed [W-1:0] x_d1, x_d2, x_d3;    // x[1], x[2], x[3]
  logic signed [W+1:0] w2_0;                // 2*w[0] = 2*x[0] - x[1]
  logic signed [W+1:0] w2_d1, w2_d2;        // 2*w[1], 2*w[2]
  logic signed [YW-1:0] s1, s2, s3;

  // shared subexpression, formed once
  assign w2_0 = ((W+2)'(x) <<< 1) - (W+2)'(x_d1);

  // 16*y = 8*(2w[0]) - 2*(2w[0]) + 4*(2w[2]) - x[3]
  assign s1 = (YW'(w2_0) <<< 3) - (YW'(w2_0) <<< 1);
  assign s2 = s1 + (YW'(w2_d2) <<< 2);
  assign s3 = s2 - YW'(x_d3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d1  <= '0;
      x_d2  <= '0;
      x_d3  <= '0;
      w2_d1 <= '0;
      w2_d2 <= '0;
      y     <= '0;
    end else if (en) begin
      x_d1  <= x;
      x_d2  <= x_d1;
      x_d3  <= x_d2;
      w2_d1 <= w2_0;
      w2_d2 <= w2_d1;
      y     <= s3;
    end
  end

endmodule
