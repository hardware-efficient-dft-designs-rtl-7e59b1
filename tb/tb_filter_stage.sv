// tb_filter_stage: cosine and sine filter stages for N = 5 and N = 61 (see
// filter_stage_harness for the reference), run side by side.
module tb_filter_stage;
  import dft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic d [4];
  int c [4];
  int f [4];

  filter_stage_harness #(.N(5),  .KIND(KIND_COS))  h0 (.clk, .done(d[0]), .checks(c[0]), .failures(f[0]));
  filter_stage_harness #(.N(5),  .KIND(KIND_NSIN)) h1 (.clk, .done(d[1]), .checks(c[1]), .failures(f[1]));
  filter_stage_harness #(.N(61), .KIND(KIND_COS))  h2 (.clk, .done(d[2]), .checks(c[2]), .failures(f[2]));
  filter_stage_harness #(.N(61), .KIND(KIND_NSIN)) h3 (.clk, .done(d[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #1;
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
