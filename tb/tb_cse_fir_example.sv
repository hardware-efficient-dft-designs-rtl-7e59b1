// tb_cse_fir_example: the shared-subexpression FIR against its direct form.
// 16*y must equal 16*(x[0] - x[0]/4 - x[1]/2 + x[1]/8 + x[2]/2 - x[3]/4 - x[3]/16)
// = 12x[0] - 6x[1] + 8x[2] - 5x[3], with x[a] the input a samples back; the delay line
// holds while en is low and starts from zero after reset.
module tb_cse_fir_example;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic rst_n, en;
  logic signed [W-1:0] x;
  logic signed [W+5:0] y;
  longint h [4];
  int checks = 0, failures = 0;

  cse_fir_example #(.W(W)) dut (.*);

  initial begin
    rst_n = 0; en = 0; x = '0;
    for (int i = 0; i < 4; i++) h[i] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      en = ($urandom_range(0, 3) != 0);
      if (i < 4) x = -16'sd32768;
      else if (i < 8) x = 16'sd32767;
      else x = W'($urandom);
      if (i == 20) begin en = 1; x = 16'sd16; end
      if (en) begin
        for (int k = 3; k > 0; k--) h[k] = h[k-1];
        h[0] = longint'(x);
      end
      @(negedge clk);
      checks++;
      if (longint'(y) != 12 * h[0] - 6 * h[1] + 8 * h[2] - 5 * h[3]) begin
        failures++;
        if (failures < 5) $display("FAIL y=%0d expected %0d", y, 12 * h[0] - 6 * h[1] + 8 * h[2] - 5 * h[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
