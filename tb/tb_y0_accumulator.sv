// tb_y0_accumulator: after each block of M = 30 values u, y0 must hold x(0) + sum(u), and
// keep it through the next block; random stalls freeze the accumulation.
module tb_y0_accumulator;
  localparam int N = 61;
  localparam int M = 30;
  localparam int IW = 16;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic adv, first, last;
  logic signed [IW-1:0] x0;
  logic signed [IW:0] u;
  logic signed [IW+6:0] y0;
  int checks = 0, failures = 0;
  int exp_prev;

  y0_accumulator #(.N(N), .IW(IW)) dut (.*);

  initial begin
    adv = 0; first = 0; last = 0; x0 = '0; u = '0;
    exp_prev = 0;
    for (int b = 0; b < 10; b++) begin
      int sum;
      logic signed [IW-1:0] bx0;
      bx0 = (b == 0) ? -16'sd32768 : IW'($urandom);
      sum = int'(bx0);
      for (int t = 0; t < M; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin
          adv = 0;
          x0 = IW'($urandom); u = (IW+1)'($urandom);
          @(negedge clk);
        end
        if (b > 0) begin
          checks++;
          if (int'(y0) != exp_prev) begin
            failures++;
            if (failures < 5) $display("FAIL held y0 %0d expected %0d", y0, exp_prev);
          end
        end
        adv = 1; first = (t == 0); last = (t == M - 1);
        x0 = bx0;
        u = (b == 0) ? -17'sd65536 : (IW+1)'($urandom);
        sum += int'(u);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(y0) != sum) begin
        failures++;
        if (failures < 5) $display("FAIL block %0d y0 %0d expected %0d", b, y0, sum);
      end
      exp_prev = sum;
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
