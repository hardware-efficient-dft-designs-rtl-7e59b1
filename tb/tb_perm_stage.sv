// tb_perm_stage: blocks of N = 61 complex samples written in pair order (x(n), x(N-n)) must
// be read back, one block later and one advance behind the read address, as
// (x(a_t), x(N-a_t)) with a_t = g^t mod N, together with the block's x(0). The bank pairs
// alternate every block and random stalls (adv low) must freeze both sides.
module tb_perm_stage;
  localparam int N = 61;
  localparam int M = 30;
  localparam int IW = 16;

  logic clk = 1'b0;
  always #5 clk = !clk;
  logic adv, wr_en, wr_sel;
  logic [4:0] ph;
  logic signed [IW-1:0] x0_in_re, x0_in_im, xn_re, xn_im, xnn_re, xnn_im;
  logic signed [IW-1:0] xa_re, xa_im, xb_re, xb_im, x0_re, x0_im;
  int checks = 0, failures = 0;
  int xr [8][N];
  int xi [8][N];
  int at [M];

  perm_stage #(.N(N), .IW(IW)) dut (.*);

  initial begin
    int r;
    r = 1;
    // g = 2 is a primitive root of 61 (order 60: 2^30 = -1, 2^20 != 1, 2^12 != 1 mod 61)
    for (int t = 0; t < M; t++) begin at[t] = r; r = (r * 2) % N; end
    for (int b = 0; b < 8; b++)
      for (int n = 0; n < N; n++) begin xr[b][n] = int'(IW'($urandom)) - 32768; xi[b][n] = -n * 100 + b; end
    adv = 0; wr_en = 0; wr_sel = 0; ph = 0;
    {x0_in_re, x0_in_im, xn_re, xn_im, xnn_re, xnn_im} = '0;
    for (int b = 0; b < 8; b++) begin
      for (int p = 0; p < M; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          adv = 0; wr_en = 0;
          @(negedge clk);
        end
        adv = 1; wr_en = 1; wr_sel = b[0]; ph = 5'(p);
        x0_in_re = IW'(xr[b][0]); x0_in_im = IW'(xi[b][0]);
        xn_re  = IW'(xr[b][p+1]);   xn_im  = IW'(xi[b][p+1]);
        xnn_re = IW'(xr[b][N-p-1]); xnn_im = IW'(xi[b][N-p-1]);
        @(posedge clk); #1;
        if (b > 0) begin
          checks++;
          if (int'(xa_re) != xr[b-1][at[p]] || int'(xa_im) != xi[b-1][at[p]] ||
              int'(xb_re) != xr[b-1][N-at[p]] || int'(xb_im) != xi[b-1][N-at[p]] ||
              int'(x0_re) != xr[b-1][0] || int'(x0_im) != xi[b-1][0]) begin
            failures++;
            if (failures < 5) $display("FAIL block %0d t=%0d: xa=%0d xb=%0d expected %0d %0d",
                                       b - 1, p, xa_re, xb_re, xr[b-1][at[p]], xr[b-1][N-at[p]]);
          end
        end
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
