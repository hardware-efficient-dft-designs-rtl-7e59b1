// dft_scoreboard: stimulus and checking for one dft_top instance.
//
// Drives NBLK transforms into the DUT and checks every output against a direct evaluation
// of the DFT sum Y(k) = sum_n x(n) W^(nk) and of the Hartley sum H(k) = sum_n x(n) cas(2*pi*nk/N), done here with integer coefficients
// round(cos(2*pi*r/N) * 2^(CW-1)) and round(sin(...)), the exact arithmetic the DUT promises.
// Block 0 is all-negative full scale (largest |Y(0)|), block 1 an impulse, the rest random.
// Blocks 0..5 go in back to back with no pause, to measure latency and the one-transform-
// per-M-cycles rate; later blocks get random pauses inside a block (stalls) and random gaps
// between blocks (which make the DUT drain with empty blocks).
//
// Stimulus changes on the falling edge, outputs are sampled on the falling edge.
module dft_scoreboard #(
  parameter  int N    = 61,
  parameter  int IW   = 16,
  parameter  int CW   = 16,
  parameter  int NBLK = 12,
  parameter  int SEED = 1,
  parameter  bit REAL = 1'b0,     // drive real samples only (imaginary parts zero)
  localparam int M    = (N - 1) / 2,
  localparam int KW   = $clog2(N),
  localparam int YW   = IW + 1 + CW + $clog2(M) + 3,
  localparam int ZW   = IW + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic signed [IW-1:0] in_x0_re,  in_x0_im,
  output logic signed [IW-1:0] in_xn_re,  in_xn_im,
  output logic signed [IW-1:0] in_xnn_re, in_xnn_im,
  input  logic                 out_valid,
  input  logic [KW-1:0]        out_k_a,
  input  logic [KW-1:0]        out_k_b,
  input  logic signed [YW-1:0] out_a_re,  out_a_im,
  input  logic signed [YW-1:0] out_b_re,  out_b_im,
  input  logic signed [YW-1:0] out_ha_re, out_ha_im,
  input  logic signed [YW-1:0] out_hb_re, out_hb_im,
  input  logic                 out_y0_valid,
  input  logic signed [ZW-1:0] out_y0_re, out_y0_im,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_stall,      // cycles paused inside a block
  output int                   n_bubble,     // cycles the DUT refused input (drain blocks)
  output int                   n_overlap,    // outputs given while a later block was entering
  output int                   n_y0          // Y(0) outputs
);

  localparam real PI = 3.14159265358979323846;

  longint xr [NBLK][N];
  longint xi [NBLK][N];
  longint er [NBLK][N];
  longint ei [NBLK][N];
  longint hr [NBLK][N];
  longint hi [NBLK][N];
  longint cq [N];
  longint sq [N];

  int  cycle;
  int  first_in [NBLK];
  int  first_out [NBLK];
  bit  seen [N];
  int  out_blk, out_cnt;
  bit  feeding;

  function automatic longint rnd(real v);
    if (v >= 0.0) return longint'($rtoi(v + 0.5));
    return -longint'($rtoi(-v + 0.5));
  endfunction

  function automatic longint rand_sample();
    int r;
    r = int'($urandom);
    return longint'(r) >>> (32 - IW);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d: %s", N, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------- stimulus
  initial begin
    void'($urandom(SEED));
    cycle = 0; checks = 0; failures = 0; done = 1'b0;
    n_stall = 0; n_bubble = 0; n_overlap = 0; n_y0 = 0;
    out_blk = 0; out_cnt = 0; feeding = 1'b0;
    in_valid = 1'b0;
    {in_x0_re, in_x0_im, in_xn_re, in_xn_im, in_xnn_re, in_xnn_im} = '0;
    for (int r = 0; r < N; r++) begin
      cq[r] = rnd($cos(2.0 * PI * r / N) * (2.0 ** (CW - 1)));
      sq[r] = rnd($sin(2.0 * PI * r / N) * (2.0 ** (CW - 1)));
    end
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < N; n++) begin
        if (b == 0) begin
          xr[b][n] = -(longint'(1) << (IW - 1));
          xi[b][n] = REAL ? 0 : -(longint'(1) << (IW - 1));
        end else if (b == 1) begin
          xr[b][n] = (n == 1) ? (longint'(1) <<< (IW - 2)) + 3 : 0;
          xi[b][n] = (n == 2 && !REAL) ? -(longint'(1) <<< (IW - 3)) - 5 : 0;
        end else begin
          xr[b][n] = rand_sample();
          xi[b][n] = REAL ? 0 : rand_sample();
        end
      end
      for (int k = 0; k < N; k++) begin
        er[b][k] = 0;
        ei[b][k] = 0;
        hr[b][k] = 0;
        hi[b][k] = 0;
        for (int n = 0; n < N; n++) begin
          int r;
          r = (n * k) % N;
          if (k == 0) begin
            er[b][k] += xr[b][n];
            ei[b][k] += xi[b][n];
          end else if (n == 0) begin
            er[b][k] += xr[b][n] <<< (CW - 1);
            ei[b][k] += xi[b][n] <<< (CW - 1);
            hr[b][k] += xr[b][n] <<< (CW - 1);
            hi[b][k] += xi[b][n] <<< (CW - 1);
          end else begin
            // (xr + j xi)(c - j s)
            er[b][k] += xr[b][n] * cq[r] + xi[b][n] * sq[r];
            ei[b][k] += xi[b][n] * cq[r] - xr[b][n] * sq[r];
            // Hartley kernel cas = cos + sin
            hr[b][k] += xr[b][n] * (cq[r] + sq[r]);
            hi[b][k] += xi[b][n] * (cq[r] + sq[r]);
          end
        end
      end
    end

    @(posedge clk);
    while (!rst_n) @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      // gap before the block
      if (b >= 6) begin
        int gap;
        // a one-cycle gap always meets a drain block in progress; a long one empties the pipeline
        if (b % 3 == 0)      gap = 1;
        else if (b % 3 == 1) gap = int'($urandom_range(M + 1, 2 * M + 2));
        else                 gap = int'($urandom_range(0, 2));
        repeat (gap) begin
          @(negedge clk);
          in_valid = 1'b0;
          feeding  = 1'b0;
        end
      end
      for (int n = 1; n <= M; n++) begin
        @(negedge clk);
        if (b >= 6 && n > 1) begin
          while ($urandom_range(0, 7) == 0 || (b == 7 && n == 2 && in_valid)) begin
            in_valid = 1'b0;
            n_stall++;
            @(negedge clk);
          end
        end
        in_valid  = 1'b1;
        feeding   = 1'b1;
        in_x0_re  = IW'(xr[b][0]);
        in_x0_im  = IW'(xi[b][0]);
        in_xn_re  = IW'(xr[b][n]);
        in_xn_im  = IW'(xi[b][n]);
        in_xnn_re = IW'(xr[b][N-n]);
        in_xnn_im = IW'(xi[b][N-n]);
        while (!in_ready) begin
          n_bubble++;
          @(negedge clk);
        end
        if (n == 1) first_in[b] = cycle;
      end
    end
    @(negedge clk);
    feeding  = 1'b0;
    in_valid = 1'b0;
  end

  // ------------------------------------------------------------- output check
  always @(negedge clk) begin
    if (rst_n && out_valid && out_blk < NBLK) begin
      if (out_cnt == 0) begin
        first_out[out_blk] = cycle;
        for (int k = 0; k < N; k++) seen[k] = 1'b0;
      end
      if (feeding) n_overlap++;
      check(int'(out_k_a) >= 1 && int'(out_k_a) < N && int'(out_k_b) == N - int'(out_k_a),
            $sformatf("block %0d: index pair %0d/%0d", out_blk, out_k_a, out_k_b));
      if (int'(out_k_a) >= 1 && int'(out_k_a) < N) begin
        check(!seen[out_k_a] && !seen[out_k_b], $sformatf("block %0d: index %0d repeated", out_blk, out_k_a));
        seen[out_k_a] = 1'b1;
        seen[N - int'(out_k_a)] = 1'b1;
        check(longint'(out_a_re) == er[out_blk][out_k_a] && longint'(out_a_im) == ei[out_blk][out_k_a],
              $sformatf("block %0d Y(%0d) = (%0d,%0d), expected (%0d,%0d)", out_blk, out_k_a,
                        out_a_re, out_a_im, er[out_blk][out_k_a], ei[out_blk][out_k_a]));
        check(longint'(out_b_re) == er[out_blk][out_k_b] && longint'(out_b_im) == ei[out_blk][out_k_b],
              $sformatf("block %0d Y(%0d) = (%0d,%0d), expected (%0d,%0d)", out_blk, out_k_b,
                        out_b_re, out_b_im, er[out_blk][out_k_b], ei[out_blk][out_k_b]));
        check(longint'(out_ha_re) == hr[out_blk][out_k_a] && longint'(out_ha_im) == hi[out_blk][out_k_a],
              $sformatf("block %0d H(%0d) = (%0d,%0d), expected (%0d,%0d)", out_blk, out_k_a,
                        out_ha_re, out_ha_im, hr[out_blk][out_k_a], hi[out_blk][out_k_a]));
        check(longint'(out_hb_re) == hr[out_blk][out_k_b] && longint'(out_hb_im) == hi[out_blk][out_k_b],
              $sformatf("block %0d H(%0d) = (%0d,%0d), expected (%0d,%0d)", out_blk, out_k_b,
                        out_hb_re, out_hb_im, hr[out_blk][out_k_b], hi[out_blk][out_k_b]));
      end
      check(out_y0_valid == (out_cnt == 0), $sformatf("block %0d: Y(0) valid at slot %0d", out_blk, out_cnt));
      if (out_y0_valid) begin
        n_y0++;
        check(longint'(out_y0_re) == er[out_blk][0] && longint'(out_y0_im) == ei[out_blk][0],
              $sformatf("block %0d Y(0) = (%0d,%0d), expected (%0d,%0d)", out_blk,
                        out_y0_re, out_y0_im, er[out_blk][0], ei[out_blk][0]));
      end
      out_cnt++;
      if (out_cnt == M) begin
        out_cnt = 0;
        out_blk++;
        if (out_blk == NBLK) begin
          // latency of the first block and spacing of the back-to-back ones
          check(first_out[0] - first_in[0] == 2 * M + 2,
                $sformatf("latency %0d, expected %0d", first_out[0] - first_in[0], 2 * M + 2));
          for (int b = 1; b < 4 && b < NBLK; b++)
            check(first_out[b] - first_out[b-1] == M,
                  $sformatf("block %0d output spacing %0d, expected %0d", b,
                            first_out[b] - first_out[b-1], M));
          done = 1'b1;
        end
      end
    end else if (rst_n && out_valid) begin
      check(1'b0, "output after the last block");
    end
  end

endmodule
