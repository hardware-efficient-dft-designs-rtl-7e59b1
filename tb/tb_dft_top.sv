// tb_dft_top: end-to-end test of dft_top at its default size (N = 61, 16-bit words).
//
// Twelve transforms go through the DFT pipeline: six back to back (latency and rate
// checked), then with pauses inside blocks (stall) and long gaps between blocks (the
// pipeline drains with empty blocks). Every output pair and every Y(0) is compared with a
// direct DFT sum. The test also counts that each flow mechanism happened at least once:
// stall, drain block, output overlapping the next block's input, Y(0) output. The FIR
// example beside the DFT is fed random samples and checked against 16*y =
// 12x[0] - 6x[1] + 8x[2] - 5x[3].
module tb_dft_top;

  localparam int N  = 61;
  localparam int IW = 16;
  localparam int CW = 16;
  localparam int FW = 16;
  localparam int M  = (N - 1) / 2;
  localparam int KW = $clog2(N);
  localparam int YW = IW + 1 + CW + $clog2(M) + 3;
  localparam int ZW = IW + $clog2(N) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic                 in_valid, in_ready;
  logic signed [IW-1:0] in_x0_re, in_x0_im, in_xn_re, in_xn_im, in_xnn_re, in_xnn_im;
  logic                 out_valid, out_y0_valid;
  logic [KW-1:0]        out_k_a, out_k_b;
  logic signed [YW-1:0] out_a_re, out_a_im, out_b_re, out_b_im;
  logic signed [YW-1:0] out_ha_re, out_ha_im, out_hb_re, out_hb_im;
  logic signed [ZW-1:0] out_y0_re, out_y0_im;
  logic                 fir_en;
  logic signed [FW-1:0] fir_x;
  logic signed [FW+5:0] fir_y;

  logic done;
  int   sb_checks, sb_failures, n_stall, n_bubble, n_overlap, n_y0;
  int   checks = 0, failures = 0, fir_checks = 0;

  dft_top dut (
    .clk, .rst_n, .in_valid, .in_ready,
    .in_x0_re, .in_x0_im, .in_xn_re, .in_xn_im, .in_xnn_re, .in_xnn_im,
    .out_valid, .out_k_a, .out_k_b, .out_a_re, .out_a_im, .out_b_re, .out_b_im,
    .out_ha_re, .out_ha_im, .out_hb_re, .out_hb_im,
    .out_y0_valid, .out_y0_re, .out_y0_im,
    .fir_en, .fir_x, .fir_y
  );

  dft_scoreboard #(.N(N), .IW(IW), .CW(CW), .NBLK(12), .SEED(7)) sb (
    .clk, .rst_n, .in_valid, .in_ready,
    .in_x0_re, .in_x0_im, .in_xn_re, .in_xn_im, .in_xnn_re, .in_xnn_im,
    .out_valid, .out_k_a, .out_k_b, .out_a_re, .out_a_im, .out_b_re, .out_b_im,
    .out_ha_re, .out_ha_im, .out_hb_re, .out_hb_im,
    .out_y0_valid, .out_y0_re, .out_y0_im,
    .done, .checks(sb_checks), .failures(sb_failures),
    .n_stall, .n_bubble, .n_overlap, .n_y0
  );

  // FIR example: random samples, checked one cycle after each enabled edge
  longint hist [4];
  always @(negedge clk) begin
    if (!rst_n) begin
      fir_en <= 1'b0;
      fir_x  <= '0;
      for (int i = 0; i < 4; i++) hist[i] = 0;
    end else begin
      if (fir_en) begin
        for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(fir_x);
        checks++;
        fir_checks++;
        if (longint'(fir_y) != 12 * hist[0] - 6 * hist[1] + 8 * hist[2] - 5 * hist[3]) begin
          failures++;
          $display("FAIL FIR: y=%0d", fir_y);
        end
      end
      fir_en = ($urandom_range(0, 3) != 0);
      fir_x  = FW'($urandom);
    end
  end

  task automatic mech(input string name, input int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", name);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (4 * M) @(posedge clk);
    #1;
    mech("stall inside a block", n_stall);
    mech("drain (empty block)", n_bubble);
    mech("overlapped blocks", n_overlap);
    mech("Y(0) output", n_y0);
    mech("FIR outputs checked", fir_checks);
    checks += sb_checks;
    failures += sb_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N * 12 + 2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb_checks, failures + sb_failures + 1);
    $finish;
  end

endmodule
