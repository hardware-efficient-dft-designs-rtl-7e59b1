// tb_dft_lengths: the DFT at the transform lengths 5, 7, 11, 17, 31, 37, 67, 127 and 131
// with 8-bit and 16-bit words (input and coefficients equally wide), plus N = 61 with 8-bit
// words; N = 61 with 16-bit words is tb_dft_top. A further N = 61, 16-bit instance is built
// for real input only (REAL_IN) and driven with real samples. Each instance runs nine
// transforms with stalls and drains and checks every output against direct DFT and Hartley sums.
module tb_dft_lengths;
  localparam int NL = 9;
  localparam int LENS [NL] = '{5, 7, 11, 17, 31, 37, 67, 127, 131};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic d8 [NL], d16 [NL], d61, dr;
  int   c8 [NL], c16 [NL], f8 [NL], f16 [NL], c61, f61, cr, fr;
  int   s8 [NL], s16 [NL], b8 [NL], b16 [NL], o8 [NL], o16 [NL], s61, b61, o61, sr, br, orl;

  for (genvar i = 0; i < NL; i++) begin : g_len
    dft_len_harness #(.N(LENS[i]), .W(8)) h8 (
      .clk, .rst_n, .done(d8[i]), .checks(c8[i]), .failures(f8[i]),
      .n_stall(s8[i]), .n_bubble(b8[i]), .n_overlap(o8[i]));
    dft_len_harness #(.N(LENS[i]), .W(16)) h16 (
      .clk, .rst_n, .done(d16[i]), .checks(c16[i]), .failures(f16[i]),
      .n_stall(s16[i]), .n_bubble(b16[i]), .n_overlap(o16[i]));
  end
  dft_len_harness #(.N(61), .W(8)) h61 (
    .clk, .rst_n, .done(d61), .checks(c61), .failures(f61),
    .n_stall(s61), .n_bubble(b61), .n_overlap(o61));
  dft_len_harness #(.N(61), .W(16), .REAL(1'b1)) h61r (
    .clk, .rst_n, .done(dr), .checks(cr), .failures(fr),
    .n_stall(sr), .n_bubble(br), .n_overlap(orl));

  function automatic bit all_done();
    bit r = d61 & dr;
    for (int i = 0; i < NL; i++) r &= d8[i] & d16[i];
    return r;
  endfunction

  task automatic report(input int extra);
    int c = c61 + cr, f = f61 + fr + extra;
    for (int i = 0; i < NL; i++) begin
      c += c8[i] + c16[i];
      f += f8[i] + f16[i];
    end
    // every instance must have stalled, drained and overlapped blocks at least once
    for (int i = 0; i < NL; i++) begin
      c += 2;
      if (s8[i] == 0 || b8[i] == 0 || o8[i] == 0) begin
        f++;
        $display("FAIL N=%0d 8-bit: stall %0d drain %0d overlap %0d", LENS[i], s8[i], b8[i], o8[i]);
      end
      if (s16[i] == 0 || b16[i] == 0 || o16[i] == 0) f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    repeat (300) @(posedge clk);
    report(0);
    $finish;
  end

  initial begin
    repeat (40 * 131 * 9 + 4000) @(posedge clk);
    $display("watchdog expired");
    for (int i = 0; i < NL; i++)
      if (!d8[i] || !d16[i]) $display("N=%0d not finished (8-bit %0d, 16-bit %0d)", LENS[i], d8[i], d16[i]);
    report(1);
    $finish;
  end
endmodule
