// tb_dft_controller: sequencing of the pipeline controller for N = 13 (M = 6).
//
// Checked every cycle: phases stay in range, ph_f is ph one advance late, adv follows
// in_valid inside a data block, and in_ready drops only inside an empty (drain) block.
// Checked per block: the bank pair flips at every block boundary; each real block gets
// exactly M advancing cycles with f_valid and then M with o_valid; with continuous input the
// F section of a block starts M+1 cycles and the O section 2M+1 cycles after its first pair;
// after the input stops the pipeline runs exactly three empty blocks and then idles.
module tb_dft_controller;
  localparam int N = 13;
  localparam int M = 6;

  logic clk = 1'b0;
  always #5 clk = !clk;
  logic rst_n, in_valid, in_ready, adv, wr_en, wr_sel, f_first, f_last, f_valid, o_valid, bubble;
  logic [2:0] ph, ph_f;
  int checks = 0, failures = 0;
  int cycle = 0;
  int nblk_in = 0, f_cnt = 0, o_cnt = 0, bubble_blocks = 0;
  int first_in0 = -1, first_f0 = -1, first_o0 = -1;
  logic [2:0] ph_prev;
  logic sel_prev;
  logic adv_prev;

  dft_controller #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // per-cycle checks, sampled before the rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      check(ph < 3'(M) && ph_f < 3'(M), "phase out of range");
      if (ph != 0 && !bubble) check(adv == in_valid, "adv must follow in_valid inside a block");
      check(in_ready == !(bubble && ph != 0), "in_ready");
      check(wr_en == (adv && in_valid && in_ready), "wr_en");
      if (adv && ph == 0 && !in_valid) bubble_blocks++;
      if (adv && f_valid) f_cnt++;
      if (adv && o_valid) o_cnt++;
      if (wr_en && ph == 0) begin
        nblk_in++;
        if (first_in0 < 0) first_in0 = cycle;
      end
      if (f_valid && first_f0 < 0) first_f0 = cycle;
      if (o_valid && first_o0 < 0) first_o0 = cycle;
    end
  end

  always @(posedge clk) begin
    if (rst_n && adv) begin
      ph_prev  <= ph;
      sel_prev <= wr_sel;
    end
    adv_prev <= adv && rst_n;
  end

  always @(negedge clk) begin
    if (rst_n && adv_prev) begin
      check(ph_f == ph_prev, "ph_f is not ph delayed by one advance");
      check(wr_sel == (ph == 0 ? !sel_prev : sel_prev), "bank pair must flip exactly at block boundaries");
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    rst_n = 0; in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 3 blocks back to back, then 4 blocks with stalls and gaps
    for (int b = 0; b < 7; b++) begin
      if (b >= 3) begin
        int gap = (b == 5) ? 2 * M : int'($urandom_range(0, 1));
        repeat (gap) begin @(negedge clk); in_valid = 0; end
      end
      for (int p = 0; p < M; p++) begin
        @(negedge clk);
        if (b >= 3 && p > 0) while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        while (!in_ready) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    bubble_blocks = 0;
    repeat (6 * M) @(negedge clk);
    check(first_f0 - first_in0 == M + 1, $sformatf("F section start %0d", first_f0 - first_in0));
    check(first_o0 - first_in0 == 2 * M + 1, $sformatf("O section start %0d", first_o0 - first_in0));
    check(nblk_in == 7, $sformatf("blocks accepted %0d", nblk_in));
    check(f_cnt == 7 * M, $sformatf("F cycles %0d", f_cnt));
    check(o_cnt == 7 * M, $sformatf("O cycles %0d", o_cnt));
    check(bubble_blocks == 3, $sformatf("drain blocks %0d", bubble_blocks));
    check(!adv && !f_valid && !o_valid, "pipeline should be idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
