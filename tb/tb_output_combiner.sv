// tb_output_combiner: the four output adders, Y(k) = (Cr+Sr, Ci-Si), Y(N-k) = (Cr-Sr, Ci+Si).
module tb_output_combiner;
  localparam int W = 40;
  logic signed [W-1:0] cr, ci, sr, si;
  logic signed [W:0]   ya_re, ya_im, yb_re, yb_im;
  int checks = 0, failures = 0;

  output_combiner #(.W(W)) dut (.*);

  function automatic longint r40();
    return longint'({$urandom, $urandom}) >>> 24;
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      cr = W'(r40()); ci = W'(r40()); sr = W'(r40()); si = W'(r40());
      if (i == 0) begin cr = {1'b1, {(W-1){1'b0}}}; sr = cr; ci = {1'b0, {(W-1){1'b1}}}; si = cr; end
      #1;
      checks += 4;
      if (longint'(ya_re) != longint'(cr) + longint'(sr)) failures++;
      if (longint'(yb_re) != longint'(cr) - longint'(sr)) failures++;
      if (longint'(ya_im) != longint'(ci) - longint'(si)) failures++;
      if (longint'(yb_im) != longint'(ci) + longint'(si)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
