// tb_dht_combiner: the four Hartley output adders, H(k) = (Cr+Si, Ci+Sr) and
// H(N-k) = (Cr-Si, Ci-Sr), on random and extreme operands.
module tb_dht_combiner;
  localparam int W = 40;
  logic signed [W-1:0] cr, ci, sr, si;
  logic signed [W:0]   ha_re, ha_im, hb_re, hb_im;
  int checks = 0, failures = 0;

  dht_combiner #(.W(W)) dut (.*);

  function automatic longint r40();
    return longint'({$urandom, $urandom}) >>> 24;
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      cr = W'(r40()); ci = W'(r40()); sr = W'(r40()); si = W'(r40());
      if (i == 0) begin cr = {1'b1, {(W-1){1'b0}}}; si = cr; ci = {1'b0, {(W-1){1'b1}}}; sr = ci; end
      if (i == 1) begin cr = {1'b1, {(W-1){1'b0}}}; si = {1'b0, {(W-1){1'b1}}}; ci = cr; sr = cr; end
      #1;
      checks += 4;
      if (longint'(ha_re) != longint'(cr) + longint'(si)) failures++;
      if (longint'(hb_re) != longint'(cr) - longint'(si)) failures++;
      if (longint'(ha_im) != longint'(ci) + longint'(sr)) failures++;
      if (longint'(hb_im) != longint'(ci) - longint'(sr)) failures++;
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
