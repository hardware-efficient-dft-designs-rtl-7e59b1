// tb_uv_preadder: u = a + b and v = a - b on random and extreme complex inputs.
module tb_uv_preadder;
  localparam int IW = 16;
  logic signed [IW-1:0] a_re, a_im, b_re, b_im;
  logic signed [IW:0]   u_re, u_im, v_re, v_im;
  int checks = 0, failures = 0;

  uv_preadder #(.IW(IW)) dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      if (i == 0) begin
        a_re = -16'sd32768; a_im = 16'sd32767; b_re = -16'sd32768; b_im = -16'sd32768;
      end else begin
        a_re = IW'($urandom); a_im = IW'($urandom); b_re = IW'($urandom); b_im = IW'($urandom);
      end
      #1;
      checks += 4;
      if (int'(u_re) != int'(a_re) + int'(b_re)) failures++;
      if (int'(u_im) != int'(a_im) + int'(b_im)) failures++;
      if (int'(v_re) != int'(a_re) - int'(b_re)) failures++;
      if (int'(v_im) != int'(a_im) - int'(b_im)) failures++;
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
