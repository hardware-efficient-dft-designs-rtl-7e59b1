// tb_piso: parallel load, serial shift-out highest index first, hold while disabled.
module tb_piso;
  localparam int W = 12;
  localparam int DEPTH = 5;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic en, load;
  logic signed [W-1:0] din [DEPTH];
  logic signed [W-1:0] dout;
  logic signed [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  piso #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    en = 0; load = 0;
    for (int j = 0; j < DEPTH; j++) begin din[j] = '0; model[j] = '0; end
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      load = ($urandom_range(0, 5) == 0) || i == 0;
      for (int j = 0; j < DEPTH; j++) din[j] = W'($urandom);
      if (i == 0) en = 1;
      if (en) begin
        if (load) for (int j = 0; j < DEPTH; j++) model[j] = din[j];
        else begin
          for (int j = DEPTH - 1; j > 0; j--) model[j] = model[j-1];
          model[0] = '0;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (dout != model[DEPTH-1]) begin
        failures++;
        if (failures < 5) $display("FAIL dout %0d expected %0d", dout, model[DEPTH-1]);
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
