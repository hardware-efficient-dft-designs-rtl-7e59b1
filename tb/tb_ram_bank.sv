// tb_ram_bank: writes random words, reads them back one cycle later, and checks that a
// disabled read port holds its output and a disabled write port leaves memory unchanged.
module tb_ram_bank;
  localparam int DEPTH = 30;
  localparam int W = 32;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic we, re;
  logic [4:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  ram_bank #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] held;
      @(negedge clk);
      held = rdata;
      we = ($urandom_range(0, 1) == 1); waddr = 5'($urandom_range(0, DEPTH - 1)); wdata = $urandom;
      re = ($urandom_range(0, 3) != 0); raddr = 5'($urandom_range(0, DEPTH - 1));
      begin
        logic [W-1:0] exp;
        logic r;
        exp = model[raddr];
        r = re;
        if (we) model[waddr] = wdata;
        @(posedge clk); #1;
        checks++;
        if (r ? (rdata != exp) : (rdata != held)) begin
          failures++;
          if (failures < 5) $display("FAIL read %h expected %h", rdata, r ? exp : held);
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
