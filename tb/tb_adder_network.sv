// tb_adder_network: checks every constant product of the shift-and-add network.
//
// Three networks (N = 61 cosine, N = 61 negated sine, N = 5 cosine) get random inputs and
// the two extreme values. Each product must equal x * round(2^15 * cos(2*pi*a_k/N)) (or
// -round(2^15 * sin(...))), with a_k = g^k mod N recomputed here from a brute-force
// primitive root.
module tb_adder_network;

  import dft_pkg::*;

  localparam int CW = 16;
  localparam int IW = 17;
  localparam real PI = 3.14159265358979323846;

  logic signed [IW-1:0]    x;
  logic signed [IW+CW-1:0] p61c [30];
  logic signed [IW+CW-1:0] p61s [30];
  logic signed [IW+CW-1:0] p5c  [2];
  int checks = 0, failures = 0;

  adder_network #(.N(61), .IW(IW), .CW(CW), .KIND(KIND_COS))  u61c (.x(x), .prod(p61c));
  adder_network #(.N(61), .IW(IW), .CW(CW), .KIND(KIND_NSIN)) u61s (.x(x), .prod(p61s));
  adder_network #(.N(5),  .IW(IW), .CW(CW), .KIND(KIND_COS))  u5c  (.x(x), .prod(p5c));

  function automatic int root(int n);
    for (int g = 2; g < n; g++) begin
      bit ok = 1'b1;
      int r = 1;
      for (int e = 1; e < n - 1; e++) begin
        r = (r * g) % n;
        if (r == 1) ok = 1'b0;
      end
      if (ok) return g;
    end
    return 0;
  endfunction

  function automatic int ak(int n, int k);
    int r = 1;
    for (int e = 0; e < k; e++) r = (r * root(n)) % n;
    return r;
  endfunction

  function automatic longint rnd(real v);
    return (v >= 0.0) ? longint'($rtoi(v + 0.5)) : -longint'($rtoi(-v + 0.5));
  endfunction

  function automatic longint href(int n, bit is_sin, int k);
    real a = 2.0 * PI * ak(n, k) / n;
    return is_sin ? -rnd($sin(a) * 32768.0) : rnd($cos(a) * 32768.0);
  endfunction

  task automatic cmp(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      if (i == 0)      x = {1'b1, {(IW-1){1'b0}}};
      else if (i == 1) x = {1'b0, {(IW-1){1'b1}}};
      else             x = IW'($urandom);
      #1;
      for (int k = 0; k < 30; k++) begin
        cmp(longint'(p61c[k]), longint'(x) * href(61, 1'b0, k), $sformatf("N=61 cos k=%0d x=%0d", k, x));
        cmp(longint'(p61s[k]), longint'(x) * href(61, 1'b1, k), $sformatf("N=61 sin k=%0d x=%0d", k, x));
      end
      for (int k = 0; k < 2; k++)
        cmp(longint'(p5c[k]), longint'(x) * href(5, 1'b0, k), $sformatf("N=5 cos k=%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
