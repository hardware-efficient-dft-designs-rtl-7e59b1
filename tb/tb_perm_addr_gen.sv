// tb_perm_addr_gen: for N = 5, 13 and 61, the pair (x(n), x(N-n)) presented at phase ph = n-1
// must land where the read side expects it: x(n) at read position t with g^t = n (mod N),
// i.e. bank A address t for t < M, bank B address t-M otherwise. Also every bank address is
// written exactly once per block.
module tb_perm_addr_gen;
  int checks = 0, failures = 0;

  logic [0:0] ph5,  a5;  logic s5;
  logic [2:0] ph13, a13; logic s13;
  logic [4:0] ph61, a61; logic s61;

  perm_addr_gen #(.N(5))  d5  (.ph(ph5),  .addr(a5),  .swap(s5));
  perm_addr_gen #(.N(13)) d13 (.ph(ph13), .addr(a13), .swap(s13));
  perm_addr_gen #(.N(61)) d61 (.ph(ph61), .addr(a61), .swap(s61));

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

  function automatic int logpos(int n, int v);
    int r = 1;
    for (int t = 0; t < n - 1; t++) begin
      if (r == v) return t;
      r = (r * root(n)) % n;
    end
    return -1;
  endfunction

  task automatic run(input int n);
    int m = (n - 1) / 2;
    bit used [64];
    for (int i = 0; i < 64; i++) used[i] = 1'b0;
    for (int p = 0; p < m; p++) begin
      int t, addr;
      bit swap;
      if (n == 5)  ph5  = 1'(p);
      if (n == 13) ph13 = 3'(p);
      if (n == 61) ph61 = 5'(p);
      #1;
      addr = (n == 5) ? int'(a5) : (n == 13) ? int'(a13) : int'(a61);
      swap = (n == 5) ? s5 : (n == 13) ? s13 : s61;
      t = logpos(n, p + 1);
      checks++;
      if (addr != t % m || swap != (t >= m)) begin
        failures++;
        $display("FAIL N=%0d ph=%0d: addr %0d swap %0d, expected position %0d", n, p, addr, swap, t);
      end
      checks++;
      if (used[addr]) begin
        failures++;
        $display("FAIL N=%0d: address %0d used twice", n, addr);
      end
      used[addr] = 1'b1;
    end
  endtask

  initial begin
    run(5);
    run(13);
    run(61);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
