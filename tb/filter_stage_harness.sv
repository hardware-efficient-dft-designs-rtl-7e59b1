// filter_stage_harness: drives one filter_stage with NBLK back-to-back blocks of random
// inputs (with random stalls) and checks each PISO slot during the following block.
//
// Reference, computed here from the DFT definition: with a_t = g^t mod N and l = M - s for
// slot s, the cosine stage must give sum_t m(t) * round(2^(CW-1) cos(2*pi*a_{t+l}/N)) plus
// x(0) * 2^(CW-1), the sine stage sum_t m(t) * round(2^(CW-1) sin(2*pi*a_{t+l}/N)), indices
// of a taken modulo N-1. For N = 5 the tap sums of the first block are also compared with the
// document's data-flow table: p = u(1)c4, q = u(1)c2 in the first cycle and
// p = u(1)c2 + u(2)c4, q = u(1)c4 + u(2)c2 in the second (c_r = cos(2*pi*r/5)).
module filter_stage_harness
  import dft_pkg::*;
#(
  parameter  int         N    = 5,
  parameter  coef_kind_e KIND = KIND_COS,
  parameter  int         NBLK = 6,
  localparam int         M    = (N - 1) / 2,
  localparam int         IW   = 17,
  localparam int         CW   = 16
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam real PI = 3.14159265358979323846;
  localparam bit  ADD = (KIND == KIND_COS);
  localparam int  OW  = IW + CW + $clog2(M) + 2;

  logic adv, first, last;
  logic signed [IW-1:0] m;
  logic signed [15:0]   x0;
  logic signed [OW-1:0] dout;

  filter_stage #(.N(N), .IW(IW), .CW(CW), .KIND(KIND), .ADD_X0(ADD), .XW(16)) dut (
    .clk, .adv, .first, .last, .m, .x0, .dout
  );

  longint mv [NBLK][M];
  longint x0v [NBLK];
  int     at [N];

  function automatic longint rnd(real v);
    return (v >= 0.0) ? longint'($rtoi(v + 0.5)) : -longint'($rtoi(-v + 0.5));
  endfunction

  function automatic longint coef_of(int r);
    real a = 2.0 * PI * r / N;
    return (KIND == KIND_COS) ? rnd($cos(a) * 32768.0) : rnd($sin(a) * 32768.0);
  endfunction

  function automatic longint expect_slot(int b, int s);
    longint acc = ADD ? (x0v[b] <<< (CW - 1)) : 0;
    int l = M - s;
    for (int t = 0; t < M; t++) acc += mv[b][t] * coef_of(at[(t + l) % (N - 1)]);
    return acc;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL N=%0d kind=%0d: %s", N, KIND, what);
    end
  endtask

  initial begin
    int g, r;
    done = 0; checks = 0; failures = 0;
    adv = 0; first = 0; last = 0; m = '0; x0 = '0;
    // primitive root by brute force
    for (g = 2; g < N; g++) begin
      int ord = 1;
      r = g;
      while (r != 1) begin r = (r * g) % N; ord++; end
      if (ord == N - 1) break;
    end
    r = 1;
    for (int t = 0; t < N - 1; t++) begin at[t] = r; r = (r * g) % N; end
    for (int b = 0; b < NBLK; b++) begin
      x0v[b] = longint'($urandom_range(0, 65535)) - 32768;
      for (int t = 0; t < M; t++)
        mv[b][t] = (b == 0) ? -65536 : longint'($urandom_range(0, 131071)) - 65536;
    end
    for (int b = 0; b <= NBLK; b++) begin
      for (int t = 0; t < M; t++) begin
        @(negedge clk);
        while (b > 1 && $urandom_range(0, 4) == 0) begin
          adv = 0;
          m = IW'($urandom);
          @(negedge clk);
        end
        if (b > 0)
          check(longint'(dout) == expect_slot(b - 1, t),
                $sformatf("block %0d slot %0d: %0d expected %0d", b - 1, t, dout, expect_slot(b - 1, t)));
        adv = 1; first = (t == 0); last = (t == M - 1);
        m  = (b < NBLK) ? IW'(mv[b][t]) : '0;
        x0 = (b < NBLK) ? 16'(x0v[b]) : '0;
        if (N == 5 && KIND == KIND_COS && b == 0) begin
          #1;
          if (t == 0)
            check(longint'(dut.psum[0]) == mv[0][0] * coef_of(4) &&
                  longint'(dut.psum[1]) == mv[0][0] * coef_of(2), "data-flow table, cycle 1");
          else
            check(longint'(dut.psum[0]) == mv[0][0] * coef_of(2) + mv[0][1] * coef_of(4) &&
                  longint'(dut.psum[1]) == mv[0][0] * coef_of(4) + mv[0][1] * coef_of(2),
                  "data-flow table, cycle 2");
        end
      end
    end
    done = 1;
  end

endmodule
