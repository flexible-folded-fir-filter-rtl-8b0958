// tb_folded_array: drives the ring of sections directly from a schedule
// computed here: wave w starts in S_0 at cycle w*N, and its operation p runs
// in section p mod 8 at cycle w*N + p + e*floor(p/8). For each section and
// cycle the testbench supplies the coefficient bit of the operation it
// performs, the load flag for the first bit of a coefficient and the sample
// x[w+g]; positions without an output in progress get random values. It checks
// that every output finishes in the cycle after its last operation with the
// carry-save value sum_g c_{k_c-1-g} * x[w+g] mod 2^27, and that random
// stall cycles (en low) change nothing.
module tb_folded_array;
  localparam int K = 8, XW = 8, YW = 27, E_MAX = 3;
  localparam int W = 12;   // waves per run
  logic clk = 0, rst_n = 0;
  logic en = 0, clr = 0, start = 0, last = 0;
  logic [1:0] wrap_sel = '0;
  logic [K-1:0] coef_bits = '0, load = '0;
  logic [K-1:0][XW-1:0] x_load = '0;
  logic [YW-1:0] res_s, res_c;
  logic res_done;
  int checks = 0, failures = 0;
  logic [127:0] coef [K];
  logic [XW-1:0] xs [W + K];

  folded_array #(.K(K), .XW(XW), .YW(YW), .E_MAX(E_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int kc, int e);
    int mc = K * n / kc, L = K * n;
    int tmax = L - 1 + e * (n - 1);
    int ndone = 0, expect_w = 0;
    for (int i = 0; i < kc; i++) begin
      coef[i] = {$urandom, $urandom, $urandom, $urandom};
      if (mc < 128) coef[i] &= (128'd1 << mc) - 1;
    end
    foreach (xs[i]) xs[i] = XW'($urandom);
    wrap_sel = 2'(e);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int t = 0; t <= (W - 1) * n + tmax; ) begin
      en = ($urandom_range(0, 4) != 0);
      start = (t % n == 0) && (t / n < W);
      last = $urandom_range(0, 1);
      for (int s = 0; s < K; s++) begin
        coef_bits[s] = $urandom_range(0, 1); load[s] = $urandom_range(0, 1); x_load[s] = XW'($urandom);
      end
      for (int w = 0; w < W; w++) begin
        int tau = t - w * n;
        if (tau >= 0 && tau <= tmax && tau % (K + e) < K) begin
          int s = tau % (K + e);
          int p = (tau / (K + e)) * K + s;
          int g = p / mc, j = p % mc;
          coef_bits[s] = coef[kc - 1 - g][j];
          load[s] = (j == 0);
          x_load[s] = xs[w + g];
          if (s == K - 1) last = (p == L - 1);
        end
      end
      @(posedge clk); #1;
      if (en) begin
        if ((t - tmax) >= 0 && (t - tmax) % n == 0) begin
          logic [YW-1:0] exp_y = '0;
          int w = (t - tmax) / n;
          for (int g = 0; g < kc; g++) exp_y += YW'(coef[kc - 1 - g]) * YW'(xs[w + g]);
          checks++;
          if (!res_done || YW'(res_s + res_c) !== exp_y) begin
            failures++;
            $display("FAIL n=%0d kc=%0d e=%0d wave %0d: done=%b %h want %h", n, kc, e, w, res_done,
                     YW'(res_s + res_c), exp_y);
          end
          ndone++;
        end else begin
          checks++;
          if (res_done) begin failures++; $display("FAIL n=%0d e=%0d t=%0d: unexpected done", n, e, t); end
        end
        t++;
      end
      @(negedge clk);
    end
    en = 0; start = 0;
    checks++;
    if (ndone != W) begin failures++; $display("FAIL %0d outputs, want %0d", ndone, W); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16, 2, 1);
    run(8, 4, 1);
    run(4, 4, 1);
    run(3, 2, 0);
    run(5, 8, 0);
    run(6, 3, 3);
    run(1, 8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
