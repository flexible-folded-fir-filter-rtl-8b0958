// tb_fir_ctrl: checks the mode controller at the default size.
//  * configuration check: random (N, k_c, m_c, e) sets, accepted exactly when
//    1 <= N <= 16, 1 <= k_c <= 8, k_c*m_c = 8N and gcd(8+e, N) = 1;
//  * initialization: for accepted sets it feeds K*N bits (with gaps) and
//    checks each write: row p mod 8, column tau(p) mod N with
//    tau(p) = p + e*floor(p/8), load flag for the first bit of a coefficient,
//    tap floor(tau/N) - g, and that every (row, column) is written once;
//  * run mode: x_ready exactly in phase 0, start only with a sample, stall
//    (en low) while the sample is missing, last in the phase of operation L-1.
module tb_fir_ctrl;
  import ffir_pkg::*;
  localparam int K = 8, N_MAX = 16, E_MAX = 3;
  logic clk = 0, rst_n = 0;
  logic cfg_start = 0;
  logic [4:0] cfg_n = '0;
  logic [3:0] cfg_kc = '0;
  logic [7:0] cfg_mc = '0;
  logic [1:0] cfg_wrap = '0;
  logic cfg_err, cb_ready, x_ready;
  mode_e mode;
  logic cb_valid = 0, cb_bit = 0, x_valid = 0;
  logic [4:0] n_cfg;
  logic [1:0] wrap_sel;
  logic en, clr, start, last, shift, rot_en, wr_en, wr_bit, wr_load;
  logic [2:0] wr_row;
  logic [3:0] wr_col, wr_tap;
  int checks = 0, failures = 0;

  fir_ctrl #(.K(K), .N_MAX(N_MAX), .E_MAX(E_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gcd(int a, int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic one(int n, int kc, int mc, int e);
    int ph;
    bit adv;
    bit exp_ok = (n >= 1 && n <= N_MAX && kc >= 1 && kc <= K && kc * mc == K * n && gcd(K + e, n) == 1);
    @(negedge clk);
    cfg_n = 5'(n); cfg_kc = 4'(kc); cfg_mc = 8'(mc); cfg_wrap = 2'(e); cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    chk(cfg_err == !exp_ok && mode == (exp_ok ? MODE_INIT : MODE_IDLE),
        $sformatf("config n=%0d kc=%0d mc=%0d e=%0d err=%0d", n, kc, mc, e, cfg_err));
    if (exp_ok) begin
      bit seen [K][N_MAX];
      int L = K * n, last_c = 0;
      foreach (seen[r, c]) seen[r][c] = 0;
      for (int p = 0; p < L; p++) begin
        int tau = p + e * (p / K);
        int g = p / mc, j = p % mc;
        while ($urandom_range(0, 3) == 0) begin
          cb_valid = 0; #1;
          chk(!wr_en, "write without bit");
          @(negedge clk);
        end
        cb_valid = 1; cb_bit = $urandom_range(0, 1);
        #1;
        chk(wr_en && cb_ready && wr_bit == cb_bit && int'(wr_row) == p % K && int'(wr_col) == tau % n
            && wr_load == (j == 0) && (j != 0 || int'(wr_tap) == tau / n - g),
            $sformatf("write p=%0d row %0d col %0d load %b tap %0d", p, wr_row, wr_col, wr_load, wr_tap));
        chk(!seen[p % K][tau % n], "position written twice");
        seen[p % K][tau % n] = 1;
        last_c = tau % n;
        @(negedge clk);
      end
      cb_valid = 0;
      chk(mode == MODE_RUN && n_cfg == 5'(n) && wrap_sel == 2'(e), "run mode after initialization");
      // run: phases
      ph = 0;
      for (int t = 0; t < 6 * n; t++) begin
        x_valid = $urandom_range(0, 2) != 0;
        #1;
        chk(x_ready == (ph == 0) && start == (ph == 0 && x_valid) && shift == start
            && en == (ph != 0 || x_valid) && rot_en == en && !clr && last == (ph == last_c),
            $sformatf("run n=%0d ph=%0d ready=%b start=%b en=%b last=%b", n, ph, x_ready, start, en, last));
        adv = en;
        @(negedge clk);
        if (adv) ph = (ph + 1) % n;
      end
      x_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(16, 2, 64, 1); one(16, 2, 64, 0); one(3, 2, 12, 0); one(6, 3, 16, 3); one(6, 3, 16, 1);
    one(16, 3, 43, 1); one(0, 1, 0, 0); one(1, 8, 1, 0); one(4, 4, 8, 1); one(7, 1, 56, 2);
    for (int it = 0; it < 40; it++) begin
      automatic int n = $urandom_range(1, N_MAX), kc = $urandom_range(1, K);
      automatic int mc = ((K * n) % kc == 0 && $urandom_range(0, 3) != 0) ? K * n / kc : $urandom_range(1, 128);
      one(n, kc, mc, $urandom_range(0, E_MAX));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
