// tb_ffir_top: end-to-end test of the folded FIR filter at its default size
// (K = 8 sections, N_max = 16, 8-bit input, 27-bit output).
//
// For every configuration the test loads random coefficients serially,
// streams random samples and compares each output with
// y[n] = sum_i c_i * x[n-i] mod 2^27 computed here with wide integers. It runs
// the six (N, k_c, m_c) settings of the reference configuration table, with
// one extra fold-path register since 8 and N share a factor there, settings
// where 8 and N are coprime (no extra register), one that needs three extra
// registers, and rejected settings. Without stalls it checks the latency from
// accepting x[n] to y[n] and the N-cycle output spacing; in stall runs the
// sample source leaves gaps. It counts how often each mechanism occurred
// (initialization, rejected configuration, reconfiguration after running,
// stall, fold path with and without extra registers, sample entry at a
// coefficient boundary) and fails if any never did.
module tb_ffir_top;
  import ffir_pkg::*;

  localparam int K = 8, N_MAX = 16, XW = 8, YW = 27, E_MAX = 3;
  localparam int MAXS = 40;   // samples per run

  logic clk = 0, rst_n = 0;
  logic cfg_start = 0;
  logic [4:0] cfg_n = '0;
  logic [3:0] cfg_kc = '0;
  logic [7:0] cfg_mc = '0;
  logic [1:0] cfg_wrap = '0;
  logic cfg_err, cb_ready, x_ready, y_valid;
  mode_e mode;
  logic cb_valid = 0, cb_bit = 0, x_valid = 0;
  logic [XW-1:0] x_data = '0;
  logic [YW-1:0] y_data;

  ffir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_init = 0, n_reject = 0, n_reconf = 0, n_stall = 0, n_fold0 = 0, n_folde = 0, n_bound = 0;
  int n_outputs = 0;
  logic ran_before = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (mode == MODE_RUN && x_ready && !x_valid) n_stall++;
  always @(posedge clk) if (dut.en) begin
    for (int s = 1; s < K; s++) if (dut.load[s]) n_bound++;
  end

  function automatic int gcd(int a, int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction

  // ---------------------------------------------------------------------------
  logic [127:0] coef [K];
  logic [XW-1:0] xs [MAXS];
  longint acc_cyc [MAXS];
  int     nacc;

  task automatic configure(int n, int kc, int mc, int e, bit expect_ok);
    @(negedge clk);
    cfg_n = 5'(n); cfg_kc = 4'(kc); cfg_mc = 8'(mc); cfg_wrap = 2'(e);
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    checks++;
    if (cfg_err !== !expect_ok || (expect_ok && mode != MODE_INIT) || (!expect_ok && mode != MODE_IDLE)) begin
      failures++;
      $display("FAIL config n=%0d kc=%0d mc=%0d e=%0d: err=%0d mode=%0d", n, kc, mc, e, cfg_err, mode);
    end
    if (!expect_ok) n_reject++;
    else if (ran_before) n_reconf++;
  endtask

  task automatic load_coefs(int n, int kc, int mc, bit gaps);
    int L = K * n;
    longint c0 = cycle;
    int bits = 0;
    for (int i = 0; i < kc; i++) begin
      coef[i] = {$urandom, $urandom, $urandom, $urandom};
      if (mc < 128) coef[i] &= (128'd1 << mc) - 1;
    end
    for (int p = 0; p < L; p++) begin
      int i = kc - 1 - p / mc;
      int j = p % mc;
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        cb_valid = 0; @(negedge clk);
      end
      cb_valid = 1; cb_bit = coef[i][j];
      @(negedge clk);
      if (!(mode == MODE_INIT || (p == L - 1 && mode == MODE_RUN))) begin
        failures++; $display("FAIL mode during init p=%0d", p);
      end
      bits++;
    end
    cb_valid = 0;
    checks++;
    if (mode != MODE_RUN || bits != L) begin
      failures++; $display("FAIL init did not end in run mode after %0d bits", bits);
    end
    if (!gaps) begin
      checks++;
      if (cycle - c0 != longint'(L)) begin failures++; $display("FAIL init took %0d cycles, want %0d", cycle - c0, L); end
    end
    n_init++;
  endtask

  // expected output for sample index m (needs m >= kc-1)
  function automatic logic [YW-1:0] ref_y(int m, int kc);
    logic [255:0] acc = '0;
    for (int i = 0; i < kc; i++) acc += 256'(coef[i]) * 256'(xs[m - i]);
    return acc[YW-1:0];
  endfunction

  task automatic run(int n, int kc, int mc, int e, bit stalls);
    int nout = 0;
    int lat = kc * mc - (kc - 1) * n + e * (n - 1) + YW;
    longint last_out = -1;
    nacc = 0;
    for (int m = 0; m < MAXS; m++) xs[m] = XW'($urandom);
    if (e == 0) n_fold0++; else n_folde++;
    fork
      begin : producer
        while (nacc < MAXS) begin
          x_valid = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
          x_data  = xs[nacc];
          @(posedge clk);
          if (x_valid && x_ready) begin acc_cyc[nacc] = cycle; nacc++; end
          #1;
        end
        x_valid = 0;
        // keep feeding zeros is not needed: outputs up to MAXS-1 only need xs
        // that were accepted, but the array advances only when fed, so continue
        while (nout < MAXS - kc + 1) begin
          x_valid = 1; x_data = '0;
          @(posedge clk); #1;
        end
        x_valid = 0;
      end
      begin : consumer
        while (nout < MAXS - kc + 1) begin
          @(posedge clk);
          if (y_valid) begin
            int m = nout + kc - 1;
            logic [YW-1:0] exp_y = ref_y(m, kc);
            checks++;
            if (y_data !== exp_y) begin
              failures++;
              $display("FAIL n=%0d kc=%0d mc=%0d e=%0d y[%0d]=%h want %h", n, kc, mc, e, m, y_data, exp_y);
            end
            if (!stalls) begin
              checks++;
              if (cycle - acc_cyc[m] != longint'(lat)) begin
                failures++;
                $display("FAIL latency y[%0d]: %0d cycles, want %0d", m, cycle - acc_cyc[m], lat);
              end
              if (last_out >= 0) begin
                checks++;
                if (cycle - last_out != longint'(n)) begin failures++; $display("FAIL output spacing %0d", cycle - last_out); end
              end
            end
            last_out = cycle;
            nout++;
            n_outputs++;
          end
        end
      end
    join
    ran_before = 1;
  endtask

  task automatic full(int n, int kc, int mc, int e, bit stalls);
    configure(n, kc, mc, e, 1);
    load_coefs(n, kc, mc, stalls);
    run(n, kc, mc, e, stalls);
    $display("config N=%0d kc=%0d mc=%0d e=%0d stalls=%0d done", n, kc, mc, e, stalls);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // rejected settings
    configure(16, 2, 64, 0, 0);   // gcd(8,16) != 1 without extra register
    configure(16, 3, 40, 1, 0);   // kc*mc != K*N
    // reference configuration table
    full(16, 2, 64, 1, 0);
    full(16, 4, 32, 1, 0);
    full(8, 2, 32, 1, 0);
    full(8, 4, 16, 1, 0);
    full(4, 2, 16, 1, 0);
    full(4, 4, 8, 1, 0);
    // K and N coprime: the plain k-stage ring
    full(3, 2, 12, 0, 0);
    full(5, 4, 10, 0, 0);
    full(1, 8, 1, 0, 0);
    full(7, 1, 56, 0, 0);
    // needs three extra registers: gcd(8,6)=2, gcd(9,6)=3, gcd(10,6)=2, gcd(11,6)=1
    full(6, 3, 16, 3, 0);
    // stalls in initialization and run modes
    full(16, 4, 32, 1, 1);
    full(3, 2, 12, 0, 1);
    full(6, 2, 24, 3, 1);

    checks++; if (n_init == 0)   begin failures++; $display("FAIL no initialization"); end
    checks++; if (n_reject == 0) begin failures++; $display("FAIL no rejected configuration"); end
    checks++; if (n_reconf == 0) begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    checks++; if (n_fold0 == 0)  begin failures++; $display("FAIL no plain fold"); end
    checks++; if (n_folde == 0)  begin failures++; $display("FAIL no delayed fold"); end
    checks++; if (n_bound == 0)  begin failures++; $display("FAIL no coefficient boundary"); end
    $display("mechanisms: init=%0d reject=%0d reconfig=%0d stall=%0d fold0=%0d folde=%0d boundary=%0d outputs=%0d",
             n_init, n_reject, n_reconf, n_stall, n_fold0, n_folde, n_bound, n_outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
