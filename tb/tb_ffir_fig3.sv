// tb_ffir_fig3: the filter built as a 3-section array (K = 3, N_MAX = 4),
// the small example configuration of the architecture: two 6-bit coefficients
// folded by N = 4 onto three sections. 3 and 4 are coprime, so the plain ring
// (no extra fold-path register) is used and every operation p runs p cycles
// after its output started. The test checks each output against
// sum_i c_i * x[n-i] mod 2^27, the latency 2*m_c - N + 27 = 35 cycles from
// accepting x[n] to y[n], and one output every 4 cycles. It also runs
// k_c = 1, 3 and the N = 3 setting, which needs one extra register.
module tb_ffir_fig3;
  import ffir_pkg::*;

  localparam int K = 3, XW = 8, YW = 27;
  localparam int MAXS = 24;

  logic clk = 0, rst_n = 0;
  logic cfg_start = 0;
  logic [2:0] cfg_n = '0;
  logic [1:0] cfg_kc = '0;
  logic [3:0] cfg_mc = '0;
  logic [1:0] cfg_wrap = '0;
  logic cfg_err, cb_ready, x_ready, y_valid;
  mode_e mode;
  logic cb_valid = 0, cb_bit = 0, x_valid = 0;
  logic [XW-1:0] x_data = '0;
  logic [YW-1:0] y_data;

  ffir_top #(.K(3), .N_MAX(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] coef [K];
  logic [XW-1:0] xs [MAXS];
  longint acc_cyc [MAXS];

  task automatic full(int n, int kc, int mc, int e);
    int L = K * n, nacc = 0, nout = 0;
    int lat = kc * mc - (kc - 1) * n + e * (n - 1) + YW;
    longint last_out = -1;
    @(negedge clk);
    cfg_n = 3'(n); cfg_kc = 2'(kc); cfg_mc = 4'(mc); cfg_wrap = 2'(e); cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    checks++;
    if (cfg_err || mode != MODE_INIT) begin failures++; $display("FAIL config rejected"); end
    for (int i = 0; i < kc; i++) coef[i] = 16'($urandom) & 16'((1 << mc) - 1);
    for (int p = 0; p < L; p++) begin
      cb_valid = 1; cb_bit = coef[kc - 1 - p / mc][p % mc];
      @(negedge clk);
    end
    cb_valid = 0;
    checks++;
    if (mode != MODE_RUN) begin failures++; $display("FAIL not in run mode"); end
    for (int m = 0; m < MAXS; m++) xs[m] = XW'($urandom);
    fork
      begin
        while (nout < MAXS - kc + 1) begin
          x_valid = 1; x_data = (nacc < MAXS) ? xs[nacc] : '0;
          @(posedge clk);
          if (x_ready && nacc < MAXS) begin acc_cyc[nacc] = cycle; nacc++; end
          #1;
        end
        x_valid = 0;
      end
      begin
        while (nout < MAXS - kc + 1) begin
          @(posedge clk);
          if (y_valid) begin
            automatic int m = nout + kc - 1;
            automatic logic [YW-1:0] exp_y = '0;
            for (int i = 0; i < kc; i++) exp_y += YW'(coef[i]) * YW'(xs[m - i]);
            checks += 2;
            if (y_data !== exp_y) begin failures++; $display("FAIL y[%0d]=%h want %h", m, y_data, exp_y); end
            if (cycle - acc_cyc[m] != longint'(lat)) begin
              failures++; $display("FAIL latency %0d want %0d", cycle - acc_cyc[m], lat);
            end
            if (last_out >= 0) begin
              checks++;
              if (cycle - last_out != longint'(n)) begin failures++; $display("FAIL spacing"); end
            end
            last_out = cycle;
            nout++;
          end
        end
      end
    join
    $display("N=%0d k_c=%0d m_c=%0d e=%0d: latency %0d cycles, one output per %0d cycles", n, kc, mc, e, lat, n);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    full(4, 2, 6, 0);   // the example: latency 2*6 - 4 + 27 = 35
    full(4, 1, 12, 0);
    full(4, 3, 4, 0);
    full(3, 3, 3, 1);   // gcd(3,3) = 3: one extra fold-path register
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
