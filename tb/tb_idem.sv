// tb_idem: writes random load flags and taps to every (row, column) position
// for several folding factors, then runs with random sample shifts and random
// rotation. Each cycle it checks, per section, the load flag of column 0 and
// that the selected word is the sample accepted `tap` sample periods ago,
// where a sample being accepted in the current cycle counts as tap 0.
module tb_idem;
  localparam int K = 8, N_MAX = 16, XW = 8, E_MAX = 3, D = K + E_MAX;
  logic clk = 0, rst_n = 0;
  logic [4:0] n_cfg = 5'd1;
  logic wr_en = 0, wr_load = 0, rot_en = 0, shift = 0;
  logic [2:0] wr_row = '0;
  logic [3:0] wr_col = '0;
  logic [3:0] wr_tap = '0;
  logic [XW-1:0] x_in = '0;
  logic [K-1:0] load_o;
  logic [K-1:0][XW-1:0] x_o;
  logic ref_ld [K][N_MAX];
  int   ref_tp [K][N_MAX];
  logic [XW-1:0] hist [D];
  int checks = 0, failures = 0;

  idem #(.K(K), .N_MAX(N_MAX), .XW(XW), .E_MAX(E_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ns [4] = '{16, 5, 4, 1};
    foreach (hist[i]) hist[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (ns[q]) begin
      automatic int n = ns[q];
      n_cfg = 5'(n);
      for (int r = 0; r < K; r++) for (int c = 0; c < n; c++) begin
        ref_ld[r][c] = $urandom_range(0, 1);
        ref_tp[r][c] = $urandom_range(0, D - 1);
        wr_en = 1; wr_row = 3'(r); wr_col = 4'(c);
        wr_load = ref_ld[r][c]; wr_tap = 4'(ref_tp[r][c]);
        @(negedge clk);
      end
      wr_en = 0;
      for (int t = 0; t < 200; t++) begin
        logic [XW-1:0] view [D];
        rot_en = $urandom_range(0, 1);
        shift = $urandom_range(0, 1);
        x_in = XW'($urandom);
        view[0] = shift ? x_in : hist[0];
        for (int i = 1; i < D; i++) view[i] = shift ? hist[i-1] : hist[i];
        #1;
        for (int r = 0; r < K; r++) begin
          checks++;
          if (load_o[r] !== ref_ld[r][0] || x_o[r] !== view[ref_tp[r][0]]) begin
            failures++;
            $display("FAIL n=%0d t=%0d row %0d: load %b/%b x %h/%h", n, t, r, load_o[r], ref_ld[r][0],
                     x_o[r], view[ref_tp[r][0]]);
          end
        end
        @(negedge clk);
        if (shift) hist = view;
        if (rot_en) for (int r = 0; r < K; r++) begin
          logic l0;
          int t0;
          l0 = ref_ld[r][0];
          t0 = ref_tp[r][0];
          for (int c = 0; c < n - 1; c++) begin ref_ld[r][c] = ref_ld[r][c+1]; ref_tp[r][c] = ref_tp[r][c+1]; end
          ref_ld[r][n-1] = l0; ref_tp[r][n-1] = t0;
        end
      end
      rot_en = 0; shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
