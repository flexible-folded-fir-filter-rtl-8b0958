// tb_cbsm: for several folding factors N it writes a random bit to every
// (row, column) position in a random order, then rotates for 3N cycles and
// checks that row r outputs column (t mod N) at rotation step t. Cycles with
// neither write nor rotate must hold the outputs.
module tb_cbsm;
  localparam int K = 8, N_MAX = 16;
  logic clk = 0, rst_n = 0;
  logic [4:0] n_cfg = 5'd1;
  logic wr_en = 0, wr_bit = 0, rot_en = 0;
  logic [2:0] wr_row = '0;
  logic [3:0] wr_col = '0;
  logic [K-1:0] bits_o;
  logic [N_MAX-1:0] ref_m [K];
  int checks = 0, failures = 0;

  cbsm #(.K(K), .N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ns [5] = '{16, 3, 8, 1, 13};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (ns[q]) begin
      automatic int n = ns[q];
      automatic int order [$];
      n_cfg = 5'(n);
      for (int i = 0; i < K * n; i++) order.push_back(i);
      order.shuffle();
      foreach (order[i]) begin
        automatic int r = order[i] % K, c = order[i] / K;
        ref_m[r][c] = $urandom_range(0, 1);
        wr_en = 1; wr_row = 3'(r); wr_col = 4'(c); wr_bit = ref_m[r][c];
        @(negedge clk);
      end
      wr_en = 0;
      for (int t = 0; t < 3 * n; t++) begin
        rot_en = ($urandom_range(0, 3) != 0);
        for (int r = 0; r < K; r++) begin
          checks++;
          if (bits_o[r] !== ref_m[r][0]) begin
            failures++; $display("FAIL n=%0d t=%0d row %0d: %b want %b", n, t, r, bits_o[r], ref_m[r][0]);
          end
        end
        @(negedge clk);
        if (rot_en) for (int r = 0; r < K; r++) begin
          logic b0;
          b0 = ref_m[r][0];
          for (int c = 0; c < n - 1; c++) ref_m[r][c] = ref_m[r][c+1];
          ref_m[r][n-1] = b0;
        end
      end
      rot_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
