// folded_array: the ring of k processing sections S_0 .. S_{k-1}.
//
// An output sample is computed by a "wave" of L = k_c * m_c operations that
// visits S_0, S_1, ..., S_{k-1} and then folds back to S_0, one operation per
// clock, N times around the ring (L = k * N). Operation p therefore runs in
// section p mod k, which is the folding-set assignment s = p mod k. Both the
// summation path (carry-save sum and carry vectors) and the input data path
// fold from S_{k-1} back to S_0.
//
// The fold path can hold wrap_sel (0..E_MAX) extra register stages. With
// wrap_sel = 0 the ring is exactly k stages long and operation p of a wave
// started at time 0 runs at time p, i.e. in folding slot r = p mod N. That
// schedule lets a new wave start every N cycles without two waves meeting in
// one section only if k and N have no common factor. Lengthening the ring to
// k + e stages with gcd(k + e, N) = 1 keeps every section busy every cycle
// and free of collisions for any N; operation p then runs at time
// p + e * floor(p / k). The extra registers are this implementation's
// addition; the ring itself follows the folded architecture.
//
// Interface: per-section coefficient bit, load flag and sample come from the
// coefficient bit supply module and the input data entering module. `start`
// begins a wave in S_0, `last` marks its final operation in S_{k-1}; the
// finished carry-save result appears on res_s/res_c with res_done one cycle
// later. `en` stalls the whole ring. An assertion flags a new output that would
// enter S_0 while the arriving ring slot still holds one in progress.
module folded_array #(
  parameter int unsigned K     = ffir_pkg::K_DEF,
  parameter int unsigned XW    = ffir_pkg::XW_DEF,
  parameter int unsigned YW    = ffir_pkg::YW_DEF,
  parameter int unsigned E_MAX = ffir_pkg::E_MAX_DEF,
  localparam int unsigned EW   = $clog2(E_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clr,
  input  logic                 start,
  input  logic                 last,
  input  logic [EW-1:0]        wrap_sel,
  input  logic [K-1:0]         coef_bits,
  input  logic [K-1:0]         load,
  input  logic [K-1:0][XW-1:0] x_load,
  output logic [YW-1:0]        res_s,
  output logic [YW-1:0]        res_c,
  output logic                 res_done
);

  logic [K-1:0][YW-1:0] x_q, s_q, c_q;
  logic [K-1:0]         v_q, d_q;

  // fold path: E_MAX optional register stages after S_{k-1}
  logic [E_MAX:0][YW-1:0] fx, fs, fc;
  logic [E_MAX:0]         fv;

  always_comb begin
    fx[0] = x_q[K-1];
    fs[0] = s_q[K-1];
    fc[0] = c_q[K-1];
    fv[0] = v_q[K-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= E_MAX; i++) begin
        fx[i] <= '0; fs[i] <= '0; fc[i] <= '0; fv[i] <= 1'b0;
      end
    end else if (clr) begin
      for (int i = 1; i <= E_MAX; i++) fv[i] <= 1'b0;
    end else if (en) begin
      for (int i = 1; i <= E_MAX; i++) begin
        fx[i] <= fx[i-1]; fs[i] <= fs[i-1]; fc[i] <= fc[i-1]; fv[i] <= fv[i-1];
      end
    end
  end

  for (genvar s = 0; s < K; s++) begin : g_sec
    logic [YW-1:0] xi, si, ci;
    logic          vi;
    if (s == 0) begin : g_first
      always_comb begin
        xi = fx[wrap_sel];
        si = fs[wrap_sel];
        ci = fc[wrap_sel];
        vi = fv[wrap_sel];
      end
    end else begin : g_next
      always_comb begin
        xi = x_q[s-1];
        si = s_q[s-1];
        ci = c_q[s-1];
        vi = v_q[s-1];
      end
    end

    fir_section #(.XW(XW), .YW(YW)) u_sec (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (en),
      .clr     (clr),
      .start   ((s == 0) ? start : 1'b0),
      .load    (load[s]),
      .last    ((s == K-1) ? last : 1'b0),
      .coef_bit(coef_bits[s]),
      .x_load  (x_load[s]),
      .x_i     (xi),
      .s_i     (si),
      .c_i     (ci),
      .valid_i (vi),
      .x_o     (x_q[s]),
      .s_o     (s_q[s]),
      .c_o     (c_q[s]),
      .valid_o (v_q[s]),
      .done_o  (d_q[s])
    );
  end

  // A new output may only enter S_0 in a ring slot that holds no output in
  // progress; this holds whenever gcd(K + wrap_sel, N) = 1.
  always_ff @(posedge clk) begin
    if (en && !clr && start) begin
      assert (!fv[wrap_sel])
        else $error("folded_array: new output collides with one in progress in S_0");
    end
  end

  always_comb begin
    res_s    = s_q[K-1];
    res_c    = c_q[K-1];
    res_done = d_q[K-1];
  end

endmodule
