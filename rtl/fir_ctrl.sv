// fir_ctrl: mode controller of the folded FIR filter.
//
// Configuration. A pulse on cfg_start latches the folding factor N, the
// number of coefficients k_c, the coefficient length m_c and the number e of
// extra fold-path registers. The set is accepted if 1 <= N <= N_MAX,
// 1 <= k_c <= K, k_c * m_c = K * N (all L operations exactly fill the k
// sections N times) and gcd(K + e, N) = 1 (no two outputs ever need the same
// section in the same cycle, see folded_array). Otherwise cfg_err is set and
// the filter stays idle.
//
// Initialization mode (k * N bit cycles). Coefficient bits arrive serially on
// cb_bit/cb_valid in operation order p = 0 .. L-1: coefficient c_{k_c-1}
// first, least significant bit first, then c_{k_c-2}, ..., c_0. Operation
// p = m_c * (k_c - 1 - i) + j multiplies by bit j of c_i. The controller walks
// p with modulo counters and writes each bit to row s = p mod k of the
// coefficient bit supply module, at column r = tau(p) mod N where
// tau(p) = p + e * floor(p / k) is the cycle, counted from the start of an
// output, in which the operation runs (tau = p when e = 0, which is the
// folding slot r = p mod N). At the same position it stores, for the input
// data entering module, whether the operation is the first bit of a
// coefficient (j = 0) and which stored sample it needs:
// tap = floor(tau(p) / N) - (k_c - 1 - i).
//
// Run mode. A phase counter counts 0 .. N-1. In phase 0 the filter needs a
// new sample (x_ready); a new output starts in S_0 with it (start, shift).
// If no sample is offered the whole array stalls (en = 0) until one is. The
// last operation of every output runs in S_{k-1} in phase last_col, the
// column of operation L-1, which flags the finished result.
//
// The serial loading order and the mode split follow the architecture; the
// handshakes, the stall, the configuration check and the fold-path delay e
// are this implementation's choices.
module fir_ctrl
  import ffir_pkg::*;
#(
  parameter int unsigned K     = ffir_pkg::K_DEF,
  parameter int unsigned N_MAX = ffir_pkg::N_MAX_DEF,
  parameter int unsigned E_MAX = ffir_pkg::E_MAX_DEF,
  localparam int unsigned NW   = $clog2(N_MAX + 1),
  localparam int unsigned KCW  = $clog2(K + 1),
  localparam int unsigned MCW  = $clog2(K * N_MAX + 1),
  localparam int unsigned EW   = $clog2(E_MAX + 1),
  localparam int unsigned RW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned TW   = $clog2(K + E_MAX),
  localparam int unsigned QW   = $clog2(K + E_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic           cfg_start,
  input  logic [NW-1:0]  cfg_n,
  input  logic [KCW-1:0] cfg_kc,
  input  logic [MCW-1:0] cfg_mc,
  input  logic [EW-1:0]  cfg_wrap,
  output logic           cfg_err,
  output mode_e          mode,
  // serial coefficient bits
  input  logic           cb_valid,
  input  logic           cb_bit,
  output logic           cb_ready,
  // sample handshake
  input  logic           x_valid,
  output logic           x_ready,
  // array control
  output logic [NW-1:0]  n_cfg,
  output logic [EW-1:0]  wrap_sel,
  output logic           en,
  output logic           clr,
  output logic           start,
  output logic           last,
  output logic           shift,
  output logic           rot_en,
  // initialization writes (coefficient bits and sample-entry control)
  output logic           wr_en,
  output logic [RW-1:0]  wr_row,
  output logic [CW-1:0]  wr_col,
  output logic           wr_bit,
  output logic           wr_load,
  output logic [TW-1:0]  wr_tap
);

  logic [NW-1:0]  n_q;
  logic [MCW-1:0] mc_q;
  logic [EW-1:0]  e_q;
  logic [MCW-1:0] p_q, j_q;
  logic [RW-1:0]  s_q;
  logic [KCW-1:0] g_q;
  logic [CW-1:0]  col_q, last_col_q, phase_q;
  logic [QW-1:0]  q_q;
  logic [CW-1:0]  col_n;
  logic [QW-1:0]  q_n;
  logic           cfg_ok;

  // permitted values of cfg_wrap: 0 .. E_MAX
  localparam logic [2**EW-1:0] WRAP_OK = (2**EW)'((64'd1 << (E_MAX + 1)) - 64'd1);

  // configuration check
  always_comb begin
    int unsigned ring;
    cfg_ok = (cfg_n >= 1) && (int'(cfg_n) <= N_MAX) && (cfg_kc >= 1) && (int'(cfg_kc) <= K)
          && WRAP_OK[cfg_wrap]
          && (int'(cfg_kc) * int'(cfg_mc) == K * int'(cfg_n));
    ring = K + int'(cfg_wrap);
    for (int unsigned d = 2; d <= N_MAX; d++) begin
      if ((int'(cfg_n) % d == 0) && (ring % d == 0)) cfg_ok = 1'b0;
    end
  end

  // slot of the next operation: tau advances by 1, plus e after S_{k-1}
  always_comb begin
    int unsigned inc;
    col_n = col_q;
    q_n   = q_q;
    inc   = 1 + ((int'(s_q) == K - 1) ? int'(e_q) : 0);
    for (int unsigned i = 0; i <= E_MAX; i++) begin
      if (i < inc) begin
        if (int'(col_n) + 1 >= int'(n_q)) begin
          col_n = '0;
          q_n   = q_n + 1'b1;
        end else begin
          col_n = col_n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_IDLE;
      cfg_err    <= 1'b0;
      n_q        <= NW'(1);
      mc_q       <= '0;
      e_q        <= '0;
      p_q        <= '0;
      j_q        <= '0;
      s_q        <= '0;
      g_q        <= '0;
      col_q      <= '0;
      q_q        <= '0;
      last_col_q <= '0;
      phase_q    <= '0;
    end else if (cfg_start) begin
      cfg_err <= !cfg_ok;
      mode    <= cfg_ok ? MODE_INIT : MODE_IDLE;
      if (cfg_ok) begin
        n_q  <= cfg_n;
        mc_q <= cfg_mc;
        e_q  <= cfg_wrap;
      end
      p_q   <= '0;
      j_q   <= '0;
      s_q   <= '0;
      g_q   <= '0;
      col_q <= '0;
      q_q   <= '0;
    end else begin
      case (mode)
        MODE_INIT: if (cb_valid) begin
          if (int'(p_q) == K * int'(n_q) - 1) begin
            last_col_q <= col_q;
            phase_q    <= '0;
            mode       <= MODE_RUN;
          end else begin
            p_q   <= p_q + 1'b1;
            s_q   <= (int'(s_q) == K - 1) ? '0 : s_q + 1'b1;
            if (j_q == mc_q - 1'b1) begin
              j_q <= '0;
              g_q <= g_q + 1'b1;
            end else begin
              j_q <= j_q + 1'b1;
            end
            col_q <= col_n;
            q_q   <= q_n;
          end
        end
        MODE_RUN: if (en) begin
          phase_q <= (int'(phase_q) + 1 >= int'(n_q)) ? '0 : phase_q + 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    n_cfg    = n_q;
    wrap_sel = e_q;
    cb_ready = (mode == MODE_INIT);
    x_ready  = (mode == MODE_RUN) && (phase_q == '0);
    en       = (mode == MODE_RUN) && ((phase_q != '0) || x_valid);
    clr      = (mode != MODE_RUN);
    start    = x_ready && x_valid;
    shift    = start;
    rot_en   = en;
    last     = (phase_q == last_col_q);
    wr_en    = (mode == MODE_INIT) && cb_valid;
    wr_row   = s_q;
    wr_col   = col_q;
    wr_bit   = cb_bit;
    wr_load  = (j_q == '0);
    wr_tap   = TW'(q_q - QW'(g_q));
  end

endmodule
