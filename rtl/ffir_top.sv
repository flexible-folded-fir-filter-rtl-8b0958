// ffir_top: flexible folded bit-plane FIR filter.
//
// Computes y[n] = sum_{i=0}^{k_c-1} c_i * x[n-i] with a fixed array of K
// bit-plane sections, where the number of coefficients k_c, their length m_c
// and the folding factor N can be changed at run time as long as
// k_c * m_c = K * N. Each output takes L = k_c * m_c one-bit "operations"
// (partial product of a data word and one coefficient bit, plus an addition);
// operation p runs in section p mod K, and one output is finished every N
// cycles. Smaller N means higher throughput and shorter coefficients or fewer
// taps; larger N means longer filters on the same array.
//
// Blocks: fir_ctrl (modes, initialization sequencing, phase counter, stall),
// cbsm (coefficient bit supply), idem (input data entering), folded_array
// (ring of sections in carry-save form), final_adder (pipelined carry
// merge).
//
// Use: pulse cfg_start with cfg_n/kc/mc/wrap; then give K*N coefficient bits
// on cb_bit while cb_ready (order: c_{k_c-1} LSB first ... c_0 MSB last);
// then give one sample per N cycles on x_data when x_ready. y_valid pulses with
// each result; the first one is y[k_c-1] (it needs x[0] .. x[k_c-1]). The
// latency from accepting x[n] to y[n] is
//   k_c*m_c - (k_c-1)*N + e*(N-1) + YW cycles,
// i.e. 2*m_c - N + YW for k_c = 2 and e = 0. Results are exact modulo 2^YW,
// data and coefficients are unsigned. cfg_wrap = e must make K + e and N
// coprime (e = 0 when they already are, e = 1 for K = 8 and N a power of two).
module ffir_top
  import ffir_pkg::*;
#(
  parameter int unsigned K     = ffir_pkg::K_DEF,
  parameter int unsigned N_MAX = ffir_pkg::N_MAX_DEF,
  parameter int unsigned XW    = ffir_pkg::XW_DEF,
  parameter int unsigned YW    = ffir_pkg::YW_DEF,
  parameter int unsigned E_MAX = ffir_pkg::E_MAX_DEF,
  localparam int unsigned NW   = $clog2(N_MAX + 1),
  localparam int unsigned KCW  = $clog2(K + 1),
  localparam int unsigned MCW  = $clog2(K * N_MAX + 1),
  localparam int unsigned EW   = $clog2(E_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_start,
  input  logic [NW-1:0]  cfg_n,
  input  logic [KCW-1:0] cfg_kc,
  input  logic [MCW-1:0] cfg_mc,
  input  logic [EW-1:0]  cfg_wrap,
  output logic           cfg_err,
  output mode_e          mode,
  input  logic           cb_valid,
  input  logic           cb_bit,
  output logic           cb_ready,
  input  logic           x_valid,
  input  logic [XW-1:0]  x_data,
  output logic           x_ready,
  output logic           y_valid,
  output logic [YW-1:0]  y_data
);

  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned CW = (N_MAX > 1) ? $clog2(N_MAX) : 1;
  localparam int unsigned TW = $clog2(K + E_MAX);

  logic [NW-1:0]        n_cfg;
  logic [EW-1:0]        wrap_sel;
  logic                 en, clr, start, last, shift, rot_en;
  logic                 wr_en, wr_bit, wr_load;
  logic [RW-1:0]        wr_row;
  logic [CW-1:0]        wr_col;
  logic [TW-1:0]        wr_tap;
  logic [K-1:0]         coef_bits, load;
  logic [K-1:0][XW-1:0] x_load;
  logic [YW-1:0]        res_s, res_c;
  logic                 res_done;

  fir_ctrl #(.K(K), .N_MAX(N_MAX), .E_MAX(E_MAX)) u_ctrl (
    .clk, .rst_n,
    .cfg_start, .cfg_n, .cfg_kc, .cfg_mc, .cfg_wrap, .cfg_err, .mode,
    .cb_valid, .cb_bit, .cb_ready,
    .x_valid, .x_ready,
    .n_cfg, .wrap_sel, .en, .clr, .start, .last, .shift, .rot_en,
    .wr_en, .wr_row, .wr_col, .wr_bit, .wr_load, .wr_tap
  );

  cbsm #(.K(K), .N_MAX(N_MAX)) u_cbsm (
    .clk, .rst_n, .n_cfg,
    .wr_en, .wr_row, .wr_col, .wr_bit,
    .rot_en,
    .bits_o(coef_bits)
  );

  idem #(.K(K), .N_MAX(N_MAX), .XW(XW), .E_MAX(E_MAX)) u_idem (
    .clk, .rst_n, .n_cfg,
    .wr_en, .wr_row, .wr_col, .wr_load, .wr_tap,
    .rot_en, .shift,
    .x_in  (x_data),
    .load_o(load),
    .x_o   (x_load)
  );

  folded_array #(.K(K), .XW(XW), .YW(YW), .E_MAX(E_MAX)) u_array (
    .clk, .rst_n, .en, .clr, .start, .last, .wrap_sel,
    .coef_bits, .load, .x_load,
    .res_s, .res_c, .res_done
  );

  final_adder #(.YW(YW)) u_adder (
    .clk, .rst_n, .clr,
    .valid_i(res_done && en),
    .a      (res_s),
    .b      (res_c),
    .valid_o(y_valid),
    .sum_o  (y_data)
  );

endmodule
