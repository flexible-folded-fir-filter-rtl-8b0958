// idem: input data entering module.
//
// The filter takes one input sample every N cycles. A new output starts in
// S_0 with the newest sample, and at the first bit of each further
// coefficient the data path of the section doing that operation must be
// reloaded with the next (younger) sample. Which section that is, and when,
// depends on k_c, m_c and N; like the coefficient bits, it repeats every N
// cycles.
//
// The module therefore has two parts:
//  * a sample delay line of D = K + E_MAX words. A sample is accepted in the
//    cycle with phase 0 (`shift`); in that cycle it is already visible as tap
//    0 (bypass) and it enters the line at the clock edge. Tap t is the sample
//    accepted t sample periods before the current one.
//  * per section, a rotating control row of N_max entries, written in
//    initialization mode alongside the coefficient bits and rotated in step
//    with them: a load flag and the delay-line tap to load from.
// Section s receives load_o[s] and the selected tap x_o[s].
//
// Timing: writes, rotation and the delay-line shift happen at the clock edge;
// outputs are combinational from the stored state and x_in. The purpose of
// the module follows the architecture; the delay line plus stored-control
// structure is this implementation's choice.
module idem #(
  parameter int unsigned K     = ffir_pkg::K_DEF,
  parameter int unsigned N_MAX = ffir_pkg::N_MAX_DEF,
  parameter int unsigned XW    = ffir_pkg::XW_DEF,
  parameter int unsigned E_MAX = ffir_pkg::E_MAX_DEF,
  localparam int unsigned D    = K + E_MAX,
  localparam int unsigned TW   = $clog2(D),
  localparam int unsigned RW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned NW   = $clog2(N_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NW-1:0]        n_cfg,
  input  logic                 wr_en,
  input  logic [RW-1:0]        wr_row,
  input  logic [CW-1:0]        wr_col,
  input  logic                 wr_load,
  input  logic [TW-1:0]        wr_tap,
  input  logic                 rot_en,
  input  logic                 shift,   // sample x_in accepted this cycle
  input  logic [XW-1:0]        x_in,
  output logic [K-1:0]         load_o,
  output logic [K-1:0][XW-1:0] x_o
);

  logic [D-1:0][XW-1:0]    xd;     // xd[0] = most recently accepted sample
  logic [D-1:0][XW-1:0]    view;   // taps as seen this cycle
  logic [K-1:0][N_MAX-1:0] ld;
  logic [TW-1:0]           tp [K][N_MAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xd <= '0;
    end else if (shift) begin
      xd <= {xd[D-2:0], x_in};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld <= '0;
      for (int r = 0; r < K; r++)
        for (int b = 0; b < N_MAX; b++) tp[r][b] <= '0;
    end else if (wr_en) begin
      ld[wr_row][wr_col] <= wr_load;
      tp[wr_row][wr_col] <= wr_tap;
    end else if (rot_en) begin
      for (int r = 0; r < K; r++) begin
        for (int b = 0; b < N_MAX; b++) begin
          if (b + 1 == int'(n_cfg)) begin
            ld[r][b] <= ld[r][0];
            tp[r][b] <= tp[r][0];
          end else if (b + 1 < int'(n_cfg)) begin
            ld[r][b] <= ld[r][(b + 1) % N_MAX];
            tp[r][b] <= tp[r][(b + 1) % N_MAX];
          end
        end
      end
    end
  end

  always_comb begin
    view = shift ? {xd[D-2:0], x_in} : xd;
    for (int r = 0; r < K; r++) begin
      load_o[r] = ld[r][0];
      x_o[r]    = view[tp[r][0]];
    end
  end

endmodule
