// cbsm: coefficient bit supply module.
//
// A two-dimensional array of one-bit storage cells with k rows and N_max
// columns. Row s feeds section S_s; its column 0 is the row output. In
// initialization mode the controller writes each coefficient bit to the row
// and column of the operation that uses it (row = p mod k, column = the
// folding slot of operation p). In run mode every row is a circular shift
// register over the first N columns: each enabled cycle the bits move one
// column to the left (right to left) and column 0 wraps to column N-1, so a
// section receives its N coefficient bits in slot order, once per N cycles.
//
// Timing: writes and rotation take effect at the clock edge; bits_o is read
// straight from column 0. The storage uses edge-triggered flip-flops; the
// architecture describes latches, a choice left to the target technology.
module cbsm #(
  parameter int unsigned K     = ffir_pkg::K_DEF,
  parameter int unsigned N_MAX = ffir_pkg::N_MAX_DEF,
  localparam int unsigned RW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned NW   = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n_cfg,    // folding factor N (1..N_MAX)
  input  logic          wr_en,    // initialization write
  input  logic [RW-1:0] wr_row,
  input  logic [CW-1:0] wr_col,
  input  logic          wr_bit,
  input  logic          rot_en,   // run mode: rotate all rows by one column
  output logic [K-1:0]  bits_o
);

  logic [K-1:0][N_MAX-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (wr_en) begin
      mem[wr_row][wr_col] <= wr_bit;
    end else if (rot_en) begin
      for (int r = 0; r < K; r++) begin
        for (int b = 0; b < N_MAX; b++) begin
          if (b + 1 == int'(n_cfg))      mem[r][b] <= mem[r][0];
          else if (b + 1 < int'(n_cfg))  mem[r][b] <= mem[r][(b + 1) % N_MAX];
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < K; r++) bits_o[r] = mem[r][0];
  end

endmodule
