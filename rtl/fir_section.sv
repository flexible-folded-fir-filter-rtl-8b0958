// fir_section: one processing element S_s of the folded bit-plane array.
//
// Every clock cycle the section performs one "operation": it multiplies the
// data word on its data path by one coefficient bit (a row of AND gates) and
// adds the product to the running result with a row of full adders. The result
// is kept in carry-save form (sum vector + carry vector), so the row has no
// carry propagation and the section is a single pipeline stage. The data word
// leaves the section doubled, so that the next section, which handles the next
// more significant coefficient bit, sees it with the right weight.
//
// Operands come either from the previous section (or the fold path) or, when
// `load` is set, from the input data entering module, which enters a fresh
// sample at the first bit of every coefficient. `start` (used in S_0 only)
// begins a new output: the incoming sum and carry are replaced by zero.
// `last` marks the final operation of an output; the finished carry-save
// result is then flagged with `done_o` instead of `valid_o`.
//
// Timing: one register stage for x, sum, carry and the flags. `en` freezes the
// registers (global stall); `clr` synchronously clears the flags.
// The row-of-basic-cells structure follows the bit-plane architecture; the
// carry-save register layout, the start/last flags and the arithmetic modulo
// 2^YW are choices of this implementation.
module fir_section #(
  parameter int unsigned XW = ffir_pkg::XW_DEF,
  parameter int unsigned YW = ffir_pkg::YW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,       // advance (global stall when low)
  input  logic          clr,      // clear valid/done flags
  input  logic          start,    // begin a new output here (zero sum)
  input  logic          load,     // take data from x_load instead of x_i
  input  logic          last,     // this is the last operation of an output
  input  logic          coef_bit, // coefficient bit for this operation
  input  logic [XW-1:0] x_load,   // sample from the input data entering module
  input  logic [YW-1:0] x_i,      // data path from the previous section
  input  logic [YW-1:0] s_i,      // sum vector from the previous section
  input  logic [YW-1:0] c_i,      // carry vector from the previous section
  input  logic          valid_i,  // an output is in progress on the inputs
  output logic [YW-1:0] x_o,
  output logic [YW-1:0] s_o,
  output logic [YW-1:0] c_o,
  output logic          valid_o,
  output logic          done_o    // finished carry-save result on s_o/c_o
);

  logic [YW-1:0] x_use, s_use, c_use, s_new, cy;
  logic          v_use;

  always_comb begin
    x_use = load  ? YW'(x_load) : x_i;
    s_use = start ? '0 : s_i;
    c_use = start ? '0 : c_i;
    v_use = start | valid_i;
  end

  for (genvar b = 0; b < YW; b++) begin : g_row
    basic_cell u_cell (
      .x_bit (x_use[b]),
      .c_bit (coef_bit),
      .s_in  (s_use[b]),
      .cy_in (c_use[b]),
      .s_out (s_new[b]),
      .cy_out(cy[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_o     <= '0;
      s_o     <= '0;
      c_o     <= '0;
      valid_o <= 1'b0;
      done_o  <= 1'b0;
    end else if (clr) begin
      valid_o <= 1'b0;
      done_o  <= 1'b0;
    end else if (en) begin
      x_o     <= x_use << 1;
      s_o     <= s_new;
      c_o     <= {cy[YW-2:0], 1'b0};  // carries move one weight up; MSB carry drops (mod 2^YW)
      valid_o <= v_use & ~last;
      done_o  <= v_use & last;
    end
  end

endmodule
