// final_adder: bit-level pipelined ripple-carry adder.
//
// Merges the carry-save result (sum vector a, carry vector b) leaving the last
// section into a binary word. Stage i adds bit i of the operands and the carry
// from stage i-1 and registers the result bit and the carry, so the adder has
// exactly YW pipeline stages, one per bit of the output word, and accepts a new
// operand pair every cycle. Operands and finished bits travel with their stage
// (in a gate-level layout the operand bits would be skewed and the result bits
// deskewed with triangular register arrays; synthesis removes the unused
// flip-flops of this form). The result is a + b modulo 2^YW.
//
// Timing: sum_o/valid_o appear YW cycles after a/b/valid_i. `clr` discards
// results still in the pipeline (used when the filter is reconfigured). A pipeline depth
// equal to the output word length follows the reference implementation; the
// ripple-carry form is this implementation's choice.
module final_adder #(
  parameter int unsigned YW = ffir_pkg::YW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,      // drop results in flight (valid flags only)
  input  logic          valid_i,
  input  logic [YW-1:0] a,
  input  logic [YW-1:0] b,
  output logic          valid_o,
  output logic [YW-1:0] sum_o
);

  logic [YW-1:0] a_q [YW];
  logic [YW-1:0] b_q [YW];
  logic [YW-1:0] r_q [YW];
  logic          cy_q [YW];
  logic          v_q [YW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < YW; i++) begin
        a_q[i] <= '0; b_q[i] <= '0; r_q[i] <= '0; cy_q[i] <= 1'b0; v_q[i] <= 1'b0;
      end
    end else if (clr) begin
      for (int i = 0; i < YW; i++) v_q[i] <= 1'b0;
    end else begin
      // stage 0 takes the operands
      a_q[0]     <= a;
      b_q[0]     <= b;
      r_q[0]     <= {{(YW-1){1'b0}}, a[0] ^ b[0]};
      cy_q[0]    <= a[0] & b[0];
      v_q[0]     <= valid_i;
      for (int i = 1; i < YW; i++) begin
        a_q[i]     <= a_q[i-1];
        b_q[i]     <= b_q[i-1];
        r_q[i]     <= r_q[i-1];
        r_q[i][i]  <= a_q[i-1][i] ^ b_q[i-1][i] ^ cy_q[i-1];
        cy_q[i]    <= (a_q[i-1][i] & b_q[i-1][i]) | (cy_q[i-1] & (a_q[i-1][i] ^ b_q[i-1][i]));
        v_q[i]     <= v_q[i-1];
      end
    end
  end

  always_comb begin
    sum_o   = r_q[YW-1];
    valid_o = v_q[YW-1];
  end

endmodule
