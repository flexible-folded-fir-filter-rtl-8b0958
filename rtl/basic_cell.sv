// basic_cell: one bit of a bit-plane row.
//
// The partial-product bit is the AND of a data bit and a coefficient bit; a
// full adder adds it to the incoming sum bit and carry bit of the same weight.
// The sum output keeps the weight, the carry output has twice the weight and is
// passed to the next bit position of the following row (carry-save form).
// Purely combinational. The AND gate plus full adder structure is the basic
// cell of the bit-plane architecture.
module basic_cell (
  input  logic x_bit,   // data bit
  input  logic c_bit,   // coefficient bit
  input  logic s_in,    // incoming sum bit
  input  logic cy_in,   // incoming carry bit (same weight as s_in)
  output logic s_out,   // sum bit
  output logic cy_out   // carry bit, weight x2
);

  logic pp;

  always_comb begin
    pp     = x_bit & c_bit;
    s_out  = s_in ^ cy_in ^ pp;
    cy_out = (s_in & cy_in) | (pp & (s_in ^ cy_in));
  end

endmodule
