// Adder-subtractor functional unit.
//
// Computes result = input_A + input_B when R = 0 and input_A - input_B when
// R = 1, on 4-bit values. It is the classic textbook structure: every bit of
// B passes through an XOR with R, and a chain of full adders takes R as its
// carry-in, so subtraction is A + ~B + 1. C4 is the carry out of the last
// stage (for a subtraction it is 1 when no borrow occurred). The tag of the
// reservation-station entry that issued the operation travels through
// unchanged (tag_out = tag) so the result can be matched on the common data
// bus. The unit is purely combinational: the result is valid in the same
// cycle the reservation station presents its operands. The structure and the
// ports follow the design; the single-cycle timing is this implementation's.
module adder_subtractor
  import tomasulo_pkg::*;
(
  input  logic  R,
  input  data_t input_A,
  input  data_t input_B,
  input  tag_t  tag,
  output data_t result,
  output tag_t  tag_out,
  output logic  C4
);
  data_t                b_x;
  logic  [DATA_W:0]     carry;

  assign b_x      = input_B ^ {DATA_W{R}};
  assign carry[0] = R;

  for (genvar i = 0; i < DATA_W; i++) begin : g_fa
    full_adder u_fa (
      .a   (input_A[i]),
      .b   (b_x[i]),
      .cin (carry[i]),
      .sum (result[i]),
      .cout(carry[i+1])
    );
  end

  assign C4      = carry[DATA_W];
  assign tag_out = tag;
endmodule
