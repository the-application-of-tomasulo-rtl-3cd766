// Multiplier functional unit ("mult4").
//
// Forms the full 8-bit unsigned product of two 4-bit operands as a sum of
// shifted partial products (one row per bit of b), and passes the issuing
// reservation-station tag through (tag_out = tag_in). It is combinational,
// so the product is available in the cycle the multiplier reservation
// station presents its operands. The design names this unit and its ports;
// the array structure and single-cycle timing are this implementation's
// choice.
module multiplier
  import tomasulo_pkg::*;
(
  input  data_t             a,
  input  data_t             b,
  input  tag_t              tag_in,
  output logic [2*DATA_W-1:0] p,
  output tag_t              tag_out
);
  always_comb begin
    p = '0;
    for (int i = 0; i < DATA_W; i++)
      if (b[i]) p = p + ((2*DATA_W)'(a) << i);
  end
  assign tag_out = tag_in;
endmodule
