// Common data bus (CDB).
//
// The single result bus of the core. Each functional unit presents a result
// with the tag of the reservation-station entry that produced it (tag 0 =
// nothing to send). The bus carries one result per cycle: data_tag/data_IN
// go to both reservation stations and to the register status table in the
// same cycle. When the adder and the multiplier both hold a result, the bus
// grants them in turn (round robin: the unit that lost the last conflict
// wins the next one); the loser keeps its result and is granted later, which
// is the structural hazard of a single bus. The multiplier's 8-bit product is
// truncated to the 4-bit data width. Outputs are combinational; the only
// state is the one-bit round-robin pointer, reset to favour the adder.
// That results come from the functional units and go to every reservation
// station is the design's; the arbitration and truncation are this
// implementation's own choices.
module common_data_bus
  import tomasulo_pkg::*;
(
  input  logic                clock,
  input  logic                reset,
  input  tag_t                adder_tag,
  input  data_t               adder_result,
  input  tag_t                multiplier_tag,
  input  logic [2*DATA_W-1:0] multiplier_result,
  output tag_t                data_tag,
  output data_t               data_IN,
  output logic                adder_grant,
  output logic                mult_grant
);
  logic add_req, mul_req, favour_mult;

  assign add_req = (adder_tag != '0);
  assign mul_req = (multiplier_tag != '0);

  always_comb begin
    adder_grant = add_req && !(mul_req && favour_mult);
    mult_grant  = mul_req && !adder_grant;
    if (adder_grant) begin
      data_tag = adder_tag;
      data_IN  = adder_result;
    end else if (mult_grant) begin
      data_tag = multiplier_tag;
      data_IN  = multiplier_result[DATA_W-1:0];
    end else begin
      data_tag = '0;
      data_IN  = '0;
    end
  end

  always_ff @(posedge clock) begin
    if (reset)                     favour_mult <= 1'b0;
    else if (add_req && mul_req)   favour_mult <= adder_grant;
  end

  // Never more than one producer on the bus.
  a_one_grant: assert property (@(posedge clock) disable iff (reset)
    !(adder_grant && mult_grant));
endmodule
