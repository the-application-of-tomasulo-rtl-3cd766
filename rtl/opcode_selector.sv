// Opcode-to-functional-unit selector.
//
// Every cycle it registers the opcode from the instruction queue onto one of
// three paths: ADD and SUB go to the adder reservation station
// (opcode_out_add), MUL to the multiplier reservation station
// (opcode_out_mult), LOAD to the register file (opcode_out_load). The paths
// that do not receive it carry the all-zero, invalid opcode, which their
// consumers ignore; an invalid or unsupported opcode makes all three
// invalid. Outputs change on the rising clock edge, one cycle after the
// opcode, and are cleared by synchronous reset.
// The routing and the registered outputs follow the design; the separate LOAD
// output is this implementation's way of delivering loads in program order.
module opcode_selector
  import tomasulo_pkg::*;
(
  input  logic    clock,
  input  logic    reset,
  input  opcode_t opcode,
  output opcode_t opcode_out_add,
  output opcode_t opcode_out_mult,
  output opcode_t opcode_out_load
);
  always_ff @(posedge clock) begin
    opcode_out_add  <= '0;
    opcode_out_mult <= '0;
    opcode_out_load <= '0;
    if (!reset && opcode.valid) begin
      unique case (opcode.op)
        OP_ADD, OP_SUB: opcode_out_add  <= opcode;
        OP_MUL:         opcode_out_mult <= opcode;
        OP_LOAD:        opcode_out_load <= opcode;
        default: ;
      endcase
    end
  end
endmodule
