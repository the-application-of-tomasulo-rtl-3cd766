// Tomasulo core: a 4-bit, dynamically scheduled integer datapath.
//
// Instructions (15 bits: op 2:0, destination 6:3, source 1 10:7, source 2
// 14:11; ADD 000, SUB 001, MUL 010, LOAD 011) are written into the
// instruction queue and issued in program order, one per cycle, as long as
// the target reservation station has room. The opcode selector registers each
// issued opcode onto the adder station (ADD/SUB), the multiplier station (MUL)
// or the LOAD path, while the register file reads its two sources in the same
// cycle. In the next cycle the instruction takes a reservation-station slot,
// its destination register is renamed to that slot's tag in the register
// status table, and each source is either a value (register file or the
// common data bus) or the tag of the slot that will produce it. A slot whose
// operands are complete goes to its functional unit (adder-subtractor or
// multiplier, both single cycle); the result and its tag go on the common
// data bus, which delivers it to every waiting slot and, through the
// register status table, to the register file if that register still waits
// on the tag. Execution therefore follows data flow rather than program
// order, and WAR/WAW hazards disappear through renaming.
// A LOAD writes the 4-bit value held in its source-1 field into its
// destination register, in program order relative to the other
// instructions.
//
// Ports: clock, synchronous active-high reset; instruction with
// instr_valid (accepted when queue_full = 0); observation outputs for the
// register contents, the common data bus and the adder's carry out.
// Latency of an instruction whose operands are ready: queue issue (cycle 0),
// selector and register read (edge 1), slot allocation (edge 2), dispatch
// (edge 3), result on the bus in cycle 3, register written at edge 4.
// The block structure and connections follow the design; the LOAD immediate,
// the bus arbitration and the issue timing are this implementation's.
module tomasulo_core
  import tomasulo_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH  = 16,
  parameter int unsigned ADD_ENTRIES  = 3,
  parameter int unsigned MULT_ENTRIES = 2
) (
  input  logic                 clock,
  input  logic                 reset,
  input  logic [14:0]          instruction,
  input  logic                 instr_valid,
  output logic                 queue_full,
  output data_t [NUM_REGS-1:0] regs,
  output tag_t                 cdb_tag,
  output data_t                cdb_data,
  output logic                 adder_carry
);
  localparam tag_t ADD_TAG_BASE  = 4'd1;
  localparam tag_t MULT_TAG_BASE = ADD_TAG_BASE + tag_t'(ADD_ENTRIES);

  opcode_t     iq_opcode, op_add, op_mult, op_load;
  logic        adder_full, mult_full;
  data_t       output_A, output_B;
  reg_status_t reg_status;
  dest_sel_t   add_dest_sel, mult_dest_sel, dest_sel;

  tag_t        add_tag, mult_tag, add_tag_out, mult_tag_out, bus_tag;
  data_t       add_value_A, add_value_B, mult_value_A, mult_value_B;
  data_t       add_result, bus_data;
  logic [2*DATA_W-1:0] mult_result;
  logic        add_R, mult_R_unused, adder_grant, mult_grant;

  logic              select_data;
  logic [RIDX_W-1:0] destination_result;
  data_t             temp_result;

  instruction_queue #(.DEPTH(QUEUE_DEPTH)) i_queue (
    .clock, .reset,
    .instruction, .instr_valid,
    .adder_full, .mult_full,
    .opcode(iq_opcode),
    .full  (queue_full)
  );

  opcode_selector u_selector (
    .clock, .reset,
    .opcode         (iq_opcode),
    .opcode_out_add (op_add),
    .opcode_out_mult(op_mult),
    .opcode_out_load(op_load)
  );

  register_file u_register_file (
    .reset, .clock,
    .select_data,
    .opcode            (iq_opcode),
    .destination_result,
    .load_en           (op_load.valid),
    .load_dest         (op_load.dest),
    .data_EX           (op_load.src1),
    .data_IN           (temp_result),
    .R                 (regs),
    .output_A, .output_B
  );

  reservation_station #(.ENTRIES(ADD_ENTRIES), .TAG_BASE(ADD_TAG_BASE)) add_rs (
    .clock, .reset,
    .opcode            (op_add),
    .output_A, .output_B,
    .regStatus         (reg_status),
    .bus_result        (bus_data),
    .bus_result_tag    (bus_tag),
    .grant             (adder_grant),
    .tag               (add_tag),
    .R                 (add_R),
    .value_A           (add_value_A),
    .value_B           (add_value_B),
    .destination_select(add_dest_sel),
    .full              (adder_full)
  );

  reservation_station #(.ENTRIES(MULT_ENTRIES), .TAG_BASE(MULT_TAG_BASE)) multiplier_rs (
    .clock, .reset,
    .opcode            (op_mult),
    .output_A, .output_B,
    .regStatus         (reg_status),
    .bus_result        (bus_data),
    .bus_result_tag    (bus_tag),
    .grant             (mult_grant),
    .tag               (mult_tag),
    .R                 (mult_R_unused),
    .value_A           (mult_value_A),
    .value_B           (mult_value_B),
    .destination_select(mult_dest_sel),
    .full              (mult_full)
  );

  adder_subtractor u_adder_subtractor (
    .R      (add_R),
    .input_A(add_value_A),
    .input_B(add_value_B),
    .tag    (add_tag),
    .result (add_result),
    .tag_out(add_tag_out),
    .C4     (adder_carry)
  );

  multiplier mult4 (
    .a      (mult_value_A),
    .b      (mult_value_B),
    .tag_in (mult_tag),
    .p      (mult_result),
    .tag_out(mult_tag_out)
  );

  common_data_bus u_common_data_bus (
    .clock, .reset,
    .adder_tag        (add_tag_out),
    .adder_result     (add_result),
    .multiplier_tag   (mult_tag_out),
    .multiplier_result(mult_result),
    .data_tag         (bus_tag),
    .data_IN          (bus_data),
    .adder_grant,
    .mult_grant
  );

  // Only one instruction is allocated per cycle, so at most one station
  // drives a non-zero destination_select.
  assign dest_sel = (add_dest_sel.tag != '0) ? add_dest_sel : mult_dest_sel;

  register_status_table register_status_rs (
    .clock, .reset,
    .destination_sel   (dest_sel),
    .load_valid        (op_load.valid),
    .load_dest         (op_load.dest),
    .CDB_tag_compare   (bus_tag),
    .CDB_result        (bus_data),
    .select_data,
    .destination_result,
    .temp_result,
    .temp_reg_status   (reg_status)
  );

  assign cdb_tag  = bus_tag;
  assign cdb_data = bus_data;

  a_one_allocation: assert property (@(posedge clock) disable iff (reset)
    !(add_dest_sel.tag != '0 && mult_dest_sel.tag != '0));
endmodule
