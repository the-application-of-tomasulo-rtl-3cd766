// Register file: eight 4-bit registers R0..R7.
//
// Reads: the source fields of the opcode (source 1 in bits 10:7, source 2 in
// bits 14:11) select two registers through two multiplexers. The read is
// registered: output_A/output_B appear in the cycle after the opcode, which
// is the cycle in which the same instruction reaches its reservation station
// through the (registered) opcode selector. A write taking place at the same
// edge is forwarded into the read, so the values always agree with the
// register status table the reservation station sees in that cycle.
// Writes, at the rising edge:
//  * internal data: when select_data = 1 the CDB value data_IN is written to
//    register destination_result (both supplied by the register status table);
//  * external data: when load_en = 1 the value data_EX is written to
//    register load_dest (the LOAD instruction).
// If both name the same register the LOAD wins, being the younger
// instruction. Synchronous reset clears all registers. All registers are
// also brought out (R) for observation.
// The two read multiplexers and the internal/external write sources follow
// the design; the registered read with forwarding and the separate LOAD write
// path (instead of one shared write port) are this implementation's.
module register_file
  import tomasulo_pkg::*;
(
  input  logic                    reset,
  input  logic                    clock,
  input  logic                    select_data,
  input  opcode_t                 opcode,
  input  logic [RIDX_W-1:0]       destination_result,
  input  logic                    load_en,
  input  regf_t                   load_dest,
  input  data_t                   data_EX,
  input  data_t                   data_IN,
  output data_t [NUM_REGS-1:0]    R,
  output data_t                   output_A,
  output data_t                   output_B
);
  data_t [NUM_REGS-1:0] regs, regs_next;

  always_comb begin
    regs_next = regs;
    if (select_data) regs_next[destination_result]  = data_IN;
    if (load_en)     regs_next[reg_index(load_dest)] = data_EX;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      regs     <= '0;
      output_A <= '0;
      output_B <= '0;
    end else begin
      regs     <= regs_next;
      output_A <= regs_next[reg_index(opcode.src1)];
      output_B <= regs_next[reg_index(opcode.src2)];
    end
  end

  assign R = regs;
endmodule
