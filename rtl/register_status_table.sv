// Register status table (RST).
//
// Holds, for each of the eight registers, the 4-bit tag of the
// reservation-station entry that will produce its next value; tag 0 means the
// register file already holds the current value. temp_reg_status exposes all
// eight tags as one 32-bit word (register r in bits 4r+3:4r) to the
// reservation stations.
//
// In a cycle:
//  * destination_sel (RS tag in 7:4, register in 3:0, all zero when no
//    instruction is allocated) renames the destination: at the clock edge that
//    register's tag becomes the new RS tag;
//  * a LOAD (load_valid/load_dest) clears the tag of its destination, since
//    the loaded value is then the newest one;
//  * the CDB tag is compared with every register's tag. On a match
//    select_data = 1, destination_result names the register and temp_result
//    carries the CDB value, so the register file writes it at the same edge,
//    and the tag is cleared. A register whose tag was replaced by a later
//    instruction does not match and keeps its newer tag (write-after-write).
// Renaming and LOAD take priority over the CDB clear for the same register.
// Matching and the write-back outputs are combinational; the table updates on
// the rising clock edge and is cleared by synchronous reset.
// Tag per register, destination_sel packing and the CDB comparison follow
// the design; the LOAD input and the priorities are this implementation's.
module register_status_table
  import tomasulo_pkg::*;
(
  input  logic                clock,
  input  logic                reset,
  input  dest_sel_t           destination_sel,
  input  logic                load_valid,
  input  regf_t               load_dest,
  input  tag_t                CDB_tag_compare,
  input  data_t               CDB_result,
  output logic                select_data,
  output logic [RIDX_W-1:0]   destination_result,
  output data_t               temp_result,
  output reg_status_t         temp_reg_status
);
  reg_status_t status;

  always_comb begin
    select_data        = 1'b0;
    destination_result = '0;
    for (int r = 0; r < NUM_REGS; r++) begin
      if (CDB_tag_compare != '0 && status[r] == CDB_tag_compare) begin
        select_data        = 1'b1;
        destination_result = RIDX_W'(r);
      end
    end
  end

  assign temp_result     = CDB_result;
  assign temp_reg_status = status;

  always_ff @(posedge clock) begin
    if (reset) begin
      status <= '0;
    end else begin
      for (int r = 0; r < NUM_REGS; r++) begin
        if (destination_sel.tag != '0 && reg_index(destination_sel.dest) == RIDX_W'(r))
          status[r] <= destination_sel.tag;
        else if (load_valid && reg_index(load_dest) == RIDX_W'(r))
          status[r] <= '0;
        else if (select_data && destination_result == RIDX_W'(r))
          status[r] <= '0;
      end
    end
  end

  // A tag names one producer, so at most one register may be waiting on it.
  for (genvar r = 0; r < NUM_REGS; r++) begin : g_chk
    for (genvar s = r + 1; s < NUM_REGS; s++) begin : g_pair
      a_unique_tag: assert property (@(posedge clock) disable iff (reset)
        !(status[r] != '0 && status[r] == status[s]));
    end
  end
endmodule
