// Reservation station.
//
// ENTRIES slots (3 for the adder, 2 for the multiplier), each a 26-bit
// record: busy, its own fixed RS tag (TAG_BASE + slot number, so the adder's
// slots are tags 1-3 and the multiplier's 4-5; tag 0 means "no producer"),
// op, Qa/Qb (tag of the entry that will produce a missing operand), Va/Vb
// (operand values) and tag-Va/tag-Vb (operand present).
//
// Allocation (issue): a valid opcode takes the lowest free slot at the next
// clock edge. In the same cycle destination_select = {slot tag, destination
// register} goes to the register status table, so the destination is renamed
// at the very edge the slot is written and the next instruction already sees
// the new tag. Each source reads its register's tag from regStatus (register
// r in bits 4r+3:4r):
//   tag 0                       -> value from the register file
//                                  (output_A/output_B, valid this cycle);
//   tag equal to the CDB tag    -> value taken straight off the bus;
//   otherwise                   -> the tag is stored in Qa/Qb.
// Snooping: every cycle the CDB tag is compared with all Qa/Qb fields; a
// match stores the bus value in Va/Vb, sets its flag and clears the Q field.
// Dispatch: when the output register is empty or its content is being taken
// by the CDB (grant), the lowest-numbered slot holding both operands is
// copied to value_A/value_B/tag/R (R = 1 for SUB) at the clock edge, so an
// instruction whose operands are present when it is allocated reaches its
// functional unit two edges after its opcode is presented. The slot is freed
// for a new instruction in the cycle the CDB takes its result: with
// single-cycle units and no bus conflict that is the cycle after dispatch, so
// a slot can be refilled as soon as its instruction has left, yet a tag is
// never reused while its result is still waiting for the bus.
// full is 1 when no slot would be free for an instruction issued now, the
// one arriving in this cycle included.
// Slot layout, tag numbering, allocation order, CDB comparison and dispatch
// order follow the design. The grant handshake, the combinational
// destination_select and the look-ahead full flag are this implementation's.
module reservation_station
  import tomasulo_pkg::*;
#(
  parameter int unsigned ENTRIES  = 3,
  parameter tag_t        TAG_BASE = 4'd1
) (
  input  logic        clock,
  input  logic        reset,
  input  opcode_t     opcode,
  input  data_t       output_A,
  input  data_t       output_B,
  input  reg_status_t regStatus,
  input  data_t       bus_result,
  input  tag_t        bus_result_tag,
  input  logic        grant,
  output tag_t        tag,
  output logic        R,
  output data_t       value_A,
  output data_t       value_B,
  output dest_sel_t   destination_select,
  output logic        full
);
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  rs_entry_t [ENTRIES-1:0] rs;
  logic      [ENTRIES-1:0] issued;     // dispatched, result not yet on the CDB

  logic [ENTRIES-1:0] avail;           // slot can take a new instruction this cycle
  logic             have_free, have_ready, accept, out_free;
  logic [IDX_W-1:0] free_idx, ready_idx;
  int unsigned      free_count;
  rs_entry_t        new_entry;

  function automatic rs_entry_t empty_slot(int unsigned i);
    rs_entry_t e;
    e        = '0;
    e.rs_tag = TAG_BASE + tag_t'(i);
    return e;
  endfunction

  // A slot is available when empty, or when the CDB takes its result in this
  // very cycle (its tag is then retired at the edge the slot is refilled).
  for (genvar i = 0; i < ENTRIES; i++) begin : g_avail
    assign avail[i] = !rs[i].busy || (grant && issued[i] && tag == rs[i].rs_tag);
  end

  // Lowest available slot, lowest ready slot, number of available slots.
  always_comb begin
    have_free  = 1'b0;
    free_idx   = '0;
    have_ready = 1'b0;
    ready_idx  = '0;
    free_count = 0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (avail[i]) begin
        have_free  = 1'b1;
        free_idx   = IDX_W'(i);
        free_count = free_count + 1;
      end
      if (rs[i].busy && !issued[i] && rs[i].tag_va && rs[i].tag_vb) begin
        have_ready = 1'b1;
        ready_idx  = IDX_W'(i);
      end
    end
  end

  assign accept   = opcode.valid && have_free;
  assign out_free = (tag == '0) || grant;
  assign full     = (free_count == 0) || (free_count == 1 && opcode.valid);

  // The entry an accepted opcode creates, operands resolved as described above.
  always_comb begin
    tag_t t1, t2;
    new_entry      = empty_slot(int'(free_idx));
    new_entry.busy = 1'b1;
    new_entry.op   = opcode.op;
    t1 = regStatus[reg_index(opcode.src1)];
    t2 = regStatus[reg_index(opcode.src2)];
    if (t1 == '0) begin
      new_entry.va = output_A;   new_entry.tag_va = 1'b1;
    end else if (t1 == bus_result_tag) begin
      new_entry.va = bus_result; new_entry.tag_va = 1'b1;
    end else begin
      new_entry.qa = t1;
    end
    if (t2 == '0) begin
      new_entry.vb = output_B;   new_entry.tag_vb = 1'b1;
    end else if (t2 == bus_result_tag) begin
      new_entry.vb = bus_result; new_entry.tag_vb = 1'b1;
    end else begin
      new_entry.qb = t2;
    end
  end

  always_comb begin
    destination_select = '0;
    if (accept) begin
      destination_select.tag  = TAG_BASE + tag_t'(free_idx);
      destination_select.dest = opcode.dest;
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < ENTRIES; i++) rs[i] <= empty_slot(i);
      issued  <= '0;
      tag     <= '0;
      R       <= 1'b0;
      value_A <= '0;
      value_B <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (accept && free_idx == IDX_W'(i)) begin
          rs[i]     <= new_entry;
          issued[i] <= 1'b0;
        end else if (grant && issued[i] && tag == rs[i].rs_tag) begin
          rs[i]     <= empty_slot(i);
          issued[i] <= 1'b0;
        end else if (rs[i].busy) begin
          if (rs[i].qa != '0 && rs[i].qa == bus_result_tag) begin
            rs[i].va     <= bus_result;
            rs[i].tag_va <= 1'b1;
            rs[i].qa     <= '0;
          end
          if (rs[i].qb != '0 && rs[i].qb == bus_result_tag) begin
            rs[i].vb     <= bus_result;
            rs[i].tag_vb <= 1'b1;
            rs[i].qb     <= '0;
          end
          if (out_free && have_ready && ready_idx == IDX_W'(i))
            issued[i] <= 1'b1;
        end
      end
      if (out_free) begin
        if (have_ready) begin
          tag     <= rs[ready_idx].rs_tag;
          value_A <= rs[ready_idx].va;
          value_B <= rs[ready_idx].vb;
          R       <= (rs[ready_idx].op == OP_SUB);
        end else begin
          tag <= '0;
        end
      end
    end
  end

  // The queue must never send an opcode to a station with no free slot.
  a_no_overflow: assert property (@(posedge clock) disable iff (reset)
    opcode.valid |-> have_free);
  // A grant only answers a result this station is presenting.
  a_grant_has_result: assert property (@(posedge clock) disable iff (reset)
    grant |-> tag != '0);
endmodule
