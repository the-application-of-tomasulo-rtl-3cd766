// Step-by-step check of the textbook worked example on the full core:
//   i1 ADD R2,R4,R0   i2 SUB R3,R6,R2   i3 ADD R5,R3,R2
// issued on consecutive cycles after R4, R0 and R6 have been loaded with 6,
// 3 and 9. After each allocation the testbench inspects the adder
// reservation station and the register status table:
//   i1 -> Add1 busy, op ADD, Va = R4, Vb = R0 both present; R2 -> tag Add1
//   i2 -> Add2 busy, op SUB, Va = R6 present, Qb = Add1;     R3 -> tag Add2
//   i3 -> Qa = Add2, Vb = R2's value; R5 -> i3's tag.
// In this core Add1 executes while i3 is being issued, so i3 takes R2's value
// straight off the bus, and it reuses Add1, which the bus frees in the same
// cycle (the example's tables, drawn without timing, place it in Add3). The
// state after that edge is otherwise the end state of the example: Add2
// holding Vb = R2, i3 waiting only on Add2, R2 no longer busy. The final
// register values (R2 = 9, R3 = 0, R5 = 9) are then compared.
module tb_worked_example;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  logic [14:0] instruction;
  logic instr_valid, queue_full, adder_carry;
  data_t [NUM_REGS-1:0] regs;
  tag_t cdb_tag;
  data_t cdb_data;
  int checks = 0, failures = 0;

  tomasulo_core dut (.clock, .reset, .instruction, .instr_valid, .queue_full, .regs,
                     .cdb_tag, .cdb_data, .adder_carry);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [14:0] mk(int op, int d, int s1, int s2);
    return {4'(s2), 4'(s1), 4'(d), 3'(op)};
  endfunction

  task automatic push(logic [14:0] ins);
    @(negedge clock);
    instruction = ins; instr_valid = 1;
    @(negedge clock);
    instr_valid = 0;
  endtask

  // Wait (at falling edges) until the adder station allocates; return after
  // the allocating clock edge.
  task automatic wait_alloc(output dest_sel_t ds);
    while (dut.add_rs.destination_select.tag == 0) @(negedge clock);
    ds = dut.add_rs.destination_select;
    @(negedge clock);
  endtask

  initial begin
    dest_sel_t ds;
    rs_entry_t e;
    instruction = 0; instr_valid = 0;
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 0;
    push(mk(3, 4, 6, 0));    // R4 <- 6
    push(mk(3, 0, 3, 0));    // R0 <- 3
    push(mk(3, 6, 9, 0));    // R6 <- 9
    repeat (4) @(negedge clock);
    check(regs[4] == 6 && regs[0] == 3 && regs[6] == 9, "initial loads");

    // Three instructions on consecutive cycles.
    fork
      begin
        @(negedge clock); instruction = mk(0, 2, 4, 0); instr_valid = 1;
        @(negedge clock); instruction = mk(1, 3, 6, 2);
        @(negedge clock); instruction = mk(0, 5, 3, 2);
        @(negedge clock); instr_valid = 0;
      end
    join_none
    @(negedge clock);

    // Step 1-2: i1 in Add1.
    wait_alloc(ds);
    check(ds.tag == 1 && ds.dest == 2, $sformatf("i1 destination_select %h", ds));
    e = dut.add_rs.rs[0];
    check(e.busy && e.op == OP_ADD && e.tag_va && e.va == 6 && e.tag_vb && e.vb == 3,
          "Fig step 2: Add1 = ADD, Va = Regs[R4], Vb = Regs[R0]");
    check(dut.reg_status[2] == 1, "Fig step 1: R2 busy with Add1");

    // Step 3-4: i2 in Add2, waiting on Add1 for source 2.
    ds = dut.add_rs.destination_select;
    check(ds.tag == 2 && ds.dest == 3, $sformatf("i2 destination_select %h", ds));
    @(negedge clock);
    e = dut.add_rs.rs[1];
    check(e.busy && e.op == OP_SUB && e.tag_va && e.va == 9 && !e.tag_vb && e.qb == 1,
          "Fig step 4: Add2 = SUB, Va = Regs[R6], Qb = Add1");
    check(dut.reg_status[2] == 1 && dut.reg_status[3] == 2, "Fig step 3: R2 Add1, R3 Add2");
    check(dut.add_rs.tag == 1 && cdb_tag == 1 && cdb_data == 9, "Fig step 7-8: Add1's result on the bus");

    // Step 5-6 and 9: i3 is allocated while Add1's result is broadcast. Add1
    // is reusable in that very cycle and is the lowest free slot, so i3 takes
    // it (the tables of the example, drawn without timing, show Add3).
    ds = dut.add_rs.destination_select;
    check(ds.tag == 1 && ds.dest == 5, $sformatf("i3 destination_select %h", ds));
    @(negedge clock);
    e = dut.add_rs.rs[0];
    check(e.busy && e.op == OP_ADD && !e.tag_va && e.qa == 2 && e.tag_vb && e.vb == 9,
          "Fig step 9: i3 = ADD, Qa = Add2, Vb = Regs[R2]");
    e = dut.add_rs.rs[1];
    check(e.tag_va && e.va == 9 && e.tag_vb && e.vb == 9 && e.qb == 0,
          "Fig step 9: Add2 Vb = Regs[R2], Qb cleared");
    check(!dut.add_rs.rs[2].busy, "third slot never needed");
    check(dut.reg_status[2] == 0 && dut.reg_status[3] == 2 && dut.reg_status[5] == 1,
          "Fig step 9: R2 cleared, R3 Add2, R5 renamed to i3's slot");
    check(regs[2] == 9, "R2 written from the bus");

    repeat (6) @(negedge clock);
    check(regs[2] == 9 && regs[3] == 0 && regs[5] == 9,
          $sformatf("final R2=%0d R3=%0d R5=%0d, expected 9 0 9", regs[2], regs[3], regs[5]));
    check(dut.reg_status == '0, "all registers valid at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
