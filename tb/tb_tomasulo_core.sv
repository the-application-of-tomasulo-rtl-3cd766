// End-to-end testbench for tomasulo_core at its default sizes (16-slot
// queue, 3 adder and 2 multiplier slots).
// A sequential reference model executes every instruction in program order;
// after each program drains, all eight registers must equal the model's.
// Programs:
//  1. the worked example: LOADs, then ADD R2,R4,R0 / SUB R3,R6,R2 /
//     ADD R5,R3,R2 (two true dependencies on R2, one on R3);
//  2. a single ADD, to measure latency: it must be on the common data bus
//     three cycles after it leaves the queue;
//  3. 40 independent ADD/SUBs, to measure throughput: one result per cycle
//     on the bus once the pipeline is full;
//  4. a chain of 60 dependent MULs, which fills the instruction queue;
//  5. random programs of ADD/SUB/MUL/LOAD with dense register reuse, plus
//     unsupported operations that must be dropped.
// The testbench counts how often each mechanism occurred (issue stall on a
// full reservation station, full queue, operand taken off the bus at issue,
// operand filled by snooping, bus conflict, out-of-order completion, result
// superseded by a younger writer, LOAD, dropped instruction) and counts a
// failure for any that never happened.
module tb_tomasulo_core;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  logic [14:0] instruction;
  logic instr_valid, queue_full, adder_carry;
  data_t [NUM_REGS-1:0] regs;
  tag_t cdb_tag;
  data_t cdb_data;
  int checks = 0, failures = 0;
  int unsigned cycle_no = 0;

  tomasulo_core dut (.clock, .reset, .instruction, .instr_valid, .queue_full, .regs,
                     .cdb_tag, .cdb_data, .adder_carry);

  always #5 clock = ~clock;
  always @(posedge clock) cycle_no <= cycle_no + 1;

  initial begin
    repeat (200000) @(posedge clock);
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

  // ---------------- reference model ----------------
  data_t model[NUM_REGS];

  function automatic logic [14:0] mk(int op, int d, int s1, int s2);
    return {4'(s2), 4'(s1), 4'(d), 3'(op)};
  endfunction

  function automatic void model_exec(logic [14:0] ins);
    int d, s1, s2;
    d = int'(ins[5:3]); s1 = int'(ins[9:7]); s2 = int'(ins[13:11]);
    case (ins[2:0])
      3'b000: model[d] = model[s1] + model[s2];
      3'b001: model[d] = model[s1] - model[s2];
      3'b010: model[d] = 4'(int'(model[s1]) * int'(model[s2]));
      3'b011: model[d] = ins[10:7];
      default: ;
    endcase
  endfunction

  // ---------------- mechanism counters ----------------
  int n_rs_stall, n_queue_full, n_issue_bypass, n_snoop, n_conflict, n_ooo, n_superseded,
      n_load, n_dropped, n_results;
  int unsigned seq_of_tag[16];
  bit          outstanding[16];
  int unsigned alloc_seq = 0;

  always @(posedge clock) if (!reset) begin
    // Issue blocked by a full reservation station.
    if (dut.i_queue.head.valid && !dut.i_queue.pop) n_rs_stall++;
    if (queue_full) n_queue_full++;
    if (dut.op_load.valid) n_load++;
    if (dut.u_common_data_bus.add_req && dut.u_common_data_bus.mul_req) n_conflict++;
    if (cdb_tag != 0) begin
      n_results++;
      if (!dut.select_data) n_superseded++;
      for (int t = 1; t < 16; t++)
        if (outstanding[t] && seq_of_tag[t] < seq_of_tag[cdb_tag]) begin
          n_ooo++;
          break;
        end
      outstanding[cdb_tag] = 0;
    end
    // Operands taken off the bus at allocation.
    if (dut.dest_sel.tag != 0) begin
      opcode_t o;
      o = dut.op_add.valid ? dut.op_add : dut.op_mult;
      if (cdb_tag != 0 && (dut.reg_status[o.src1[2:0]] == cdb_tag ||
                           dut.reg_status[o.src2[2:0]] == cdb_tag))
        n_issue_bypass++;
      seq_of_tag[dut.dest_sel.tag] = alloc_seq++;
      outstanding[dut.dest_sel.tag] = 1;
    end
    // Waiting operands filled by snooping.
    if (cdb_tag != 0) begin
      for (int i = 0; i < 3; i++)
        if (dut.add_rs.rs[i].busy && (dut.add_rs.rs[i].qa == cdb_tag || dut.add_rs.rs[i].qb == cdb_tag))
          n_snoop++;
      for (int i = 0; i < 2; i++)
        if (dut.multiplier_rs.rs[i].busy &&
            (dut.multiplier_rs.rs[i].qa == cdb_tag || dut.multiplier_rs.rs[i].qb == cdb_tag))
          n_snoop++;
    end
  end

  // ---------------- program driver ----------------
  task automatic push(logic [14:0] ins);
    @(negedge clock);
    while (queue_full) @(negedge clock);
    instruction = ins; instr_valid = 1;
    if (ins[2:0] <= 3'b011) model_exec(ins);
    else n_dropped++;
    @(negedge clock);
    instr_valid = 0;
  endtask

  // Push without a gap between instructions (for throughput).
  task automatic push_stream(logic [14:0] ins[$]);
    foreach (ins[i]) begin
      @(negedge clock);
      while (queue_full) begin
        instr_valid = 0;
        @(negedge clock);
      end
      instruction = ins[i]; instr_valid = 1;
      model_exec(ins[i]);
    end
    @(negedge clock);
    instr_valid = 0;
  endtask

  function automatic bit idle();
    return dut.i_queue.count_pos == 0 && !dut.iq_opcode.valid && !dut.op_add.valid &&
           !dut.op_mult.valid && !dut.op_load.valid &&
           dut.add_rs.rs[0].busy == 0 && dut.add_rs.rs[1].busy == 0 && dut.add_rs.rs[2].busy == 0 &&
           dut.multiplier_rs.rs[0].busy == 0 && dut.multiplier_rs.rs[1].busy == 0 &&
           dut.reg_status == '0;
  endfunction

  task automatic drain_and_compare(string name);
    int n = 0;
    @(negedge clock);
    while (!idle() && n < 500) begin
      @(negedge clock);
      n++;
    end
    check(idle(), {name, ": core did not drain"});
    for (int r = 0; r < NUM_REGS; r++)
      check(regs[r] == model[r], $sformatf("%s: R%0d=%0d expected %0d", name, r, regs[r], model[r]));
  endtask

  initial begin
    logic [14:0] prog[$];
    int unsigned t_issue, t_bus, first_res, last_res, nres;
    instruction = 0; instr_valid = 0;
    foreach (model[r]) model[r] = '0;
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 0;

    // 1. Worked example.
    push(mk(3, 4, 6, 0));   // LOAD R4 <- 6
    push(mk(3, 0, 3, 0));   // LOAD R0 <- 3
    push(mk(3, 6, 9, 0));   // LOAD R6 <- 9
    prog = '{mk(0, 2, 4, 0), mk(1, 3, 6, 2), mk(0, 5, 3, 2)};
    push_stream(prog);
    drain_and_compare("worked example");
    check(model[2] == 9 && model[3] == 0 && model[5] == 9, "worked example reference values");

    // 2. Latency of one ADD: queue issue to common data bus.
    @(negedge clock);
    instruction = mk(0, 7, 2, 4); instr_valid = 1;
    model_exec(mk(0, 7, 2, 4));
    @(negedge clock);
    instr_valid = 0;
    while (!dut.iq_opcode.valid) @(negedge clock);
    t_issue = cycle_no;
    while (cdb_tag == 0) @(negedge clock);
    t_bus = cycle_no;
    check(t_bus - t_issue == 3, $sformatf("issue-to-bus latency %0d, expected 3", t_bus - t_issue));
    drain_and_compare("latency");

    // 3. Throughput: 40 independent adds and subtracts.
    prog.delete();
    for (int i = 0; i < 40; i++) prog.push_back(mk(i % 2, 1 + (i % 7), 0, 0));
    nres = 0; first_res = 0; last_res = 0;
    fork
      push_stream(prog);
      begin
        while (nres < 40) begin
          @(negedge clock);
          if (cdb_tag != 0) begin
            if (nres == 0) first_res = cycle_no;
            last_res = cycle_no;
            nres++;
          end
        end
      end
    join
    check(last_res - first_res == 39,
          $sformatf("40 independent results took %0d cycles on the bus, expected 40",
                    last_res - first_res + 1));
    drain_and_compare("throughput");

    // 4. A chain of 60 dependent multiplies issues slower than one per cycle,
    //    so the queue fills and the driver must wait on queue_full.
    prog.delete();
    prog.push_back(mk(3, 1, 3, 0));
    for (int i = 0; i < 60; i++) prog.push_back(mk(2, 1, 1, 1 + (i % 2)));
    push_stream(prog);
    drain_and_compare("multiply chain");

    // 5. Random programs.
    for (int p = 0; p < 40; p++) begin
      prog.delete();
      for (int i = 0; i < 30; i++) begin
        int op;
        op = $urandom_range(0, 9);
        op = (op < 3) ? 0 : (op < 5) ? 1 : (op < 8) ? 2 : (op < 9) ? 3 : $urandom_range(4, 7);
        prog.push_back(mk(op, $urandom_range(0, 7), (op == 3) ? $urandom_range(0, 15) : $urandom_range(0, 7),
                          $urandom_range(0, 7)));
      end
      if (p % 2 == 0) push_stream(prog);
      else foreach (prog[i]) push(prog[i]);
      drain_and_compare($sformatf("random program %0d", p));
    end

    $display("mechanisms: rs_stall=%0d queue_full=%0d issue_bypass=%0d snoop=%0d conflict=%0d out_of_order=%0d superseded=%0d load=%0d dropped=%0d results=%0d",
             n_rs_stall, n_queue_full, n_issue_bypass, n_snoop, n_conflict, n_ooo, n_superseded,
             n_load, n_dropped, n_results);
    check(n_rs_stall > 0, "no issue stall on a full reservation station");
    check(n_queue_full > 0, "queue never full");
    check(n_issue_bypass > 0, "no operand taken off the bus at issue");
    check(n_snoop > 0, "no operand filled by snooping");
    check(n_conflict > 0, "no bus conflict");
    check(n_ooo > 0, "no out-of-order completion");
    check(n_superseded > 0, "no result superseded by a younger writer");
    check(n_load > 0, "no LOAD");
    check(n_dropped > 0, "no unsupported instruction dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
