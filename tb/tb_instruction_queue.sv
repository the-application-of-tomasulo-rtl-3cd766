// Self-checking testbench for instruction_queue. A queue model (SystemVerilog
// queue of 15-bit instructions) predicts, every cycle, which instruction must
// leave and when the queue is full. Directed phases: fill all 16 slots and
// see the 17th dropped; an unsupported operation dropped; a head ADD blocked
// by adder_full while a MUL behind it also waits (in-order issue); LOAD
// leaving regardless of both flags; simultaneous push and pop. A random phase
// follows.
module tb_instruction_queue;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  logic [14:0] instruction;
  logic instr_valid, adder_full, mult_full, full;
  opcode_t opcode;
  logic [14:0] model[$];
  int checks = 0, failures = 0, issued = 0, stalled = 0;

  instruction_queue dut (.clock, .reset, .instruction, .instr_valid, .adder_full, .mult_full,
                         .opcode, .full);

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [14:0] mk(int op, int d, int s1, int s2);
    return {4'(s2), 4'(s1), 4'(d), 3'(op)};
  endfunction

  // One cycle with the given inputs; checks opcode and full against the model.
  task automatic cycle(bit v, logic [14:0] ins, bit af, bit mf);
    logic [15:0] exp_op;
    bit exp_full, go;
    @(negedge clock);
    instr_valid = v; instruction = ins; adder_full = af; mult_full = mf;
    #1;
    exp_full = (model.size() == 16);
    exp_op = '0;
    go = 0;
    if (model.size() > 0) begin
      case (model[0][2:0])
        3'b000, 3'b001: go = !af;
        3'b010:         go = !mf;
        3'b011:         go = 1;
        default:        go = 0;
      endcase
      if (go) exp_op = {1'b1, model[0]};
    end
    checks++;
    if (opcode != opcode_t'(exp_op) || full != exp_full) begin
      failures++;
      $display("FAIL opcode=%b full=%0d expected %b %0d", opcode, full, exp_op, exp_full);
    end
    if (go) begin
      void'(model.pop_front());
      issued++;
    end else if (model.size() > 0) stalled++;
    if (v && !exp_full && ins[2:0] <= 3'b011) model.push_back(ins);
    @(posedge clock);
  endtask

  initial begin
    instruction = 0; instr_valid = 0; adder_full = 0; mult_full = 0;
    repeat (2) @(posedge clock);
    reset = 0;
    // Fill: adder and multiplier both full so nothing leaves.
    for (int i = 0; i < 17; i++) cycle(1, mk(i % 3, i % 8, 1, 2), 1, 1);
    cycle(0, 0, 1, 1);
    // Drain with the adder blocked: a MUL at the head may leave, then an ADD blocks.
    for (int i = 0; i < 5; i++) cycle(0, 0, 1, 0);
    for (int i = 0; i < 20; i++) cycle(0, 0, 0, 0);
    // Unsupported operation is dropped, LOAD passes both flags.
    cycle(1, mk(5, 1, 1, 1), 0, 0);
    cycle(1, mk(3, 4, 9, 0), 1, 1);
    cycle(0, 0, 1, 1);
    // Push and pop in the same cycle.
    for (int i = 0; i < 30; i++) cycle(1, mk(i % 4, i % 8, i % 16, 3), 0, 0);
    // Random traffic.
    for (int i = 0; i < 2000; i++)
      cycle($urandom_range(0, 3) != 0, 15'($urandom), $urandom_range(0, 2) == 0,
            $urandom_range(0, 2) == 0);
    // Reset empties the queue.
    @(negedge clock); reset = 1; @(posedge clock); #1; reset = 0;
    model.delete();
    cycle(0, 0, 0, 0);
    checks++;
    if (issued < 100 || stalled < 50) begin
      failures++;
      $display("FAIL too little traffic: issued=%0d stalled=%0d", issued, stalled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
