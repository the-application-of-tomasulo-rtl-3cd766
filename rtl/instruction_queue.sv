// Instruction queue.
//
// A first-in first-out stack of DEPTH (16) opcode slots; slot 0 is the head.
// Input: when instr_valid is high, the 15-bit instruction is written into the
// lowest free slot together with a validity bit of 1 (bit 15). Instructions
// whose operation field is not ADD (000), SUB (001), MUL (010) or LOAD (011)
// are disregarded, and so is everything offered while the queue is full
// (full = 1 once all DEPTH slots hold an instruction).
// Output: at most one instruction per cycle leaves from slot 0. It leaves
// when slot 0 is valid and its reservation station can take it: ADD/SUB need
// adder_full = 0, MUL needs mult_full = 0, LOAD needs no station. The
// leaving instruction is driven on opcode in that cycle (combinationally) and
// at the clock edge every slot moves down one place, the top slot becoming
// invalid; otherwise opcode is all zero. A blocked head holds up everything
// behind it, since issue is in program order.
// The stack organisation, the slot count, the validity bit and the issue rule
// follow the design; presenting the issued opcode combinationally (so that
// the full flags need to cover only the one instruction in the selector
// register) and the instr_valid strobe are this implementation's.
module instruction_queue
  import tomasulo_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [14:0] instruction,
  input  logic        instr_valid,
  input  logic        adder_full,
  input  logic        mult_full,
  output opcode_t     opcode,
  output logic        full
);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  opcode_t [DEPTH-1:0] stack;
  logic [CNT_W-1:0]    count_pos;   // number of occupied slots = next free slot
  opcode_t             head, incoming;
  logic                pop, push, supported;

  assign head     = stack[0];
  assign full     = (count_pos == CNT_W'(DEPTH));
  assign incoming = opcode_t'({1'b1, instruction});
  assign supported = (instruction[2:0] == OP_ADD) || (instruction[2:0] == OP_SUB) ||
                     (instruction[2:0] == OP_MUL) || (instruction[2:0] == OP_LOAD);
  assign push     = instr_valid && supported && !full;

  always_comb begin
    pop = 1'b0;
    if (head.valid) begin
      unique case (head.op)
        OP_ADD, OP_SUB: pop = !adder_full;
        OP_MUL:         pop = !mult_full;
        OP_LOAD:        pop = 1'b1;
        default:        pop = 1'b0;
      endcase
    end
    opcode = pop ? head : '0;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      stack     <= '0;
      count_pos <= '0;
    end else begin
      if (pop) begin
        for (int i = 0; i < DEPTH - 1; i++) stack[i] <= stack[i+1];
        stack[DEPTH-1] <= '0;
      end
      if (push) stack[count_pos - CNT_W'(pop)] <= incoming;
      count_pos <= count_pos + CNT_W'(push) - CNT_W'(pop);
    end
  end

  // Occupied slots are exactly the lowest count_pos ones.
  for (genvar i = 0; i < DEPTH; i++) begin : g_chk
    a_packed: assert property (@(posedge clock) disable iff (reset)
      stack[i].valid == (CNT_W'(i) < count_pos));
  end
endmodule
