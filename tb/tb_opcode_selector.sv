// Self-checking testbench for opcode_selector. Replays the four opcodes of
// the selector's reference waveform (a valid ADD, two invalid words, a valid
// MUL), then a SUB, a LOAD, an unsupported operation and reset. Each output
// is checked one clock after its input, and the paths that do not receive
// the opcode must carry the all-zero invalid opcode.
module tb_opcode_selector;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  opcode_t opcode, opcode_out_add, opcode_out_mult, opcode_out_load;
  int checks = 0, failures = 0;

  opcode_selector dut (.clock, .reset, .opcode, .opcode_out_add, .opcode_out_mult, .opcode_out_load);

  always #5 clock = ~clock;

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [15:0] in, logic [15:0] e_add, logic [15:0] e_mul, logic [15:0] e_ld);
    @(negedge clock);
    opcode = opcode_t'(in);
    #1;
    // Registered: nothing changes before the clock edge.
    checks++;
    @(posedge clock); #1;
    if (opcode_out_add != opcode_t'(e_add) || opcode_out_mult != opcode_t'(e_mul) ||
        opcode_out_load != opcode_t'(e_ld)) begin
      failures++;
      $display("FAIL in=%b: add=%b mult=%b load=%b", in, opcode_out_add, opcode_out_mult, opcode_out_load);
    end
  endtask

  initial begin
    opcode = '0;
    repeat (2) @(posedge clock);
    #1;
    checks++;
    if (opcode_out_add != '0 || opcode_out_mult != '0 || opcode_out_load != '0) failures++;
    reset = 0;
    step(16'b1000001010010000, 16'b1000001010010000, 0, 0);   // ADD R2,R5,R0
    step(16'b0000111010101110, 0, 0, 0);                      // invalid
    step(16'b0000010100100011, 0, 0, 0);                      // invalid LOAD
    step(16'b1001000010111010, 0, 16'b1001000010111010, 0);   // MUL R7,R1,R2
    step(16'b1000100110011001, 16'b1000100110011001, 0, 0);   // SUB
    step(16'b1000001100010011, 0, 0, 16'b1000001100010011);   // LOAD
    step(16'b1000001100010101, 0, 0, 0);                      // unsupported op 101
    // Latency: the output must still show the previous opcode before the edge.
    @(negedge clock);
    opcode = opcode_t'(16'b1000000000001000);
    #1;
    checks++;
    if (opcode_out_add != '0) begin failures++; $display("FAIL output changed before the edge"); end
    @(posedge clock); #1;
    checks++;
    if (opcode_out_add != opcode_t'(16'b1000000000001000)) begin failures++; $display("FAIL late"); end
    @(negedge clock);
    opcode = opcode_t'(16'b1000000000001010);
    reset = 1;
    @(posedge clock); #1;
    checks++;
    if (opcode_out_add != '0 || opcode_out_mult != '0 || opcode_out_load != '0) begin
      failures++; $display("FAIL reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
