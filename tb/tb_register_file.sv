// Self-checking testbench for register_file. A shadow array holds the
// expected register contents. Checks: reset clears every register; LOAD
// (external) and CDB (internal) writes land in the right register; the two
// read ports return the registers named by the opcode's source fields one
// cycle later; a read at the edge of a write returns the new value; a LOAD
// and a CDB write to the same register leave the LOAD's value; random
// traffic.
module tb_register_file;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  logic select_data, load_en;
  opcode_t opcode;
  logic [RIDX_W-1:0] destination_result;
  regf_t load_dest;
  data_t data_EX, data_IN, output_A, output_B;
  data_t [NUM_REGS-1:0] R;
  data_t model[NUM_REGS];
  int checks = 0, failures = 0;

  register_file dut (.reset, .clock, .select_data, .opcode, .destination_result, .load_en,
                     .load_dest, .data_EX, .data_IN, .R, .output_A, .output_B);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
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

  // One clock: optional CDB write, optional LOAD, read of (s1, s2).
  task automatic cycle(bit cdb, int cr, int cd, bit ld, int lr, int lv, int s1, int s2);
    data_t ea, eb;
    @(negedge clock);
    select_data = cdb; destination_result = RIDX_W'(cr); data_IN = data_t'(cd);
    load_en = ld; load_dest = regf_t'(lr); data_EX = data_t'(lv);
    opcode = '0; opcode.valid = 1; opcode.src1 = regf_t'(s1); opcode.src2 = regf_t'(s2);
    if (cdb) model[cr] = data_t'(cd);
    if (ld)  model[lr] = data_t'(lv);
    ea = model[s1]; eb = model[s2];
    @(posedge clock); #1;
    check(output_A == ea && output_B == eb,
          $sformatf("read R%0d/R%0d got %0d/%0d expected %0d/%0d", s1, s2, output_A, output_B, ea, eb));
    for (int r = 0; r < NUM_REGS; r++)
      check(R[r] == model[r], $sformatf("R%0d=%0d expected %0d", r, R[r], model[r]));
  endtask

  initial begin
    select_data = 0; load_en = 0; opcode = '0; destination_result = 0;
    load_dest = 0; data_EX = 0; data_IN = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clock);
    reset = 0;
    for (int r = 0; r < NUM_REGS; r++) check(R[r] == 0, "reset value");
    cycle(0, 0, 0, 1, 2, 3, 2, 0);   // LOAD R2 <- 3, read forwarded
    cycle(1, 5, 9, 0, 0, 0, 5, 2);   // CDB R5 <- 9, read forwarded
    cycle(1, 6, 4, 1, 6, 12, 6, 5);  // same register: the LOAD wins
    cycle(1, 1, 7, 1, 3, 2, 1, 3);   // two writes to different registers
    for (int i = 0; i < 300; i++)
      cycle($urandom_range(0, 1) == 1, $urandom_range(0, 7), $urandom_range(0, 15),
            $urandom_range(0, 1) == 1, $urandom_range(0, 7), $urandom_range(0, 15),
            $urandom_range(0, 7), $urandom_range(0, 7));
    @(negedge clock); reset = 1; @(posedge clock); #1; reset = 0;
    for (int r = 0; r < NUM_REGS; r++) check(R[r] == 0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
