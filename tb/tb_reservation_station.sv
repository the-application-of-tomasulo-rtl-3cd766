// Self-checking testbench for reservation_station (adder configuration:
// three slots, tags 1-3).
// Part 1 replays the input sequence of the station's reference waveforms:
// ADD R2,R6,R0 whose R0 operand arrives on the CDB in the issue cycle, then
// SUB R1,R2,R7, ADD R0,R6,R5, ADD R5,R5,R1 and ADD R5,R7,R3 on consecutive
// cycles, with the CDB always granting. Expected destination_select and
// dispatched tag/values were worked out by hand from the renaming rules.
// Part 2 covers what the waveforms do not: operands waiting in Qa/Qb and
// filled by CDB snooping, out-of-order dispatch, the full flag, a result held
// while the CDB is not granted, slot reuse and dispatch latency (two clock
// edges from opcode to value_A/value_B).
// Part 3 runs a second instance in the multiplier configuration (two slots,
// tags 4-5): a MUL and a dependent MUL whose two operands both wait on the
// first, the full flag with two slots, and R staying 0 for MUL.
module tb_reservation_station;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  opcode_t opcode;
  data_t output_A, output_B, bus_result, value_A, value_B;
  reg_status_t regStatus;
  tag_t bus_result_tag, tag;
  logic grant, R, full;
  dest_sel_t destination_select;
  int checks = 0, failures = 0;

  reservation_station #(.ENTRIES(3), .TAG_BASE(4'd1)) dut (
    .clock, .reset, .opcode, .output_A, .output_B, .regStatus, .bus_result, .bus_result_tag,
    .grant, .tag, .R, .value_A, .value_B, .destination_select, .full);

  // Multiplier-configuration instance.
  opcode_t m_opcode;
  data_t m_output_A, m_output_B, m_value_A, m_value_B;
  tag_t m_tag;
  logic m_grant, m_R, m_full;
  dest_sel_t m_destination_select;

  reservation_station #(.ENTRIES(2), .TAG_BASE(4'd4)) dut_m (
    .clock, .reset, .opcode(m_opcode), .output_A(m_output_A), .output_B(m_output_B), .regStatus,
    .bus_result, .bus_result_tag, .grant(m_grant), .tag(m_tag), .R(m_R), .value_A(m_value_A),
    .value_B(m_value_B), .destination_select(m_destination_select), .full(m_full));

  always #5 clock = ~clock;

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (time %0t)", what, $time);
    end
  endtask

  // Drive one cycle's inputs (after the falling edge) and check the
  // combinational outputs of that cycle.
  task automatic drive_m(logic [15:0] op, int oa, int ob, logic [31:0] st, int bt, int bv, bit g,
                         logic [7:0] exp_ds, bit exp_full);
    @(negedge clock);
    m_opcode = opcode_t'(op); m_output_A = data_t'(oa); m_output_B = data_t'(ob);
    regStatus = reg_status_t'(st); bus_result_tag = tag_t'(bt); bus_result = data_t'(bv);
    m_grant = g && (m_tag != 0);
    #1;
    check(m_destination_select == dest_sel_t'(exp_ds),
          $sformatf("mult destination_select=%b expected %b", m_destination_select, exp_ds));
    check(m_full == exp_full, $sformatf("mult full=%0d expected %0d", m_full, exp_full));
  endtask

  task automatic expect_m(int et, int ea, int eb);
    check(m_tag == tag_t'(et), $sformatf("mult tag=%0d expected %0d", m_tag, et));
    if (et != 0) begin
      check(m_value_A == data_t'(ea) && m_value_B == data_t'(eb),
            $sformatf("mult values %0d/%0d expected %0d/%0d", m_value_A, m_value_B, ea, eb));
      check(m_R == 1'b0, "R must stay 0 for MUL");
    end
  endtask

  task automatic drive(logic [15:0] op, int oa, int ob, logic [31:0] st, int bt, int bv, bit g,
                       logic [7:0] exp_ds, bit exp_full);
    @(negedge clock);
    opcode = opcode_t'(op); output_A = data_t'(oa); output_B = data_t'(ob);
    regStatus = reg_status_t'(st); bus_result_tag = tag_t'(bt); bus_result = data_t'(bv);
    grant = g && (tag != 0);   // the bus only grants a presented result
    #1;
    check(destination_select == dest_sel_t'(exp_ds),
          $sformatf("destination_select=%b expected %b", destination_select, exp_ds));
    check(full == exp_full, $sformatf("full=%0d expected %0d", full, exp_full));
  endtask

  // Registered outputs as seen in the current cycle.
  task automatic expect_out(int et, int ea, int eb, bit er);
    check(tag == tag_t'(et), $sformatf("tag=%0d expected %0d", tag, et));
    if (et != 0) begin
      check(value_A == data_t'(ea) && value_B == data_t'(eb),
            $sformatf("values %0d/%0d expected %0d/%0d", value_A, value_B, ea, eb));
      check(R == er, $sformatf("R=%0d expected %0d", R, er));
    end
  endtask

  localparam logic [31:0] ST = 32'b0001_0000_0001_0110_0000_0000_0000_0101;

  initial begin
    opcode = '0; output_A = 0; output_B = 0; regStatus = '0; bus_result = 0;
    bus_result_tag = 0; grant = 0;
    m_opcode = '0; m_output_A = 0; m_output_B = 0; m_grant = 0;
    repeat (2) @(posedge clock);
    reset = 0;

    // ---- Part 1: reference sequence --------------------------------------
    drive(16'b0000001100010011, 1, 2, ST, 0, 0, 0, 8'h00, 0);   // LOAD: ignored
    drive(16'b0000000000000011, 1, 2, ST, 0, 0, 0, 8'h00, 0);   // invalid: ignored
    expect_out(0, 0, 0, 0);
    // C: ADD R2 = R6 + R0; R0 waits on tag 5, which is on the CDB now.
    drive(16'b1000001100010000, 3, 2, ST, 5, 7, 1, 8'b0001_0010, 0);
    expect_out(0, 0, 0, 0);
    // D: SUB R1 = R2 - R7; R7 waits on tag 1, on the CDB now. Slot 1 busy.
    drive(16'b1011100100001001, 6, 15, ST, 1, 8, 1, 8'b0010_0001, 0);
    expect_out(0, 0, 0, 0);                                      // one edge after C: not yet
    // F: ADD R0 = R6 + R5; slot 1's result is taken by the CDB now.
    drive(16'b1010101100000000, 1, 2, ST, 1, 15, 1, 8'b0001_0000, 0);
    expect_out(1, 3, 7, 0);                                      // C dispatched two edges after entry
    drive(16'b1000101010101000, 1, 2, ST, 1, 15, 1, 8'b0010_0101, 0);
    expect_out(2, 6, 8, 1);                                      // D (SUB)
    drive(16'b1001101110101000, 1, 2, ST, 1, 15, 1, 8'b0001_0101, 0);
    expect_out(1, 1, 15, 0);                                     // F
    drive(16'h0000, 0, 0, '0, 0, 0, 1, 8'h00, 0);
    expect_out(2, 15, 2, 0);
    drive(16'h0000, 0, 0, '0, 0, 0, 1, 8'h00, 0);
    expect_out(1, 15, 2, 0);
    drive(16'h0000, 0, 0, '0, 0, 0, 1, 8'h00, 0);
    expect_out(0, 0, 0, 0);

    // ---- Part 2: waiting operands, snooping, full, held result ----------
    @(negedge clock); reset = 1; @(posedge clock); #1; reset = 0;
    // B1: SUB R3 = R1 - R2, R1 waits on tag 4.
    drive({1'b1, 4'd2, 4'd1, 4'd3, 3'b001}, 0, 5, 32'h0000_0040, 0, 0, 0, 8'h13, 0);
    // B2: ADD R4 = R2 + R2, both ready.
    drive({1'b1, 4'd2, 4'd2, 4'd4, 3'b000}, 2, 2, 32'h0000_1040, 0, 0, 0, 8'h24, 0);
    expect_out(0, 0, 0, 0);
    // B3: ADD R5 = R3 + R1, R3 waits on tag 1, R1 on tag 4. Last slot: full.
    drive({1'b1, 4'd1, 4'd3, 4'd5, 3'b000}, 0, 0, 32'h0002_1040, 0, 0, 0, 8'h35, 1);
    expect_out(0, 0, 0, 0);
    // B4: tag 4 on the CDB fills Qa of slot 1 and Qb of slot 3. Slot 2
    // (younger) was dispatched first; the bus is busy, so no grant.
    drive(16'h0000, 0, 0, '0, 4, 9, 0, 8'h00, 1);
    expect_out(2, 2, 2, 0);
    drive(16'h0000, 0, 0, '0, 0, 0, 0, 8'h00, 1);
    expect_out(2, 2, 2, 0);                                      // held without grant
    // B6: grant; slot 2 reusable at once by ADD R6 = R4 + R4 (R4 = tag 2, on the bus);
    // it takes the last available slot, so full stays 1.
    drive({1'b1, 4'd4, 4'd4, 4'd6, 3'b000}, 0, 0, 32'h0002_0000, 2, 4, 1, 8'h26, 1);
    expect_out(2, 2, 2, 0);
    drive(16'h0000, 0, 0, '0, 1, 4, 1, 8'h00, 0);                // SUB result 9-5=4 on the bus
    expect_out(1, 9, 5, 1);
    drive(16'h0000, 0, 0, '0, 2, 8, 1, 8'h00, 0);
    expect_out(2, 4, 4, 0);
    drive(16'h0000, 0, 0, '0, 3, 13, 1, 8'h00, 0);
    expect_out(3, 4, 9, 0);                                      // slot 3 got 4 from tag 1
    drive(16'h0000, 0, 0, '0, 0, 0, 0, 8'h00, 0);
    expect_out(0, 0, 0, 0);

    // ---- Part 3: multiplier configuration --------------------------------
    @(negedge clock); reset = 1; @(posedge clock); #1; reset = 0;
    // MUL R1 = R2 * R3, both ready: first slot, tag 4.
    drive_m({1'b1, 4'd3, 4'd2, 4'd1, 3'b010}, 3, 5, 32'h0, 0, 0, 0, 8'h41, 0);
    // MUL R2 = R1 * R1, both operands wait on tag 4: last slot, so full.
    drive_m({1'b1, 4'd1, 4'd1, 4'd2, 3'b010}, 0, 0, 32'h0000_0040, 0, 0, 0, 8'h52, 1);
    expect_m(0, 0, 0);
    // Tag 4 is granted and broadcast (3*5 = 15): both operands of slot 2 filled.
    drive_m(16'h0000, 0, 0, 32'h0000_0400, 4, 15, 1, 8'h00, 0);
    expect_m(4, 3, 5);
    drive_m(16'h0000, 0, 0, 32'h0000_0500, 0, 0, 1, 8'h00, 0);
    expect_m(0, 0, 0);
    drive_m(16'h0000, 0, 0, 32'h0000_0500, 0, 0, 1, 8'h00, 0);
    expect_m(5, 15, 15);
    drive_m(16'h0000, 0, 0, 32'h0, 0, 0, 0, 8'h00, 0);
    expect_m(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
