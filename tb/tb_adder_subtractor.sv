// Self-checking testbench for adder_subtractor.
// First replays the ten operand pairs of the unit's reference waveform
// (3+0, 5-2, 2+3, 1+5, 0+8, 3+5, 2+1, 5-2, 9-3, 8-4), then sweeps every
// combination of A, B and R. Expected sum, difference and carry are computed
// here with 5-bit integer arithmetic; the tag must pass through unchanged.
module tb_adder_subtractor;
  import tomasulo_pkg::*;

  logic  clock = 0;
  logic  R;
  data_t a, b, result;
  tag_t  tag, tag_out;
  logic  C4;
  int    checks = 0, failures = 0;

  adder_subtractor dut (.R, .input_A(a), .input_B(b), .tag, .result, .tag_out, .C4);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int ia, int ib, bit ir, int itag);
    int exp_full;
    a = data_t'(ia); b = data_t'(ib); R = ir; tag = tag_t'(itag);
    @(posedge clock); #1;
    exp_full = ir ? (ia + ((~ib) & 15) + 1) : (ia + ib);
    checks++;
    if (result != data_t'(exp_full) || C4 != exp_full[4] || tag_out != tag_t'(itag)) begin
      failures++;
      $display("FAIL a=%0d b=%0d R=%0d: result=%0d C4=%0d tag_out=%0d, expected %0d %0d %0d",
               ia, ib, ir, result, C4, tag_out, exp_full & 15, exp_full[4], itag);
    end
  endtask

  initial begin
    automatic int va[10] = '{3, 5, 2, 1, 0, 3, 2, 5, 9, 8};
    automatic int vb[10] = '{0, 2, 3, 5, 8, 5, 1, 2, 3, 4};
    automatic bit vr[10] = '{0, 1, 0, 0, 0, 0, 0, 1, 1, 1};
    automatic int vt[10] = '{0, 1, 2, 3, 4, 1, 2, 8, 7, 5};
    automatic int vres[10] = '{3, 3, 5, 6, 8, 8, 3, 3, 6, 4};
    for (int i = 0; i < 10; i++) begin
      apply(va[i], vb[i], vr[i], vt[i]);
      checks++;
      if (result != data_t'(vres[i])) begin
        failures++;
        $display("FAIL waveform vector %0d: result=%0d expected %0d", i, result, vres[i]);
      end
    end
    for (int ir = 0; ir < 2; ir++)
      for (int ia = 0; ia < 16; ia++)
        for (int ib = 0; ib < 16; ib++)
          apply(ia, ib, ir[0], (ia + ib) & 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
