// Self-checking testbench for common_data_bus: an idle bus, a lone adder
// result, a lone multiplier result (truncated to 4 bits), and repeated
// conflicts, where the grant must alternate between the two units and the
// bus must carry exactly the granted unit's tag and value. Random requests
// are then checked against a round-robin model.
module tb_common_data_bus;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  tag_t adder_tag, multiplier_tag, data_tag;
  data_t adder_result, data_IN;
  logic [2*DATA_W-1:0] multiplier_result;
  logic adder_grant, mult_grant;
  int checks = 0, failures = 0;

  common_data_bus dut (.clock, .reset, .adder_tag, .adder_result, .multiplier_tag,
                       .multiplier_result, .data_tag, .data_IN, .adder_grant, .mult_grant);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int at, int ar, int mt, int mr, bit eg_add, bit eg_mul, int et, int ed);
    @(negedge clock);
    adder_tag = tag_t'(at); adder_result = data_t'(ar);
    multiplier_tag = tag_t'(mt); multiplier_result = 8'(mr);
    #1;
    checks++;
    if (adder_grant != eg_add || mult_grant != eg_mul || data_tag != tag_t'(et) || data_IN != data_t'(ed)) begin
      failures++;
      $display("FAIL at=%0d mt=%0d: grants %0d/%0d bus %0d:%0d, expected %0d/%0d %0d:%0d",
               at, mt, adder_grant, mult_grant, data_tag, data_IN, eg_add, eg_mul, et, ed);
    end
  endtask

  initial begin
    adder_tag = 0; adder_result = 0; multiplier_tag = 0; multiplier_result = 0;
    repeat (2) @(posedge clock);
    reset = 0;
    step(0, 7, 0, 9, 0, 0, 0, 0);          // idle
    step(2, 9, 0, 0, 1, 0, 2, 9);          // adder only
    step(0, 0, 4, 'hA6, 0, 1, 4, 6);      // multiplier only, product truncated
    step(1, 3, 5, 'h1C, 1, 0, 1, 3);      // conflict: adder first after reset
    step(1, 3, 5, 'h1C, 0, 1, 5, 12);     // conflict again: multiplier's turn
    step(3, 11, 4, 'h02, 1, 0, 3, 11);    // and back to the adder
    step(0, 0, 4, 'h02, 0, 1, 4, 2);      // lone request is granted at once
    step(2, 5, 5, 'h0F, 0, 1, 5, 15);     // conflict: the adder won the last one
    step(2, 5, 0, 0, 1, 0, 2, 5);
    // Random requests against a round-robin model.
    begin
      automatic bit fav_mul = 0;   // after a conflict won by the adder, the multiplier is favoured
      for (int i = 0; i < 500; i++) begin
        int at, ar, mt, mr;
        bit ga, gm;
        at = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 3);
        mt = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(4, 5);
        ar = $urandom_range(0, 15); mr = $urandom_range(0, 255);
        ga = (at != 0) && !(mt != 0 && fav_mul);
        gm = (mt != 0) && !ga;
        step(at, ar, mt, mr, ga, gm, ga ? at : gm ? mt : 0, ga ? ar : gm ? (mr % 16) : 0);
        if (at != 0 && mt != 0) fav_mul = ga;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
