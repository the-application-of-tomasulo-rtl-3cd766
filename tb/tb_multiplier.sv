// Self-checking testbench for multiplier: all 256 operand pairs, product
// compared with integer multiplication, tag pass-through checked.
module tb_multiplier;
  import tomasulo_pkg::*;

  logic clock = 0;
  data_t a, b;
  tag_t  tag_in, tag_out;
  logic [2*DATA_W-1:0] p;
  int checks = 0, failures = 0;

  multiplier dut (.a, .b, .tag_in, .p, .tag_out);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++)
      for (int ib = 0; ib < 16; ib++) begin
        a = data_t'(ia); b = data_t'(ib); tag_in = tag_t'(ia ^ ib);
        @(posedge clock); #1;
        checks++;
        if (p != 8'(ia * ib) || tag_out != tag_t'(ia ^ ib)) begin
          failures++;
          $display("FAIL %0d*%0d: p=%0d tag_out=%0d", ia, ib, p, tag_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
