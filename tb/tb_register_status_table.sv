// Self-checking testbench for register_status_table. A shadow table of tags
// is updated with the rules: rename from destination_select, clear on LOAD,
// clear on a CDB tag match (with the write-back outputs naming the matching
// register). Directed steps cover renaming, a CDB match, a result whose
// register has since been renamed again (no match, newer tag kept), and
// renaming or LOAD in the same cycle as a CDB match on that register;
// random steps follow, keeping tags unique as the reservation stations do.
module tb_register_status_table;
  import tomasulo_pkg::*;

  logic clock = 0, reset = 1;
  dest_sel_t destination_sel;
  logic load_valid, select_data;
  regf_t load_dest;
  tag_t CDB_tag_compare;
  data_t CDB_result, temp_result;
  logic [RIDX_W-1:0] destination_result;
  reg_status_t temp_reg_status;
  tag_t model[NUM_REGS];
  int checks = 0, failures = 0;

  register_status_table dut (.clock, .reset, .destination_sel, .load_valid, .load_dest,
                             .CDB_tag_compare, .CDB_result, .select_data, .destination_result,
                             .temp_result, .temp_reg_status);

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

  function automatic bit tag_in_use(int t);
    foreach (model[r]) if (model[r] == tag_t'(t)) return 1;
    return 0;
  endfunction

  task automatic cycle(int dtag, int dreg, bit ld, int lreg, int ctag, int cval);
    int match;
    @(negedge clock);
    destination_sel.tag = tag_t'(dtag); destination_sel.dest = regf_t'(dreg);
    load_valid = ld; load_dest = regf_t'(lreg);
    CDB_tag_compare = tag_t'(ctag); CDB_result = data_t'(cval);
    #1;
    match = -1;
    if (ctag != 0) foreach (model[r]) if (model[r] == tag_t'(ctag)) match = r;
    check(select_data == (match >= 0), $sformatf("select_data=%0d for CDB tag %0d", select_data, ctag));
    if (match >= 0)
      check(destination_result == RIDX_W'(match) && temp_result == data_t'(cval),
            $sformatf("write-back to R%0d value %0d, expected R%0d %0d",
                      destination_result, temp_result, match, cval));
    if (match >= 0) model[match] = '0;
    if (ld) model[lreg] = '0;
    if (dtag != 0) model[dreg] = tag_t'(dtag);
    @(posedge clock); #1;
    foreach (model[r])
      check(temp_reg_status[r] == model[r],
            $sformatf("R%0d tag %0d expected %0d", r, temp_reg_status[r], model[r]));
  endtask

  initial begin
    destination_sel = '0; load_valid = 0; load_dest = 0; CDB_tag_compare = 0; CDB_result = 0;
    foreach (model[r]) model[r] = '0;
    repeat (2) @(posedge clock);
    reset = 0;
    cycle(1, 2, 0, 0, 0, 0);   // ADD R2 takes tag 1
    cycle(2, 3, 0, 0, 0, 0);   // SUB R3 takes tag 2
    cycle(3, 5, 0, 0, 0, 0);   // ADD R5 takes tag 3
    cycle(0, 0, 0, 0, 1, 6);   // tag 1 on the CDB: R2 written and cleared
    cycle(4, 3, 0, 0, 0, 0);   // R3 renamed again to tag 4 (WAW)
    cycle(0, 0, 0, 0, 2, 9);   // old producer of R3 finishes: no match
    cycle(1, 5, 0, 0, 3, 4);   // R5 renamed to tag 1 while tag 3 completes
    cycle(0, 0, 1, 3, 4, 8);   // LOAD R3 and tag 4 completes in the same cycle
    cycle(0, 0, 1, 5, 0, 0);   // LOAD clears R5's pending tag
    for (int i = 0; i < 400; i++) begin
      int dt, ct;
      dt = $urandom_range(1, 5);
      if (tag_in_use(dt) || $urandom_range(0, 2) == 0) dt = 0;
      ct = $urandom_range(0, 5);
      cycle(dt, $urandom_range(0, 7), $urandom_range(0, 5) == 0, $urandom_range(0, 7), ct,
            $urandom_range(0, 15));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
