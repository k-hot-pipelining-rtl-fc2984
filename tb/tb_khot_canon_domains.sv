// tb_khot_canon_domains: exhaustive check of the canonical five-stage domain
// decoder. All 32 control vectors are applied; for each, the expected latch,
// forwarding and branch enables are computed here from the sharing rules
// (latches: either neighbour on; forwarding and branch: both ends on). The two
// worked two-hot examples are checked by count as well: {0,0,1,1,0} powers
// three latch sets and one forwarding unit, {0,1,0,1,0} powers four latch sets.
module tb_khot_canon_domains;
  logic [4:0] stage_on, stage_pwr;
  logic [3:0] latch_pwr;
  logic [1:0] fwd_pwr;
  logic       branch_pwr;
  int checks = 0, failures = 0;
  bit finished = 0;

  khot_canon_domains dut (.stage_on, .stage_pwr, .latch_pwr, .fwd_pwr, .branch_pwr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stages by name, in the vector order {IF, ID, EX, MEM, WB}
  bit s_if, s_id, s_ex, s_mem, s_wb;
  logic [3:0] exp_l;
  logic [1:0] exp_f;

  initial begin
    for (int v = 0; v < 32; v++) begin
      stage_on = 5'(v);
      {s_if, s_id, s_ex, s_mem, s_wb} = 5'(v);
      exp_l = {s_if || s_id, s_id || s_ex, s_ex || s_mem, s_mem || s_wb};
      exp_f = {s_mem && s_ex, s_wb && s_ex};
      #1;
      check(stage_pwr == stage_on, "stage domains follow the vector");
      check(latch_pwr == exp_l, $sformatf("latches for %b: %b exp %b", stage_on, latch_pwr, exp_l));
      check(fwd_pwr == exp_f, $sformatf("forwarding for %b: %b exp %b", stage_on, fwd_pwr, exp_f));
      check(branch_pwr == (s_if && s_ex), $sformatf("branch for %b", stage_on));
    end
    stage_on = 5'b00110; #1;
    check($countones(latch_pwr) == 3 && $countones(fwd_pwr) == 1 && fwd_pwr[1], "example 00110");
    stage_on = 5'b01010; #1;
    check($countones(latch_pwr) == 4 && fwd_pwr == 2'b00, "example 01010");
    stage_on = 5'b11111; #1;
    check(latch_pwr == 4'hf && fwd_pwr == 2'b11 && branch_pwr, "full hot: everything on");
    finished = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    if (!finished) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
