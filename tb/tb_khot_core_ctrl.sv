// tb_khot_core_ctrl: end-to-end check of one core's k-hot controller.
//
// Two controllers of the seven-stage core run side by side: one with zero
// power-gating latency and one with a latency of one cycle. Both are switched
// through random hotness targets while the pipeline randomly stalls. Checked:
//   - the vector reaches a rotation of the target within the switch bound and
//     then has exactly k bits set;
//   - an occupancy model that moves instructions with the vector never finds an
//     instruction in an unpowered stage (no state is lost on a switch);
//   - the domain outputs agree with the vector: the execution unit is clocked
//     exactly when execute or writeback is on, the I-cache exactly when a fetch
//     stage is on, and an idle register file sits at retention voltage;
//   - with latency, every domain that is clocked was already requested on in the
//     previous cycle.
module tb_khot_core_ctrl;
  import khot_pkg::*;
  localparam int N = 7;

  logic clk = 0, rst_n = 0, adv = 1, sw_req = 0, no_ov = 0;
  logic [N-1:0] sw_target = '0;
  logic [N-1:0] cv0, cv1, son0, son1;
  logic busy0, busy1;
  logic [2:0] cnt0, cnt1;
  logic [NUM_GROUPS-1:0] g0, g1;
  pwr_mode_e [NUM_DOMAINS-1:0] pm0, pm1;
  logic [NUM_DOMAINS-1:0] ck0, ck1, prev_on1;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;

  khot_core_ctrl dut0 (.clk, .rst_n, .adv, .sw_req, .sw_target, .sw_any_phase(no_ov), .no_overshoot(no_ov),
    .drv_en(1'b1), .cg_mode(1'b0), .cv(cv0), .stage_on(son0), .busy(busy0), .hot_cnt(cnt0),
    .group_on(g0), .pwr_mode(pm0), .clk_en(ck0));
  khot_core_ctrl #(.PG_LAT(1)) dut1 (.clk, .rst_n, .adv, .sw_req, .sw_target, .sw_any_phase(no_ov), .no_overshoot(no_ov),
    .drv_en(1'b1), .cg_mode(1'b0), .cv(cv1), .stage_on(son1), .busy(busy1), .hot_cnt(cnt1),
    .group_on(g1), .pwr_mode(pm1), .clk_en(ck1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  logic [N-1:0] occ0 = '0, occ1 = '0;
  int retired = 0, stalls = 0;

  always @(posedge clk) begin
    if (rst_n && adv) begin
      if (occ0[0]) retired++;
      occ0 <= {1'b0, occ0[N-1:1]};
      occ1 <= {1'b0, occ1[N-1:1]};
    end
    if (rst_n && !adv) stalls++;
  end
  // a new instruction enters fetch when the fetch slot is powered
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (son0[N-1]) occ0[N-1] = 1'b1;
    if (son1[N-1]) occ1[N-1] = 1'b1;
    check((occ0 & ~son0) == '0, "core 0: instruction in unpowered stage");
    check((occ1 & ~son1) == '0, "core 1: instruction in unpowered stage");
    check(ck0[D_EXEU] == (cv0[3] | cv0[0]), "EXEU clock follows execute/writeback");
    check(ck0[D_ICACHE] == (cv0[6] | cv0[5]), "I-cache clock follows fetch");
    check(pm0[D_RF] == ((cv0[4] | cv0[0]) ? PM_ON : PM_DRV), "register file power mode");
    for (int d = 0; d < NUM_DOMAINS; d++)
      if (ck1[d]) check(pm1[d] == PM_ON && prev_on1[d], $sformatf("latency core: domain %0d not awake", d));
    for (int d = 0; d < NUM_DOMAINS; d++) prev_on1[d] = (pm1[d] == PM_ON);
  end

  function automatic bit is_rotation(logic [N-1:0] a, logic [N-1:0] b);
    for (int r = 0; r < N; r++) begin
      if (a == b) return 1;
      a = {a[0], a[N-1:1]};
    end
    return 0;
  endfunction

  logic [N-1:0] t;
  int waited;
  initial begin
    prev_on1 = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      t = N'($urandom);
      no_ov = it[1];
      @(posedge clk); #1 sw_req = 1; sw_target = t;
      @(posedge clk); #1 sw_req = 0;
      waited = 0;
      while (busy0 || busy1) begin
        @(posedge clk); #1 adv = ($urandom_range(0, 4) != 0);
        waited++;
      end
      adv = 1;
      check(waited <= 6 * N, $sformatf("switch took %0d cycles", waited));
      check(is_rotation(cv0, t) && is_rotation(cv1, t), $sformatf("vector %b is not a rotation of %b", cv0, t));
      check(int'(cnt0) == $countones(t), "hot count equals k");
      repeat ($urandom_range(1, 2 * N)) @(posedge clk);
    end
    check(retired > 0 && stalls > 0, "instructions retired and stalls happened");
    $display("retired %0d instructions, %0d stall cycles", retired, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
