// tb_khot_core_domains: self-checking testbench of the twelve-domain power
// controller of the seven-stage core.
//
// A rotating control vector is generated here (with occasional hotness
// changes made, as in the real controller, only at the fetch position). Two
// instances see it: one with zero power-gating latency and one with a latency
// of two cycles.
//   - Zero latency: every domain's power mode and clock enable are compared
//     with an independent table of which stage groups use which domain, for
//     all settings of drv_en and cg_mode. In one-hot operation the execution
//     unit must be on two cycles per instruction (execute and writeback).
//   - Two-cycle latency: a domain must have been requested on for at least two
//     cycles before any cycle in which it is needed, and a request may only be
//     dropped when the domain is not needed for the next four cycles.
module tb_khot_core_domains;
  import khot_pkg::*;
  localparam int N = 7;
  localparam int L = 2;

  logic clk = 0, rst_n = 0, drv_en = 1, cg_mode = 0;
  logic [N-1:0] cv = '1, tgt = '1, la;
  logic [NUM_GROUPS-1:0] g0, g2;
  pwr_mode_e [NUM_DOMAINS-1:0] pm0, pm2;
  logic [NUM_DOMAINS-1:0] ck0, ck2;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;

  assign la = cv | tgt;
  khot_core_domains #(.N(N)) dut0 (.clk, .rst_n, .cv, .lookahead_vec(la), .drv_en, .cg_mode,
                                   .group_on(g0), .pwr_mode(pm0), .clk_en(ck0));
  khot_core_domains #(.N(N), .PG_LAT(L)) dut2 (.clk, .rst_n, .cv, .lookahead_vec(la), .drv_en(1'b1),
                                   .cg_mode(1'b0), .group_on(g2), .pwr_mode(pm2), .clk_en(ck2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // which stage groups use each domain: F D E M W
  function automatic bit uses(int d, bit f, bit de, bit e, bit m, bit w);
    case (d)
      1, 2:   return f || e;        // BP, BTB
      3, 5:   return f;             // I-cache, ITLB
      4, 6:   return m;             // D-cache, DTLB
      7:      return de || w;       // register file
      8:      return f || de;       // IFU
      9:      return m;             // LSU
      10:     return e || w;        // EXEU
      11:     return f || m;        // MMU
      default: return 1;
    endcase
  endfunction

  int exeu_on = 0, exeu_cnt = 0;
  bit one_hot_phase = 0;
  // request history of the latency instance, newest first
  bit req_hist[NUM_DOMAINS][L+1];
  bit need_hist[NUM_DOMAINS][2*L+1];
  bit drop_pending[NUM_DOMAINS][2*L+1];

  always @(negedge clk) if (rst_n) begin
    bit f, de, e, m, w, nd;
    pwr_mode_e exp;
    cycle++;
    f = cv[6] | cv[5]; de = cv[4]; e = cv[3]; m = cv[2] | cv[1]; w = cv[0];
    check(g0 == {w, m, e, de, f}, "stage groups");
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      nd = uses(d, f, de, e, m, w);
      if (d == 0)      exp = PM_ON;
      else if (d < 8)  exp = (nd || !drv_en) ? PM_ON : PM_DRV;
      else             exp = (nd || cg_mode) ? PM_ON : PM_OFF;
      check(pm0[d] == exp, $sformatf("domain %0d mode %s exp %s (cv=%b drv=%0d cg=%0d)", d, pm0[d].name(), exp.name(), cv, drv_en, cg_mode));
      check(ck0[d] == nd, $sformatf("domain %0d clock enable", d));
      // latency instance: needed now => requested on for the last L cycles too
      if (ck2[d]) begin
        bit ok;
        ok = (pm2[d] != PM_OFF && pm2[d] != PM_DRV);
        for (int j = 0; j < L; j++) ok &= req_hist[d][j];
        check(ok, $sformatf("domain %0d needed without %0d cycles of wake-up", d, L));
      end
    end
    if (one_hot_phase) begin
      exeu_on += ck0[D_EXEU];
      exeu_cnt++;
    end
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      // a request dropped at cycle t must see no need in t .. t+2L
      if (drop_pending[d][2*L]) check(1'b0, "unreachable");
      for (int j = 2*L; j > 0; j--) drop_pending[d][j] = drop_pending[d][j-1];
      drop_pending[d][0] = req_hist[d][0] && (pm2[d] != PM_ON);
      for (int j = 0; j <= 2*L; j++)
        if (drop_pending[d][j] && ck2[d])
          check(1'b0, $sformatf("domain %0d dropped %0d cycles before it was needed", d, j));
      for (int j = L; j > 0; j--) req_hist[d][j] = req_hist[d][j-1];
      req_hist[d][0] = (pm2[d] == PM_ON);
      drop_pending[d][2*L] = 0;
    end
  end

  // rotate, replacing only the fetch bit while a change is pending
  task automatic step();
    @(posedge clk);
    tgt <= {tgt[0], tgt[N-1:1]};
    cv  <= {tgt[0], cv[N-1:1]};
  endtask
  // plain rotation: a new target may not be applied during the first 2L cycles,
  // the time a domain that has just been released needs to turn off and on again
  task automatic rotate_only();
    @(posedge clk);
    tgt <= {tgt[0], tgt[N-1:1]};
    cv  <= {cv[0], cv[N-1:1]};
  endtask
  task automatic new_target(input logic [N-1:0] t);
    @(posedge clk);
    tgt <= t;
    cv  <= {cv[0], cv[N-1:1]};
    repeat (2 * L - 1) rotate_only();
  endtask

  initial begin
    foreach (req_hist[d, j]) req_hist[d][j] = 1'b1;
    foreach (drop_pending[d, j]) drop_pending[d][j] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int mode = 0; mode < 4; mode++) begin
      {drv_en, cg_mode} = 2'(mode);
      for (int it = 0; it < 6; it++) begin
        new_target(N'($urandom));
        repeat (3 * N) step();
      end
    end
    drv_en = 1; cg_mode = 0;
    // one-hot: execution unit on for two cycles per instruction
    new_target(7'b1000000);
    repeat (2 * N) step();
    one_hot_phase = 1;
    repeat (10 * N) step();
    @(negedge clk);
    one_hot_phase = 0;
    check(exeu_on == 20 && exeu_cnt >= 70, $sformatf("EXEU on %0d cycles for 10 instructions", exeu_on));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
