// tb_khot_throttle_sweep: up2k against avgk on a two-wide five-stage in-order
// pipeline with variable stage latency, at hotness k = 1..4, plus an
// unthrottled, always-powered baseline.
//
// khot_fetch_throttle and khot_pg_ctrl run at their default parameters (W = 2,
// five stages, T = 1) and control a behavioural pipeline in this testbench.
// Instructions move in groups of up to W; a group needs a latency-dependent
// number of cycles in each stage (execute sometimes 3 cycles, memory sometimes
// 10, drawn from a fixed hash of the instruction number so every run sees the
// same program) and moves on when the next stage is empty and powered. Each
// run retires NINSTR instructions from reset.
//
// Checked: no stage ever holds an instruction while its switch is open; up2k
// never has more than k instructions in the pipeline; every run finishes;
// performance degradation (cycles against the baseline) does not improve as k
// falls; avgk is at least as fast as up2k at each k, and over k = 1..4 up2k
// leaves more stage-cycles unpowered (at k = 1 avgk, which then fetches only
// into an idle pipeline, can save slightly more). The table printed gives degradation and the
// fraction of stage-cycles left unpowered, the measure these policies trade.
module tb_khot_throttle_sweep;
  import khot_pkg::*;
  localparam int NS = 5, W = 2, NINSTR = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  throttle_mode_e mode = TM_UP2K;
  logic [2:0] k = 3'd1;
  logic [NS-1:0][1:0] occ;
  logic [NS-1:0] hot_q = '0, occ_any, ready, pwr_en;
  logic [3:0] inflight;
  logic [2:0] hot_stages;
  logic fetch_cond;
  logic [1:0] fetch_cnt;

  khot_fetch_throttle thr (.mode, .k, .occ, .hot(hot_q), .fetch_on(ready[0]), .inflight,
    .hot_stages, .fetch_cond, .fetch_cnt);
  khot_pg_ctrl pg (.clk, .rst_n, .occ(occ_any), .fetch_cond, .stage_ready(ready), .pwr_en);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // fixed pseudo-random latency of instruction n in stage s
  function automatic int lat(int unsigned n, int s);
    int unsigned h;
    h = (n + 1) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    if (s == 2) return (h[1:0] == 2'd0) ? 3 : 1;
    if (s == 3) return (h[6:4] == 3'd0) ? 10 : 1;
    return 1;
  endfunction

  int pc[NS], rem[NS], first[NS];
  int next_id, retired, cycles, pwr_cycles, hot_cycles;
  bit running = 0, full = 0;
  logic [NS-1:0] hot;

  always_comb for (int s = 0; s < NS; s++) begin
    occ[s]     = 2'(pc[s]);
    occ_any[s] = (pc[s] != 0);
  end

  function automatic int group_lat(int s, int id0, int cnt);
    int l = 1;
    for (int i = 0; i < cnt; i++) if (lat(id0 + i, s) > l) l = lat(id0 + i, s);
    return l;
  endfunction

  // the model moves on the falling edge, so the controllers sample settled
  // occupancy on the rising edge
  always @(negedge clk) if (running) begin
    logic [NS-1:0] rdy;
    int fc;
    rdy = full ? '1 : ready;
    fc  = full ? ((next_id < NINSTR) ? W : 0) : int'(fetch_cnt);
    if (next_id + fc > NINSTR) fc = NINSTR - next_id;
    cycles++;
    for (int s = 0; s < NS; s++) pwr_cycles += full ? 1 : int'(pwr_en[s]);
    if (!full) begin
      for (int s = 0; s < NS; s++)
        check(pc[s] == 0 || pwr_en[s], $sformatf("stage %0d holds instructions unpowered", s));
      if (mode == TM_UP2K) check(inflight <= k, $sformatf("up2k: %0d in flight at k=%0d", inflight, k));
    end
    hot = '0;
    for (int s = NS - 1; s >= 0; s--) begin
      if (pc[s] > 0 && rdy[s]) begin
        if (rem[s] > 0) begin rem[s]--; hot[s] = 1'b1; end
        if (rem[s] == 0) begin
          if (s == NS - 1) begin retired += pc[s]; pc[s] = 0; end
          else if (pc[s+1] == 0 && rdy[s+1]) begin
            pc[s+1] = pc[s]; first[s+1] = first[s]; rem[s+1] = group_lat(s + 1, first[s], pc[s]);
            pc[s] = 0;
          end
        end
      end
    end
    if (pc[0] == 0 && fc > 0) begin
      pc[0] = fc; first[0] = next_id; rem[0] = 1; next_id += fc;
    end
    hot_cycles += $countones(hot);
    hot_q = hot;
  end

  int base_cycles, base_pwr;
  real deg[2][5], saved[2][5], hot_avg[2][5];

  task automatic run(input bit is_full, input throttle_mode_e md, input int kk, output int cyc, output int pwr, output int hc);
    @(posedge clk); #1 rst_n = 0; running = 0;
    @(posedge clk); #1;
    mode = md; k = 3'(kk); full = is_full;
    for (int s = 0; s < NS; s++) begin pc[s] = 0; rem[s] = 0; first[s] = 0; end
    next_id = 0; retired = 0; cycles = 0; pwr_cycles = 0; hot_cycles = 0; hot_q = '0;
    rst_n = 1; running = 1;
    while (retired < NINSTR && cycles < 100 * NINSTR) @(posedge clk);
    running = 0;
    check(retired == NINSTR, $sformatf("run mode=%0d k=%0d retired %0d of %0d", md, kk, retired, NINSTR));
    cyc = cycles; pwr = pwr_cycles; hc = hot_cycles;
  endtask

  initial begin
    int c, p, h;
    run(1'b1, TM_AVGK, 4, base_cycles, base_pwr, h);
    $display("baseline: %0d instructions in %0d cycles, all %0d stages always on", NINSTR, base_cycles, NS);
    $display("policy k | degradation | unpowered stage-cycles | hot stages per cycle");
    for (int md = 0; md < 2; md++)
      for (int kk = 1; kk <= 4; kk++) begin
        run(1'b0, throttle_mode_e'(md), kk, c, p, h);
        deg[md][kk]     = real'(c) / real'(base_cycles);
        saved[md][kk]   = 1.0 - real'(p) / real'(NS * c);
        hot_avg[md][kk] = real'(h) / real'(c);
        $display("%s  %0d |   %6.3f    |        %5.1f %%         | %0.2f",
                 md == 0 ? "up2k" : "avgk", kk, deg[md][kk], 100.0 * saved[md][kk], hot_avg[md][kk]);
      end
    for (int md = 0; md < 2; md++)
      for (int kk = 1; kk <= 4; kk++) begin
        check(deg[md][kk] >= 1.0, $sformatf("mode %0d k=%0d faster than the baseline", md, kk));
        if (kk < 4) check(deg[md][kk] >= deg[md][kk+1] * 0.99,
                          $sformatf("mode %0d: k=%0d faster than k=%0d", md, kk, kk + 1));
        if (md == 0) begin
          check(deg[1][kk] <= deg[0][kk] * 1.01, $sformatf("k=%0d: avgk slower than up2k", kk));
          check(hot_avg[0][kk] <= real'(kk), $sformatf("k=%0d: up2k averages %0.2f hot stages", kk, hot_avg[0][kk]));
        end
      end
    check(saved[0][1] + saved[0][2] + saved[0][3] + saved[0][4] >
          saved[1][1] + saved[1][2] + saved[1][3] + saved[1][4],
          "over k = 1..4, up2k leaves fewer stage-cycles unpowered than avgk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
