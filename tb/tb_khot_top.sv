// tb_khot_top: end-to-end testbench of the whole design at its default sizes
// (four seven-stage cores, canonical five-stage pipeline, two-wide five-stage
// throttled pipeline).
//
// Multi-core part: the cores first run identical one-hot vectors (direct
// writes), then the staggering allocator is run for one-hot and two-hot cores.
// For each configuration the testbench measures, per cycle, how many cores
// have the same pipeline stage on, and checks that staggering lowers the worst
// case (identical one-hot vectors: four; staggered one-hot: one; staggered
// two-hot, eight bits over seven stages: two). Occupancy models check that no core ever holds an
// instruction in an unpowered stage across switches and stalls, and each
// core's execution-unit clock is checked against its vector. Retention and
// clock-gating modes are switched and checked on the register file and EXEU.
// Canonical part: the vector is switched through random hotness values and the
// latch, forwarding and branch enables are checked against the sharing rules;
// then the mixer alternates one-hot and two-hot vectors.
// Throttled part: a behavioural pipeline with random stage latencies and
// squashes runs under up2k and avgk for k = 1..4; once settled, up2k must never have more
// than k instructions in the pipeline (so never more than k busy stages),
// avgk never more than 2k, and no stage may
// hold instructions while unpowered.
// After the one-hot allocation each core is raised by one bit at run time; the
// control vector sum must stay within one of even and the worst stage count
// must be 2; a request during a switch must be refused.
// Each mechanism (allocation, increment, refused increment, switch,
// no-overshoot switch, stall, mixing, retention,
// clock-gating mode, up2k limit, avgk hot-stage limit, squash, wake-up wait)
// is counted and must occur at least once.
module tb_khot_top;
  import khot_pkg::*;
  localparam int C = 4, N = 7, CN = 5, NS = 5, W = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // multi-core
  logic [C-1:0] mc_adv = '1, mc_sw_req = '0;
  logic mc_start = 0, mc_any_phase = 0, mc_no_overshoot = 0, mc_drv_en = 1, mc_cg_mode = 0;
  logic mc_inc = 0, mc_inc_taken;
  logic [1:0] mc_inc_core = '0;
  logic [C-1:0][2:0] mc_k = '0, mc_hot_cnt;
  logic [C-1:0][N-1:0] mc_sw_target = '0, mc_cv;
  logic [C-1:0] mc_busy;
  logic [C-1:0][NUM_GROUPS-1:0] mc_group_on;
  pwr_mode_e [C-1:0][NUM_DOMAINS-1:0] mc_pwr_mode;
  logic [C-1:0][NUM_DOMAINS-1:0] mc_clk_en;
  logic mc_alloc_busy, mc_alloc_done;
  // canonical
  logic cn_adv = 1, cn_sw_req = 0, cn_any_phase = 0, cn_no_overshoot = 0, cn_busy, cn_branch_pwr;
  logic [CN-1:0] cn_sw_target = '0, cn_cv;
  logic cn_mix_en = 0, cn_mix_phase_b;
  logic [CN-1:0] cn_mix_vec_a = 5'b10000, cn_mix_vec_b = 5'b10010;
  logic [15:0] cn_mix_dwell_a = 16'd12, cn_mix_dwell_b = 16'd12;
  logic [2:0] cn_hot_cnt;
  logic [4:0] cn_stage_pwr;
  logic [3:0] cn_latch_pwr;
  logic [1:0] cn_fwd_pwr;
  // throttled
  throttle_mode_e cx_mode = TM_UP2K;
  logic [2:0] cx_k = 3'd1, cx_hot_stages;
  logic [NS-1:0][1:0] cx_occ;
  logic [NS-1:0] cx_hot = '0, cx_stage_ready, cx_pwr_en;
  logic [1:0] cx_fetch_cnt;
  logic cx_fetch_cond;
  logic [3:0] cx_inflight;

  khot_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // mechanism counters
  int n_alloc = 0, n_switch = 0, n_noov = 0, n_stall = 0, n_drv = 0, n_cg = 0;
  int n_mix = 0, n_inc = 0, n_inc_refused = 0;
  int n_up2k_limit = 0, n_avgk_ulimit = 0, n_squash = 0, n_pwait = 0, n_retired = 0;

  // ---------------- multi-core checks ----------------
  logic [C-1:0][N-1:0] occ = '0;
  int max_fetch_cores;   // worst number of cores with the same stage on in one cycle
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < C; c++) if (mc_adv[c]) occ[c] <= {1'b0, occ[c][N-1:1]};
    n_stall += (mc_adv != '1);
    n_drv   += mc_drv_en && (mc_pwr_mode[0][D_RF] == PM_DRV);
    n_cg    += mc_cg_mode && (mc_pwr_mode[0][D_EXEU] == PM_ON) && !mc_clk_en[0][D_EXEU];
  end
  always @(negedge clk) if (rst_n) begin
    int f;
    cycle++;
    f = 0;
    for (int c = 0; c < C; c++) begin
      if (mc_cv[c][N-1]) occ[c][N-1] = 1'b1;
      check((occ[c] & ~mc_cv[c]) == '0, $sformatf("core %0d: instruction in unpowered stage", c));
      check(mc_clk_en[c][D_EXEU] == (mc_cv[c][3] | mc_cv[c][0]), "EXEU clock enable");
      check(mc_pwr_mode[c][D_RF] == ((mc_cv[c][4] | mc_cv[c][0] | !mc_drv_en) ? PM_ON : PM_DRV), "RF mode");
      check(mc_pwr_mode[c][D_EXEU] == ((mc_cv[c][3] | mc_cv[c][0] | mc_cg_mode) ? PM_ON : PM_OFF), "EXEU mode");
    end
    for (int i = 0; i < N; i++) begin
      f = 0;
      for (int c = 0; c < C; c++) f += mc_cv[c][i];
      if (f > max_fetch_cores) max_fetch_cores = f;
    end
    // canonical checks
    check(cn_stage_pwr == cn_cv[4:0], "canonical stage enables");
    check(cn_latch_pwr == {cn_cv[4] | cn_cv[3], cn_cv[3] | cn_cv[2], cn_cv[2] | cn_cv[1], cn_cv[1] | cn_cv[0]}, "canonical latches");
    check(cn_fwd_pwr == {cn_cv[1] & cn_cv[2], cn_cv[0] & cn_cv[2]} && cn_branch_pwr == (cn_cv[4] & cn_cv[2]), "canonical fwd/branch");
  end

  task automatic mc_write_all(input logic [N-1:0] t);
    @(posedge clk); #1 for (int c = 0; c < C; c++) begin mc_sw_req[c] = 1; mc_sw_target[c] = t; end
    @(posedge clk); #1 mc_sw_req = '0;
    while (mc_busy != '0) @(posedge clk);
    n_switch++;
  endtask

  task automatic mc_alloc(input int k);
    @(posedge clk); #1 for (int c = 0; c < C; c++) mc_k[c] = 3'(k); mc_start = 1;
    @(posedge clk); #1 mc_start = 0;
    while (!mc_alloc_done) @(posedge clk);
    @(posedge clk);
    while (mc_busy != '0) @(posedge clk);
    n_alloc++;
    for (int c = 0; c < C; c++) check(int'(mc_hot_cnt[c]) == k, $sformatf("core %0d has %0d bits after allocation", c, mc_hot_cnt[c]));
  endtask

  // raise one core by a bit; returns whether the request was taken
  task automatic mc_raise(input int c, output bit taken);
    @(posedge clk); #1 mc_inc = 1; mc_inc_core = 2'(c);
    #1 taken = mc_inc_taken;
    @(posedge clk); #1 mc_inc = 0;
  endtask

  task automatic measure(output int worst);
    @(negedge clk); max_fetch_cores = 0;
    repeat (3 * N) @(posedge clk);
    @(negedge clk); worst = max_fetch_cores;
  endtask

  // ---------------- throttled pipeline model ----------------
  int pc[NS];
  int settle = 100;   // cycles since the throttle setting last changed
  always_comb for (int s = 0; s < NS; s++) cx_occ[s] = 2'(pc[s]);
  always @(posedge clk) if (rst_n) begin
    int m;
    bit linger;
    logic [NS-1:0] hot;
    hot = '0;
    m = 0;
    for (int s = 0; s < NS; s++) m += pc[s];
    if (cx_mode == TM_UP2K && !cx_fetch_cond && cx_stage_ready[0]) n_up2k_limit++;
    if (cx_mode == TM_AVGK && m < W * cx_k && cx_hot_stages >= cx_k) n_avgk_ulimit++;
    if ($urandom_range(0, 80) == 0 && m > 0) begin
      for (int s = 1; s < NS; s++) pc[s] = 0;
      n_squash++;
    end else begin
      if (pc[NS-1] > 0 && cx_stage_ready[NS-1] && $urandom_range(0, 3) != 0) begin
        n_retired += pc[NS-1];
        pc[NS-1] = 0;
        hot[NS-1] = 1;
      end
      for (int s = NS - 2; s >= 0; s--) begin
        linger = ($urandom_range(0, 3) == 0);
        if (pc[s] > 0 && cx_stage_ready[s] && !linger && pc[s+1] == 0) begin
          if (cx_stage_ready[s+1]) begin
            pc[s+1] = pc[s]; pc[s] = 0; hot[s] = 1;
          end else n_pwait++;
        end
      end
    end
    if (pc[0] == 0 && cx_fetch_cnt != 0) begin pc[0] = int'(cx_fetch_cnt); hot[0] = 1; end
    cx_hot <= hot;
  end
  always @(negedge clk) if (rst_n) begin
    int m, busy_st;
    m = 0; busy_st = 0;
    for (int s = 0; s < NS; s++) begin m += pc[s]; busy_st += (pc[s] != 0); end
    for (int s = 0; s < NS; s++) check(pc[s] == 0 || cx_pwr_en[s], $sformatf("throttled stage %0d unpowered with instructions", s));
    settle++;
    if (settle < 40) ;
    else if (cx_mode == TM_UP2K) check(m <= cx_k && busy_st <= cx_k, $sformatf("up2k bound: m=%0d k=%0d", m, cx_k));
    else check(m <= W * cx_k, $sformatf("avgk bound: m=%0d k=%0d", m, cx_k));
  end

  logic prev_phase = 0;
  int worst_same, worst_stag, worst_stag2, worst_inc, r0, lat;
  bit taken;
  logic [CN-1:0] t;
  initial begin
    for (int s = 0; s < NS; s++) pc[s] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    fork
      // multi-core sequence
      begin
        mc_write_all(7'b1000000);                 // identical one-hot vectors
        measure(worst_same);
        check(worst_same == C, $sformatf("identical vectors: %0d cores share a stage", worst_same));
        mc_alloc(1);                              // staggered one-hot
        measure(worst_stag);
        check(worst_stag == 1, $sformatf("staggered one-hot: %0d cores share a stage", worst_stag));
        // run-time increments: one more bit per core where the sum is lowest
        for (int c = 0; c < C; c++) begin
          mc_raise(c, taken);
          check(taken, $sformatf("increment of core %0d taken", c));
          if (c == 0) begin
            // a second request while core 0 is still switching must be refused
            @(negedge clk);
            if (mc_busy != '0) begin
              mc_raise(1, taken);
              check(!taken, "increment refused during a switch");
              n_inc_refused++;
            end
          end
          while (mc_busy != '0) @(posedge clk);
          #1 check(int'(mc_hot_cnt[c]) == 2, $sformatf("core %0d has %0d bits after increment", c, mc_hot_cnt[c]));
          n_inc++;
        end
        measure(worst_inc);
        check(worst_inc == 2, $sformatf("after increments: %0d cores share a stage", worst_inc));
        for (int i = 0; i < N; i++) begin
          int s;
          s = 0;
          for (int c = 0; c < C; c++) s += mc_cv[c][i];
          check(s >= 1 && s <= 2, $sformatf("after increments: column %0d sum %0d", i, s));
        end
        mc_alloc(2);                              // staggered two-hot
        measure(worst_stag2);
        check(worst_stag2 == 2, $sformatf("staggered two-hot: %0d cores share a stage", worst_stag2));
        // per-core stalls desynchronise nothing that matters for correctness
        repeat (20) begin @(posedge clk); #1 mc_adv = C'($urandom); end
        mc_adv = '1;
        mc_no_overshoot = 1; mc_any_phase = 1;
        for (int i = 0; i < 6; i++) begin mc_write_all(N'($urandom)); n_noov++; end
        mc_no_overshoot = 0; mc_any_phase = 0;
        mc_drv_en = 1; mc_cg_mode = 1;
        mc_write_all(7'b0010000);
        repeat (2 * N) @(posedge clk);
        mc_cg_mode = 0; mc_drv_en = 0;
        repeat (2 * N) @(posedge clk);
        mc_drv_en = 1;
        repeat (2 * N) @(posedge clk);
      end
      // canonical sequence
      begin
        for (int i = 0; i < 30; i++) begin
          t = CN'($urandom);
          cn_no_overshoot = i[0];
          cn_any_phase = i[1];
          @(posedge clk); #1 cn_sw_req = 1; cn_sw_target = t;
          @(posedge clk); #1 cn_sw_req = 0; lat = 0;
          while (cn_busy) begin @(posedge clk); #1 cn_adv = ($urandom_range(0, 4) != 0); lat++; end
          cn_adv = 1;
          check(int'(cn_hot_cnt) == $countones(t), "canonical hotness after switch");
          repeat (CN) @(posedge clk);
        end
        // fractional hotness: alternate one-hot and two-hot
        @(posedge clk); #1 cn_mix_en = 1;
        repeat (300) begin
          @(posedge clk); #1
          if (cn_mix_phase_b && !prev_phase) n_mix++;
          prev_phase = cn_mix_phase_b;
          if (n_mix > 0)   // once the first B phase has begun
            check(int'(cn_hot_cnt) <= 3, "mixed hotness never above one more than vector B");
        end
        cn_mix_en = 0;
      end
      // throttled sequence
      begin
        for (int md = 0; md < 2; md++)
          for (int k = 1; k <= 4; k++) begin
            @(posedge clk); #1 cx_mode = throttle_mode_e'(md); cx_k = 3'(k); settle = 0;
            r0 = n_retired;
            repeat (400) @(posedge clk);
            check(n_retired > r0, $sformatf("throttled pipeline retires (mode %0d k %0d)", md, k));
          end
      end
    join

    $display("mix %0d increments %0d (refused %0d)", n_mix, n_inc, n_inc_refused);
    $display("alloc %0d switch %0d no-overshoot %0d stall %0d drv %0d cg %0d up2k-limit %0d avgk-ulimit %0d squash %0d wake-wait %0d retired %0d",
             n_alloc, n_switch, n_noov, n_stall, n_drv, n_cg, n_up2k_limit, n_avgk_ulimit, n_squash, n_pwait, n_retired);
    check(n_alloc > 0, "allocation happened");
    check(n_inc > 0, "run-time increment happened");
    check(n_inc_refused > 0, "refused increment happened");
    check(n_switch > 0, "switch happened");
    check(n_noov > 0, "no-overshoot switch happened");
    check(n_stall > 0, "stall happened");
    check(n_drv > 0, "retention mode happened");
    check(n_cg > 0, "clock-gating mode happened");
    check(n_mix > 2, "hotness mixing happened");
    check(n_up2k_limit > 0, "up2k limit happened");
    check(n_avgk_ulimit > 0, "avgk hot-stage limit happened");
    check(n_squash > 0, "squash happened");
    check(n_pwait > 0, "wake-up wait happened");
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
