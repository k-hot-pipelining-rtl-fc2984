// tb_khot_pg_ctrl: self-checking testbench of the latency-aware stage power
// gating, with a behavioural two-wide, five-stage pipeline around it.
//
// The pipeline model moves a stage's instructions to the next stage when that
// stage is powered and empty; stages randomly take extra cycles (variable
// latency), branches randomly squash the pipeline, and fetch follows the up2k
// rule (at most k instructions beyond fetch). Power switches take T = 2 cycles.
// Checked every cycle:
//   - a stage that holds instructions always has its power switch enabled
//     (nothing is lost);
//   - a stage becomes usable exactly T cycles after its switch turns on; its
//     switch opens when it stops being usable, and it is not switched on again
//     until the T-cycle power-down has passed;
//   - the pipeline keeps retiring instructions (no deadlock).
// Also counted, and required to happen: wake-ups, power-downs, waits for a
// stage that was still waking (power stalls), squashes, and for k = 1 fewer
// powered stage-cycles than stage-cycles.
module tb_khot_pg_ctrl;
  localparam int NS = 5, W = 2, T = 2;

  logic clk = 0, rst_n = 0;
  logic [NS-1:0] occ, ready, pwr_en, prev_ready = '0, prev_pwr = '0;
  logic fetch_cond;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;

  khot_pg_ctrl #(.NS(NS), .T(T)) dut (.clk, .rst_n, .occ, .fetch_cond, .stage_ready(ready), .pwr_en);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  int cnt[NS];
  int k = 1, retired = 0, wakes = 0, sleeps = 0, pstalls = 0, squashes = 0;
  int on_since[NS], off_since[NS], powered = 0, stage_cycles = 0, last_retire = 0;

  always_comb begin
    int m;
    m = 0;
    for (int s = 1; s < NS; s++) m += cnt[s];
    for (int s = 0; s < NS; s++) occ[s] = (cnt[s] != 0);
    fetch_cond = (m < k);
  end

  // pipeline model, evaluated on the values seen before the clock edge
  always @(posedge clk) if (rst_n) begin
    int m;
    bit linger;
    m = 0;
    for (int s = 1; s < NS; s++) m += cnt[s];
    if ($urandom_range(0, 60) == 0 && m > 0) begin
      for (int s = 1; s < NS; s++) cnt[s] = 0;
      squashes++;
    end else begin
      if (cnt[NS-1] > 0 && ready[NS-1] && $urandom_range(0, 3) != 0) begin
        retired += cnt[NS-1];
        cnt[NS-1] = 0;
        last_retire = cycle;
      end
      for (int s = NS - 2; s >= 0; s--) begin
        linger = ($urandom_range(0, 3) == 0);
        if (cnt[s] > 0 && ready[s] && !linger && cnt[s+1] == 0) begin
          if (ready[s+1]) begin
            cnt[s+1] = cnt[s];
            cnt[s]   = 0;
          end else pstalls++;
        end
      end
    end
    if (ready[0] && cnt[0] == 0 && m < k) cnt[0] = (k - m < W) ? k - m : W;
  end

  always @(negedge clk) if (rst_n) begin
    cycle++;
    for (int s = 0; s < NS; s++) begin
      check(cnt[s] == 0 || pwr_en[s], $sformatf("stage %0d holds instructions while unpowered", s));
      if (pwr_en[s] && !prev_pwr[s]) begin
        if (sleeps > 0) check(off_since[s] >= T, $sformatf("stage %0d woke %0d cycles after power-down", s, off_since[s]));
        on_since[s] = 0;
        wakes++;
      end
      if (!ready[s] && prev_ready[s]) begin off_since[s] = 0; sleeps++; end
      if (ready[s] && !prev_ready[s]) check(on_since[s] == T, $sformatf("stage %0d wake-up took %0d", s, on_since[s]));
      if (!ready[s] && prev_ready[s]) check(!pwr_en[s], $sformatf("stage %0d switch still closed at power-down", s));
      on_since[s]++;
      off_since[s]++;
      powered += pwr_en[s];
      stage_cycles++;
    end
    prev_ready = ready;
    prev_pwr   = pwr_en;
    check(cycle - last_retire < 200, "pipeline stopped retiring");
  end

  int pw1, sc1;
  initial begin
    for (int s = 0; s < NS; s++) cnt[s] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (k = 1; k <= 4; k++) begin
      powered = 0; stage_cycles = 0;
      repeat (1500) @(posedge clk);
      if (k == 1) begin pw1 = powered; sc1 = stage_cycles; end
      $display("k=%0d: powered %0d of %0d stage-cycles", k, powered, stage_cycles);
    end
    check(pw1 < sc1, "k = 1 saves power");
    check(wakes > 0 && sleeps > 0 && pstalls > 0 && squashes > 0 && retired > 0,
          $sformatf("mechanisms: wakes %0d sleeps %0d stalls %0d squashes %0d retired %0d", wakes, sleeps, pstalls, squashes, retired));
    $display("wakes %0d sleeps %0d power stalls %0d squashes %0d retired %0d", wakes, sleeps, pstalls, squashes, retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
