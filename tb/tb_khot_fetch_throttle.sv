// tb_khot_fetch_throttle: self-checking testbench of the up2k / avgk fetch
// throttle of a two-wide, five-stage pipeline.
//
// Random occupancies (0..2 instructions per stage, fetch included), hot flags and
// hotness values k = 0..5 are applied in both modes. For each, the expected
// in-flight count m, hot-stage count u, fetch condition and fetch count are
// computed here from the two policies:
//   up2k: fetch min(w, k - m) while m < k;
//   avgk: fetch min(w, w*k - m) while m < w*k and u < k;
// and nothing is fetched while the fetch stage is off. Corner cases (empty
// pipeline, full pipeline, k = 0) are applied explicitly.
module tb_khot_fetch_throttle;
  import khot_pkg::*;
  localparam int W = 2, NS = 5;

  throttle_mode_e mode;
  logic [2:0] k;
  logic [NS-1:0][1:0] occ;
  logic [NS-1:0] hot;
  logic fetch_on;
  logic [3:0] inflight;
  logic [2:0] hot_stages;
  logic fetch_cond;
  logic [1:0] fetch_cnt;
  int checks = 0, failures = 0;
  bit finished = 0;

  khot_fetch_throttle dut (.mode, .k, .occ, .hot, .fetch_on, .inflight, .hot_stages, .fetch_cond, .fetch_cnt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int m, u, cond, cnt, n_up = 0, n_avg = 0, n_block_u = 0;
  task automatic apply();
    #1;
    m = 0; u = 0;
    for (int s = 0; s < NS; s++) m += occ[s];
    for (int s = 0; s < NS; s++) u += hot[s];
    if (mode == TM_UP2K) begin
      cond = (m < k);
      cnt  = cond ? ((k - m < W) ? k - m : W) : 0;
    end else begin
      cond = (m < W * k) && (u < k);
      cnt  = cond ? ((W * k - m < W) ? W * k - m : W) : 0;
      if (m < W * k && u >= k) n_block_u++;
    end
    if (!fetch_on) cnt = 0;
    if (cnt > 0 && mode == TM_UP2K) n_up++;
    if (cnt > 0 && mode == TM_AVGK) n_avg++;
    check(int'(inflight) == m, "in-flight count");
    check(int'(hot_stages) == u, "hot-stage count");
    check(fetch_cond == 1'(cond), $sformatf("fetch condition mode=%s k=%0d m=%0d u=%0d", mode.name(), k, m, u));
    check(int'(fetch_cnt) == cnt, $sformatf("fetch count %0d exp %0d mode=%s k=%0d m=%0d u=%0d", fetch_cnt, cnt, mode.name(), k, m, u));
  endtask

  initial begin
    // corner cases
    for (int md = 0; md < 2; md++) begin
      mode = throttle_mode_e'(md);
      fetch_on = 1; hot = '0;
      for (int kv = 0; kv <= NS; kv++) begin
        k = 3'(kv);
        occ = '0;       apply();
        occ = {5{2'd2}}; apply();
      end
    end
    for (int it = 0; it < 4000; it++) begin
      mode = throttle_mode_e'($urandom_range(0, 1));
      k = 3'($urandom_range(0, NS));
      for (int s = 0; s < NS; s++) occ[s] = 2'($urandom_range(0, W));
      hot = NS'($urandom);
      fetch_on = ($urandom_range(0, 5) != 0);
      apply();
    end
    check(n_up > 0 && n_avg > 0 && n_block_u > 0, "both policies fetched; avgk hot-stage limit hit");
    finished = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!finished) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
