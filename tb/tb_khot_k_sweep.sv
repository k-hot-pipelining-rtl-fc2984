// tb_khot_k_sweep: hotness sweep over the operating points of the seven-stage
// core and of the four-core system.
//
// Single core (khot_core_ctrl, default parameters): for k = 1..7 the vector is
// switched to k evenly spread bits and run for 20 full rotations. Checked per k:
//   - throughput is exactly k instructions per 7 cycles (k/m of full hot);
//   - each domain's on-cycles equal the count predicted from the vector and a
//     separate usage table (shared units are on more than k/m of the time);
// and a table of powered logic-domain cycles per instruction is printed.
// Four cores (khot_stagger_alloc, default parameters): for k = 1..4 per core,
// every core must get its k bits, the worst number of cores sharing a stage in
// any rotation must be ceil(4k/7), the lowest possible, and the per-stage sums
// must differ by at most one (minimal range of the control vector sum).
module tb_khot_k_sweep;
  import khot_pkg::*;
  localparam int N = 7;

  logic clk = 0, rst_n = 0, sw_req = 0;
  logic [N-1:0] sw_target = '0, cv, son;
  logic busy;
  logic [2:0] cnt;
  logic [NUM_GROUPS-1:0] grp;
  pwr_mode_e [NUM_DOMAINS-1:0] pm;
  logic [NUM_DOMAINS-1:0] ck;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  khot_core_ctrl dut (.clk, .rst_n, .adv(1'b1), .sw_req, .sw_target, .sw_any_phase(1'b0),
    .no_overshoot(1'b0), .drv_en(1'b1), .cg_mode(1'b0), .cv, .stage_on(son), .busy,
    .hot_cnt(cnt), .group_on(grp), .pwr_mode(pm), .clk_en(ck));

  logic start = 0, done, abusy;
  logic [3:0][2:0] k_req = '0;
  logic [3:0][N-1:0] vec;
  khot_stagger_alloc alloc (.clk, .rst_n, .start, .k_req, .vec, .busy(abusy), .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stage groups using each domain, bit order {WB, MEM, EXE, DEC, FETCH}
  function automatic logic [4:0] usage(int d);
    case (d)
      1, 2: return 5'b00101;  3, 5: return 5'b00001;  4, 6, 9: return 5'b01000;
      7: return 5'b10010;     8: return 5'b00011;     10: return 5'b10100;
      11: return 5'b01001;    default: return 5'b00000;
    endcase
  endfunction

  logic [N-1:0] t, r;
  int retired, on_cnt[NUM_DOMAINS], exp_cnt[NUM_DOMAINS], logic_on, mx, mn, s, tot;
  logic [4:0] g;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    $display(" k | instr/cycle | logic-domain on-cycles per instruction");
    for (int k = 1; k <= N; k++) begin
      t = '0;
      for (int i = 0; i < k; i++) t[N - 1 - (i * N) / k] = 1'b1;
      @(posedge clk); #1 sw_req = 1; sw_target = t;
      @(posedge clk); #1 sw_req = 0;
      while (busy) @(posedge clk);
      repeat (N) @(posedge clk);
      #1;
      // predicted on-cycles over one rotation
      for (int d = 0; d < NUM_DOMAINS; d++) begin
        exp_cnt[d] = 0;
        r = cv;
        for (int j = 0; j < N; j++) begin
          g = {r[0], r[2] | r[1], r[3], r[4], r[6] | r[5]};
          if (d == 0 || (g & usage(d)) != 0) exp_cnt[d]++;
          r = {r[0], r[N-1:1]};
        end
        on_cnt[d] = 0;
      end
      retired = 0;
      repeat (20 * N) begin
        @(negedge clk);
        retired += son[0];
        for (int d = 0; d < NUM_DOMAINS; d++) on_cnt[d] += ck[d];
      end
      check(retired == 20 * k, $sformatf("k=%0d: %0d instructions in %0d cycles", k, retired, 20 * N));
      logic_on = 0;
      for (int d = 0; d < NUM_DOMAINS; d++) begin
        check(on_cnt[d] == 20 * exp_cnt[d], $sformatf("k=%0d domain %0d on %0d cycles, expected %0d", k, d, on_cnt[d], 20 * exp_cnt[d]));
        if (d >= int'(D_IFU)) logic_on += on_cnt[d];
      end
      $display(" %0d |    %0d/7      | %0.2f", k, k, real'(logic_on) / real'(retired));
    end
    // four-core staggering for k = 1..4
    for (int k = 1; k <= 4; k++) begin
      @(posedge clk); #1 k_req = {4{3'(k)}}; start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) @(posedge clk);
      #1 mx = 0; mn = 4; tot = 0;
      for (int i = 0; i < N; i++) begin
        s = 0;
        for (int c = 0; c < 4; c++) s += vec[c][i];
        if (s > mx) mx = s;
        if (s < mn) mn = s;
        tot += s;
      end
      check(tot == 4 * k, $sformatf("four %0d-hot cores: %0d bits placed", k, tot));
      check(mx == (4 * k + N - 1) / N, $sformatf("four %0d-hot cores: %0d share a stage", k, mx));
      check(mx - mn <= 1, $sformatf("four %0d-hot cores: control vector sum range %0d", k, mx - mn));
      $display("four %0d-hot cores: at most %0d cores on the same stage (identical vectors: 4)", k, mx);
    end
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
