// tb_khot_mix_ctrl: self-checking testbench of the two-vector hotness mixer,
// driving a five-stage control vector register.
//
// Vector A is one-hot, vector B two-hot. Checked:
//   - requests alternate A, B, A, ... and each is issued exactly the dwell
//     time after the previous switch finished;
//   - the average number of powered stages lies between 1 and 2 and matches
//     the dwell-weighted mix (equal dwell: about 3/2; dwell 10/30: about 7/4)
//     within the share of switch periods;
//   - no instruction is ever in an unpowered stage;
//   - dropping en stops the requests.
module tb_khot_mix_ctrl;
  localparam int M = 5, N = 5;
  logic clk = 0, rst_n = 0, en = 0, busy, sw_req, phase_b;
  logic [N-1:0] vec_a = 5'b10000, vec_b = 5'b10100, sw_target, cv, tgt;
  logic [15:0] dwell_a = 16'd20, dwell_b = 16'd20;
  logic [M-1:0] son;
  logic [2:0] cnt;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;

  khot_mix_ctrl #(.N(N)) dut (.clk, .rst_n, .en, .vec_a, .vec_b, .dwell_a, .dwell_b, .busy,
                              .sw_req, .sw_target, .phase_b);
  khot_cv_reg #(.M(M), .N(N)) u_cv (.clk, .rst_n, .adv(1'b1), .sw_req, .sw_target, .sw_any_phase(1'b0),
                                    .no_overshoot(1'b0), .cv, .stage_on(son), .busy, .target(tgt), .hot_cnt(cnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  logic [M-1:0] occ = '0;
  int since_done = 0, nreq = 0, want_b = 0, on_sum = 0, samples = 0;
  logic prev_busy = 0;
  always @(posedge clk) if (rst_n) occ <= {1'b0, occ[M-1:1]};
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (son[M-1]) occ[M-1] = 1'b1;
    check((occ & ~son) == '0, "instruction in unpowered stage");
    on_sum += $countones(son);
    samples++;
    if (sw_req) begin
      check(sw_target == (want_b ? vec_b : vec_a), "requests alternate A and B");
      if (nreq > 0)
        check(since_done == (want_b ? int'(dwell_a) : int'(dwell_b)),
              $sformatf("dwell %0d cycles", since_done));
      want_b = !want_b;
      nreq++;
    end
    if (prev_busy && !busy) since_done = 0;
    else since_done++;
    prev_busy = busy;
  end

  task automatic run_mix(input int da, input int db, input real expect_avg, input int cycles);
    real avg;
    dwell_a = 16'(da); dwell_b = 16'(db);
    @(negedge clk); en = 1; want_b = 0; nreq = 0;
    repeat (60) @(posedge clk);          // settle into the pattern
    @(negedge clk); on_sum = 0; samples = 0;
    repeat (cycles) @(posedge clk);
    @(negedge clk);
    avg = real'(on_sum) / real'(samples);
    $display("dwell %0d/%0d: average powered stages %0.3f (mix %0.3f)", da, db, avg, expect_avg);
    check(avg > 1.0 && avg < 2.0, "average hotness lies between the two vectors");
    check(avg > expect_avg - 0.15 && avg < expect_avg + 0.15, "average hotness matches the dwell mix");
    check(nreq >= 4, "several switches happened");
    en = 0;
    repeat (40) @(posedge clk);
  endtask

  int nreq_before;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_mix(20, 20, 1.5, 2000);
    run_mix(10, 30, 1.75, 2000);
    nreq_before = nreq;
    repeat (100) @(posedge clk);
    check(nreq == nreq_before, "no requests while disabled");
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
