// tb_khot_cv_reg: self-checking testbench of the rotating control vector.
//
// Two instances run side by side: a plain five-bit vector for a five-stage
// pipeline (M = N = 5) and an extended eight-bit vector (M = 5, N = 8). A
// reference model, written separately here, predicts the vector every cycle:
// rotation towards the back of the pipeline, a pending target rotating in
// lockstep, and replacement of only the bit entering fetch. On top of the
// exact comparison the testbench checks:
//   - reset gives the full-hot vector;
//   - a one-hot vector powers exactly one stage per cycle and retires one
//     instruction every N cycles;
//   - no in-flight instruction ever sits in an unpowered stage (an occupancy
//     model moves instructions with the vector), including across switches;
//   - a switch finishes within N advancing cycles, or 2N without overshoot,
//     and without overshoot the set-bit count never exceeds max(old, new);
//   - a stall (adv low) freezes the vector;
//   - with sw_any_phase the target rotation chosen is the one a plain switch
//     would finish soonest (found here by trying every rotation);
//   - on the extended vector each stage is on k/N of the time.
module tb_khot_cv_reg;
  localparam int M  = 5;
  localparam int NA = 5;
  localparam int NB = 8;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, no_ov = 1'b0, anyp = 1'b0;
  logic req_a = 1'b0, req_b = 1'b0;
  logic [NA-1:0] tgt_a = '0, cv_a, target_a;
  logic [NB-1:0] tgt_b = '0, cv_b, target_b;
  logic [M-1:0]  son_a, son_b;
  logic busy_a, busy_b;
  logic [$clog2(NA+1)-1:0] cnt_a;
  logic [$clog2(NB+1)-1:0] cnt_b;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  khot_cv_reg #(.M(M), .N(NA)) dut_a (
    .clk, .rst_n, .adv, .sw_req(req_a), .sw_target(tgt_a), .sw_any_phase(anyp), .no_overshoot(no_ov),
    .cv(cv_a), .stage_on(son_a), .busy(busy_a), .target(target_a), .hot_cnt(cnt_a));
  khot_cv_reg #(.M(M), .N(NB)) dut_b (
    .clk, .rst_n, .adv, .sw_req(req_b), .sw_target(tgt_b), .sw_any_phase(anyp), .no_overshoot(no_ov),
    .cv(cv_b), .stage_on(son_b), .busy(busy_b), .target(target_b), .hot_cnt(cnt_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference model (instance A and B share the code) ----------------
  int unsigned rcv[2], rtgt[2], rlim[2];
  bit          rbusy[2];
  int unsigned occ[2];          // in-flight instructions, one bit per stage
  int          retired[2];

  function automatic int unsigned rotr(int unsigned v, int n);
    return (v >> 1) | ((v & 1) << (n - 1));
  endfunction
  function automatic int pc(int unsigned v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += (v >> i) & 1;
    return c;
  endfunction

  // rotations a plain switch from vector v to target t needs
  function automatic int sim_len(int unsigned v, int unsigned t, int n);
    int len = 0;
    while (v != t && len < 4 * n) begin
      v = rotr(v, n);
      t = rotr(t, n);
      if ((t >> (M-1)) & 1) v |= (1 << (M-1)); else v &= ~(1 << (M-1));
      len++;
    end
    return len;
  endfunction

  int n_faster = 0;
  task automatic ref_step(int i, int n, bit req, int unsigned newt);
    int unsigned r, t, v, cand, best;
    int bl, cl;
    if (req && anyp) begin
      // try every rotation of the target, keep the quickest (first on ties)
      v = adv ? rotr(rcv[i], n) : rcv[i];
      cand = newt; best = newt;
      bl = sim_len(v, adv ? rotr(newt, n) : newt, n);
      for (int k = 1; k < n; k++) begin
        cand = rotr(cand, n);
        cl = sim_len(v, adv ? rotr(cand, n) : cand, n);
        if (cl < bl) begin bl = cl; best = cand; end
      end
      if (best != newt) n_faster++;
      newt = best;
    end
    if (req) begin
      rlim[i] = (pc(rcv[i]) > pc(newt)) ? pc(rcv[i]) : pc(newt);
      rbusy[i] = 1;
      if (adv) begin rcv[i] = rotr(rcv[i], n); rtgt[i] = rotr(newt, n); end
      else rtgt[i] = newt;
    end else if (adv) begin
      r = rotr(rcv[i], n);
      t = rotr(rtgt[i], n);
      if (rbusy[i]) begin
        if (((t >> (M-1)) & 1) == 0) r &= ~(1 << (M-1));
        else if (!no_ov || pc(r) < rlim[i]) r |= (1 << (M-1));
      end
      rcv[i] = r; rtgt[i] = t;
      if (rbusy[i] && r == t) rbusy[i] = 0;
    end else if (rbusy[i] && rcv[i] == rtgt[i]) rbusy[i] = 0;
    if (adv) begin
      // instructions advance with the vector; the last stage retires
      if (occ[i] & 1) retired[i]++;
      occ[i] = occ[i] >> 1;
      if ((rcv[i] >> (M-1)) & 1) occ[i] |= (1 << (M-1));
    end
  endtask

  // apply the reference on every clock edge, then compare after the edge
  always @(posedge clk) begin
    if (!rst_n) begin
      rcv[0] = 32'h1f; rtgt[0] = 32'h1f; rbusy[0] = 0; occ[0] = 0;
      rcv[1] = 32'hff; rtgt[1] = 32'hff; rbusy[1] = 0; occ[1] = 0;
    end else begin
      ref_step(0, NA, req_a, tgt_a);
      ref_step(1, NB, req_b, tgt_b);
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(cv_a == NA'(rcv[0]), $sformatf("A cv %b exp %b", cv_a, NA'(rcv[0])));
    check(cv_b == NB'(rcv[1]), $sformatf("B cv %b exp %b", cv_b, NB'(rcv[1])));
    check(busy_a == rbusy[0] && busy_b == rbusy[1], "busy flag");
    check(int'(cnt_a) == pc(rcv[0]) && int'(cnt_b) == pc(rcv[1]), "hot count");
    // every in-flight instruction sits in a powered stage
    check((occ[0] & ~32'(son_a)) == 0, $sformatf("A instruction in unpowered stage occ=%b on=%b", occ[0], son_a));
    check((occ[1] & ~32'(son_b)) == 0, $sformatf("B instruction in unpowered stage occ=%b on=%b", occ[1], son_b));
    if (no_ov && busy_a) check(int'(cnt_a) <= int'(rlim[0]), "A overshoot");
    if (no_ov && busy_b) check(int'(cnt_b) <= int'(rlim[1]), "B overshoot");
  end

  // ---------------- stimulus ----------------
  task automatic switch_a(input logic [NA-1:0] t, output int lat);
    @(posedge clk); #1 req_a = 1; tgt_a = t;
    @(posedge clk); #1 req_a = 0;
    lat = 0;
    while (busy_a) begin @(posedge clk); #1 if (adv) lat++; end
  endtask
  task automatic switch_b(input logic [NB-1:0] t, output int lat);
    @(posedge clk); #1 req_b = 1; tgt_b = t;
    @(posedge clk); #1 req_b = 0;
    lat = 0;
    while (busy_b) begin @(posedge clk); #1 if (adv) lat++; end
  endtask

  int lat, r0, on_cnt[M], nsw_fast = 0, nsw_slow = 0, nstall = 0;
  logic [NA-1:0] held;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(cv_a == '1 && cv_b == '1, "reset value is full hot");
    adv = 1;
    repeat (4) @(posedge clk);

    // full hot -> one hot, then measure the instruction rate
    switch_a(5'b10000, lat);
    check(lat <= NA, $sformatf("switch latency %0d > N", lat));
    r0 = retired[0];
    repeat (NA * 8) begin
      @(posedge clk); #1 check($countones(son_a) == 1, "one-hot: exactly one stage on");
    end
    check(retired[0] - r0 == 8, $sformatf("one-hot retires 1 per %0d cycles (got %0d in %0d)", NA, retired[0]-r0, NA*8));

    // stall freezes the vector
    @(posedge clk); #1 adv = 0; held = cv_a;
    repeat (6) begin @(posedge clk); #1 check(cv_a == held, "stall holds vector"); nstall++; end
    adv = 1;

    // random switches, with and without overshoot protection, random stalls
    for (int it = 0; it < 60; it++) begin
      no_ov = it[0];
      anyp  = it[1];
      fork
        begin
          switch_a(NA'($urandom), lat);
          check(lat <= (no_ov ? 2*NA : NA) + 1, $sformatf("A switch latency %0d", lat));
        end
        begin
          repeat ($urandom_range(2, 12)) begin
            @(posedge clk); #1 adv = ($urandom_range(0, 3) != 0);
          end
          adv = 1;
        end
      join
      if (no_ov) nsw_slow++; else nsw_fast++;
      repeat ($urandom_range(0, 6)) @(posedge clk);
    end
    adv = 1;

    // extended vector: 2 of 8 bits set -> each stage on 2/8 of the cycles
    no_ov = 0;
    switch_b(8'b1000_0100, lat);
    check(lat <= NB, "B switch latency");
    for (int s = 0; s < M; s++) on_cnt[s] = 0;
    repeat (NB * 10) begin
      @(posedge clk); #1
      for (int s = 0; s < M; s++) on_cnt[s] += son_b[s];
    end
    for (int s = 0; s < M; s++) check(on_cnt[s] == 20, $sformatf("B stage %0d on %0d/80", s, on_cnt[s]));
    for (int it = 0; it < 30; it++) begin
      no_ov = it[0];
      anyp  = it[1];
      switch_b(NB'($urandom), lat);
      check(lat <= (no_ov ? 2*NB : NB) + 1, $sformatf("B switch latency %0d", lat));
    end

    check(nstall > 0 && nsw_fast > 0 && nsw_slow > 0 && n_faster > 0, "all mechanisms exercised");
    $display("switches: %0d plain, %0d no-overshoot, %0d re-phased; retired A=%0d B=%0d", nsw_fast, nsw_slow, n_faster, retired[0], retired[1]);
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
