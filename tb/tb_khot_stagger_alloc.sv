// tb_khot_stagger_alloc: self-checking testbench of the staggering allocator.
//
// Two instances: two cores with five-bit vectors, and the default four cores
// with seven-bit vectors. A reference implementation of the greedy rule
// (per core, per bit: first position from the fetch end with the minimum
// column sum that the core has not yet set) predicts every vector. Also
// checked: the worked two-core one-hot example gives {1,0,0,0,0} and
// {0,1,0,0,0}; four one-hot seven-stage cores give a vector sum of four ones
// and three zeros; the column sum range is at most one whenever the total
// number of bits allows it; the result is ready sum(k) + C + 1 cycles after
// start.
module tb_khot_stagger_alloc;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic start2 = 0, start4 = 0;
  logic [1:0][2:0] k2 = '0;
  logic [3:0][2:0] k4 = '0;
  logic [1:0][4:0] v2;
  logic [3:0][6:0] v4;
  logic busy2, busy4, done2, done4;

  khot_stagger_alloc #(.C(2), .N(5)) dut2 (.clk, .rst_n, .start(start2), .k_req(k2), .vec(v2), .busy(busy2), .done(done2));
  khot_stagger_alloc dut4 (.clk, .rst_n, .start(start4), .k_req(k4), .vec(v4), .busy(busy4), .done(done4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: c[core][i], i = 0 is the fetch end
  int ref_c[4][8];
  task automatic ref_alloc(int nc, int n, int k[4]);
    int sum[8], mn;
    foreach (ref_c[a, b]) ref_c[a][b] = 0;
    for (int core = 0; core < nc; core++)
      for (int step = 0; step < ((k[core] > n) ? n : k[core]); step++) begin
        for (int i = 0; i < n; i++) begin
          sum[i] = 0;
          for (int c = 0; c < nc; c++) sum[i] += ref_c[c][i];
        end
        mn = sum[0];
        for (int i = 1; i < n; i++) if (sum[i] < mn) mn = sum[i];
        for (int i = 0; i < n; i++)
          if (sum[i] == mn && ref_c[core][i] == 0) begin
            ref_c[core][i] = 1;
            break;
          end
      end
  endtask

  int lat, total, kk[4], mx, mn, s;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // worked example: two one-hot five-stage cores
    k2 = {3'd1, 3'd1};
    @(posedge clk); #1 start2 = 1;
    @(posedge clk); #1 start2 = 0; lat = 1;
    while (!done2) begin @(posedge clk); #1 lat++; end
    check(v2[0] == 5'b10000 && v2[1] == 5'b01000, $sformatf("two-core example %b %b", v2[0], v2[1]));
    check(lat == 2 + 2 + 1, $sformatf("two-core latency %0d", lat));

    // four one-hot seven-stage cores: four ones and three zeros in the sum
    k4 = {3'd1, 3'd1, 3'd1, 3'd1};
    @(posedge clk); #1 start4 = 1;
    @(posedge clk); #1 start4 = 0;
    while (!done4) @(posedge clk);
    #1 check((v4[0] | v4[1] | v4[2] | v4[3]) == 7'b1111000 && (v4[0] & v4[1]) == 0 &&
             (v4[2] & v4[3]) == 0, "four one-hot cores take distinct positions");

    // random hotness, both instances
    for (int it = 0; it < 200; it++) begin
      for (int c = 0; c < 4; c++) kk[c] = $urandom_range(0, 7);
      for (int c = 0; c < 4; c++) k4[c] = 3'(kk[c]);
      total = kk[0] + kk[1] + kk[2] + kk[3];
      @(posedge clk); #1 start4 = 1;
      @(posedge clk); #1 start4 = 0; lat = 1;
      while (!done4) begin @(posedge clk); #1 lat++; end
      check(lat == total + 4 + 1, $sformatf("latency %0d for sum %0d", lat, total));
      ref_alloc(4, 7, kk);
      for (int c = 0; c < 4; c++)
        for (int i = 0; i < 7; i++)
          check(v4[c][6-i] == 1'(ref_c[c][i]), $sformatf("core %0d pos %0d", c, i));
      mx = 0; mn = 99;
      for (int i = 0; i < 7; i++) begin
        s = v4[0][i] + v4[1][i] + v4[2][i] + v4[3][i];
        if (s > mx) mx = s;
        if (s < mn) mn = s;
      end
      if (kk[0] == kk[1] && kk[1] == kk[2] && kk[2] == kk[3])
        check(mx - mn <= 1, $sformatf("equal hotness: sum range %0d", mx - mn));

      for (int c = 0; c < 2; c++) kk[c] = $urandom_range(0, 7);
      kk[2] = 0; kk[3] = 0;
      k2 = {3'(kk[1]), 3'(kk[0])};
      @(posedge clk); #1 start2 = 1;
      @(posedge clk); #1 start2 = 0;
      while (!done2) @(posedge clk);
      #1 ref_alloc(2, 5, kk);
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < 5; i++)
          check(v2[c][4-i] == 1'(ref_c[c][i]), $sformatf("2-core: core %0d pos %0d", c, i));
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
