// tb_khot_stagger_inc: checks the single-step stagger increment.
//
// 1. 3000 random sets of four 7-bit vectors and a random core, against a
//    model written here (column sums, minimum, first free position from the
//    fetch end).
// 2. Building vectors from all-zero by repeated increments, core by core,
//    must give exactly what khot_stagger_alloc computes for the same k values
//    (300 random k sets), since both follow the same greedy rule.
module tb_khot_stagger_inc;
  localparam int C = 4, N = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [C-1:0][N-1:0] vec;
  logic [1:0] core;
  logic [N-1:0] target;
  logic found;
  khot_stagger_inc dut (.vec, .core, .target, .found);

  logic start = 0, abusy, done;
  logic [C-1:0][2:0] k_req = '0;
  logic [C-1:0][N-1:0] avec;
  khot_stagger_alloc ref_alloc (.clk, .rst_n, .start, .k_req, .vec(avec), .busy(abusy), .done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [N:0] model(input logic [C-1:0][N-1:0] v, input int cr);
    int s[N], mn;
    logic [N-1:0] t;
    mn = C;
    for (int i = 0; i < N; i++) begin
      s[i] = 0;
      for (int c = 0; c < C; c++) s[i] += v[c][i];
      if (s[i] < mn) mn = s[i];
    end
    t = v[cr];
    for (int i = N - 1; i >= 0; i--)
      if (s[i] == mn && !v[cr][i]) begin t[i] = 1'b1; return {1'b1, t}; end
    return {1'b0, t};
  endfunction

  logic [N:0] exp_r;
  logic [C-1:0][N-1:0] built;
  int kk[C], n_notfound = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int c = 0; c < C; c++) vec[c] = N'($urandom);
      core = 2'($urandom);
      #1 exp_r = model(vec, int'(core));
      check(found == exp_r[N] && target == exp_r[N-1:0],
            $sformatf("vec=%h core=%0d: got %b/%b expected %b/%b", vec, core, found, target, exp_r[N], exp_r[N-1:0]));
      if (!exp_r[N]) n_notfound++;
    end
    for (int t = 0; t < 300; t++) begin
      for (int c = 0; c < C; c++) kk[c] = $urandom_range(0, N);
      vec = '0;
      for (int c = 0; c < C; c++)
        for (int b = 0; b < kk[c]; b++) begin
          core = 2'(c);
          #1 vec[c] = target;
        end
      built = vec;
      @(posedge clk);
      for (int c = 0; c < C; c++) k_req[c] = 3'(kk[c]);
      start = 1;
      @(posedge clk); start = 0;
      while (!done) @(posedge clk);
      #1 check(avec == built, $sformatf("k=%0d,%0d,%0d,%0d: increments %h, allocator %h", kk[0], kk[1], kk[2], kk[3], built, avec));
    end
    check(n_notfound > 0, "no case without a free minimum-sum position was drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
