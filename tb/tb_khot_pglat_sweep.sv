// tb_khot_pglat_sweep: cost of power-gating latency on the seven-stage core.
//
// Four khot_core_ctrl instances, identical except for the domain turn-on /
// turn-off latency L = 0, 1, 2, 3 cycles, run the same vectors for k = 1..4
// (k evenly spread bits) for 20 rotations each. A domain that cannot turn off
// and back on in time stays on, so on-time grows with L.
// Checked, per k and per L:
//   - every domain whose group is active has nominal power and its clock
//     (the latency never costs correctness);
//   - logic-domain on-cycles never fall as L grows, and equal the need at L = 0;
//   - the growth from L = 0 to L = 3, relative to the need, is no larger at
//     k = 4 than at k = 1 (with more stages on, domains are on anyway).
// A table of logic-domain on-cycles per instruction is printed.
module tb_khot_pglat_sweep;
  import khot_pkg::*;
  localparam int N = 7, NL = 4, ROT = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sw_req = 0;
  logic [N-1:0] sw_target = '0;
  logic [NL-1:0] busy;
  logic [NL-1:0][N-1:0] cv;
  logic [NL-1:0][NUM_GROUPS-1:0] grp;
  pwr_mode_e [NL-1:0][NUM_DOMAINS-1:0] pm;
  logic [NL-1:0][NUM_DOMAINS-1:0] ck;

  for (genvar l = 0; l < NL; l++) begin : g_lat
    logic [N-1:0] son;
    logic [2:0] cnt;
    khot_core_ctrl #(.PG_LAT(l)) u (.clk, .rst_n, .adv(1'b1), .sw_req, .sw_target,
      .sw_any_phase(1'b0), .no_overshoot(1'b0), .drv_en(1'b1), .cg_mode(1'b0),
      .cv(cv[l]), .stage_on(son), .busy(busy[l]), .hot_cnt(cnt), .group_on(grp[l]),
      .pwr_mode(pm[l]), .clk_en(ck[l]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // groups using each domain, bit order {WB, MEM, EXE, DEC, FETCH}
  function automatic logic [4:0] usage(int d);
    case (d)
      1, 2: return 5'b00101;  3, 5: return 5'b00001;  4, 6, 9: return 5'b01000;
      7: return 5'b10010;     8: return 5'b00011;     10: return 5'b10100;
      11: return 5'b01001;    default: return 5'b00000;
    endcase
  endfunction

  bit measuring = 0;
  int on_cnt[NL], need_cnt;
  always @(negedge clk) if (measuring) begin
    for (int l = 0; l < NL; l++) begin
      logic [4:0] g;
      g = {cv[l][0], cv[l][2] | cv[l][1], cv[l][3], cv[l][4], cv[l][6] | cv[l][5]};
      for (int d = 1; d < NUM_DOMAINS; d++) begin
        if (l == 0 && d >= int'(D_IFU)) need_cnt += ((g & usage(d)) != 0);
        if ((g & usage(d)) != 0)
          check(pm[l][d] == PM_ON && ck[l][d], $sformatf("L=%0d domain %0d off while needed", l, d));
        if (d >= int'(D_IFU)) on_cnt[l] += (pm[l][d] == PM_ON);
      end
    end
  end

  logic [N-1:0] t;
  real growth[5];
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    $display(" k | logic-domain on-cycles per instruction, L = 0  1  2  3");
    for (int k = 1; k <= 4; k++) begin
      t = '0;
      for (int i = 0; i < k; i++) t[N - 1 - (i * N) / k] = 1'b1;
      @(posedge clk); #1 sw_req = 1; sw_target = t;
      @(posedge clk); #1 sw_req = 0;
      while (busy != '0) @(posedge clk);
      repeat (2 * N) @(posedge clk);
      for (int l = 0; l < NL; l++) on_cnt[l] = 0;
      need_cnt = 0;
      @(posedge clk); #1 measuring = 1;
      repeat (ROT * N) @(posedge clk);
      #1 measuring = 0;
      check(on_cnt[0] == need_cnt, $sformatf("k=%0d: L=0 on %0d cycles, needed %0d", k, on_cnt[0], need_cnt));
      for (int l = 1; l < NL; l++)
        check(on_cnt[l] >= on_cnt[l-1], $sformatf("k=%0d: on-time falls from L=%0d to L=%0d", k, l - 1, l));
      growth[k] = real'(on_cnt[NL-1] - on_cnt[0]) / real'(on_cnt[0]);
      $display(" %0d | %6.2f %6.2f %6.2f %6.2f", k,
               real'(on_cnt[0]) / real'(ROT * k), real'(on_cnt[1]) / real'(ROT * k),
               real'(on_cnt[2]) / real'(ROT * k), real'(on_cnt[3]) / real'(ROT * k));
    end
    check(growth[4] <= growth[1], $sformatf("latency costs more at k=4 (%0.2f) than at k=1 (%0.2f)", growth[4], growth[1]));
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
