// khot_cv_reg: rotating control vector of a k-hot pipeline, with safe switching
// between hotness values.
//
// The vector has N bits of which the M least significant name the pipeline
// stages: bit M-1 is the fetch (IF) stage, bit 0 the last stage. A set bit
// powers its stage. Each advancing cycle the vector rotates one place towards
// the back of the pipeline (bit i takes bit i+1, bit N-1 takes bit 0), so a
// powered slot travels with the instruction it carries. With N > M the extra
// bits are empty slots in front of fetch, which gives hotness values of
// M*k/N (k = number of set bits).
//
// Switching: a request loads a target vector, expressed in the frame of the
// vector as it stands in the request cycle. The target then rotates in lockstep
// with the vector, and on every later advancing cycle the bit that rotates into
// the IF position is replaced by the target's bit. Only the IF bit is ever
// changed, and no instruction is in flight in a slot that is about to enter IF,
// so no instruction is lost. The switch ends when vector and target match:
// at most N advancing cycles. With no_overshoot set, a bit is only set if the
// number of set bits stays at or below the larger of the old and new counts;
// clears proceed first and the switch then takes at most 2N cycles. HOLD
// delays the first change by HOLD clock cycles after a request, so that power
// domains with a wake-up latency see a new target before it takes effect.
//
// Timing: one rotation per clock with adv high; adv low (a pipeline-wide stall)
// freezes vector and target (the HOLD count still runs). Synchronous, active-low reset to RESET_VEC.
// From the source technique: the rotating register, the N > M extension and the
// switch by toggling the IF bit. This design's choices: the stall input, the
// reset value (full hot), the target frame and the tie rule of the quickest
// rotation, HOLD, and the no-overshoot rule (the
// technique says only that overshoot can be avoided at the cost of latency).
module khot_cv_reg #(
  parameter int unsigned   M         = 5,            // pipeline stages
  parameter int unsigned   N         = 5,            // control vector bits, N >= M
  parameter logic [N-1:0]  RESET_VEC = '1,           // full hot after reset
  parameter int unsigned   HOLD      = 0             // cycles before a new target applies
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adv,           // rotate this cycle
  input  logic                     sw_req,        // load a new target (pulse)
  input  logic [N-1:0]             sw_target,     // target, frame of current cv
  input  logic                     sw_any_phase,  // target may be taken in any rotation
  input  logic                     no_overshoot,  // forbid exceeding max(old,new) set bits
  output logic [N-1:0]             cv,            // current control vector
  output logic [M-1:0]             stage_on,      // power/clock enable per stage
  output logic                     busy,          // switch in progress
  output logic [N-1:0]             target,        // pending target, rotating with cv
  output logic [$clog2(N+1)-1:0]   hot_cnt        // set bits in cv
);

  localparam int unsigned CW = $clog2(N+1);
  localparam int unsigned IF = M - 1;
  localparam int unsigned HW = (HOLD > 0) ? $clog2(HOLD+1) : 1;

  initial begin
    assert (N >= M && M >= 1) else $error("khot_cv_reg: need N >= M >= 1");
  end

  function automatic logic [CW-1:0] popcnt(input logic [N-1:0] v);
    logic [CW-1:0] c;
    c = '0;
    for (int i = 0; i < N; i++) c += CW'(v[i]);
    return c;
  endfunction

  function automatic logic [N-1:0] rot(input logic [N-1:0] v);
    if (N == 1) return v;
    return {v[0], v[N-1:1]};
  endfunction

  // rotations until the bit at position q of the post-request vector can be
  // rewritten (it is rewritten while entering IF, never while already there)
  function automatic int unsigned cost_of(input logic [N-1:0] v, input logic [N-1:0] c);
    int unsigned worst, d;
    worst = 0;
    for (int q = 0; q < N; q++) begin
      d = (q + N - IF) % N;
      if (d == 0) d = N;
      if (v[q] != c[q] && d > worst) worst = d;
    end
    return worst;
  endfunction

  logic [N-1:0]  tgt_q;
  logic [N-1:0]  v_req, cand, cand_al, best_tgt, load_tgt;
  int unsigned   best_cost, cand_cost;
  logic [CW-1:0] limit_q;
  logic [N-1:0]  cv_rot, tgt_rot, cv_sw;
  logic [CW-1:0] cnt_rot, cnt_new_tgt, cnt_now;
  logic          allow_set;
  logic [HW-1:0] hold_q;

  always_comb begin
    cv_rot      = rot(cv);
    tgt_rot     = rot(tgt_q);
    cnt_rot     = popcnt(cv_rot);
    cnt_now     = popcnt(cv);
    cnt_new_tgt = popcnt(sw_target);
    allow_set   = !no_overshoot || (cnt_rot < limit_q);
    // target choice for a request in this cycle, in the post-request frame
    v_req     = adv ? cv_rot : cv;
    cand      = sw_target;
    best_tgt  = adv ? rot(sw_target) : sw_target;
    best_cost = cost_of(v_req, best_tgt);
    for (int r = 1; r < N; r++) begin
      cand      = rot(cand);
      cand_al   = adv ? rot(cand) : cand;
      cand_cost = cost_of(v_req, cand_al);
      if (cand_cost < best_cost) begin
        best_cost = cand_cost;
        best_tgt  = cand_al;
      end
    end
    load_tgt = sw_any_phase ? best_tgt : (adv ? rot(sw_target) : sw_target);
    cv_sw       = cv_rot;
    if (busy && hold_q == '0) begin
      if (!tgt_rot[IF])                 cv_sw[IF] = 1'b0;
      else if (allow_set)               cv_sw[IF] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cv      <= RESET_VEC;
      tgt_q   <= RESET_VEC;
      limit_q <= popcnt(RESET_VEC);
      busy    <= 1'b0;
      hold_q  <= '0;
    end else if (sw_req) begin
      hold_q  <= HW'(HOLD);
      // load the target; the vector rotates unchanged this cycle
      tgt_q   <= load_tgt;
      cv      <= adv ? cv_rot : cv;
      limit_q <= (cnt_now > cnt_new_tgt) ? cnt_now : cnt_new_tgt;
      busy    <= 1'b1;
    end else if (adv) begin
      if (hold_q != '0) hold_q <= hold_q - 1'b1;
      cv    <= cv_sw;
      tgt_q <= tgt_rot;
      if (busy && cv_sw == tgt_rot) busy <= 1'b0;
    end else begin
      if (hold_q != '0) hold_q <= hold_q - 1'b1;
      if (busy && cv == tgt_q) busy <= 1'b0;
    end
  end

  assign stage_on = cv[M-1:0];
  assign hot_cnt  = cnt_now;
  assign target   = tgt_q;

endmodule
