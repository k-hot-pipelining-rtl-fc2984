// khot_core_ctrl: k-hot controller of one seven-stage evaluation core.
//
// Combines the rotating control vector (khot_cv_reg, one bit per pipeline
// stage, N = 7 so the vector has seven rotations) with the twelve-domain
// power controller (khot_core_domains). Software or a hardware policy sets the
// hotness by writing a target vector with k bits set; the vector converges to
// it by rewriting only the bit that enters fetch. The domain controller turns
// the vector into per-domain power modes and clock enables every cycle.
//
// With a power-gating latency L (PG_LAT) a new target takes effect only 2L
// cycles after the request, so a domain released just before it can still
// turn off and on again in time.
//
// Interface: see the ports. Timing: vector and domain outputs change on the
// clock edge after adv; sw_req is taken on the clock edge it is high.
// From the source technique: vector, switching rule and domain scheme. This
// design's choices are those listed in the two sub-modules.
module khot_core_ctrl
  import khot_pkg::*;
#(
  parameter int unsigned  M         = 7,
  parameter int unsigned  N         = 7,
  parameter int unsigned  PG_LAT    = 0,
  parameter logic [N-1:0] RESET_VEC = '1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           adv,
  input  logic                           sw_req,
  input  logic [N-1:0]                   sw_target,
  input  logic                           sw_any_phase,
  input  logic                           no_overshoot,
  input  logic                           drv_en,
  input  logic                           cg_mode,
  output logic [N-1:0]                   cv,
  output logic [M-1:0]                   stage_on,
  output logic                           busy,
  output logic [$clog2(N+1)-1:0]         hot_cnt,
  output logic [NUM_GROUPS-1:0]          group_on,
  output pwr_mode_e [NUM_DOMAINS-1:0]    pwr_mode,
  output logic [NUM_DOMAINS-1:0]         clk_en
);

  logic [N-1:0] target;

  khot_cv_reg #(.M(M), .N(N), .RESET_VEC(RESET_VEC), .HOLD(2 * PG_LAT)) u_cv (
    .clk, .rst_n, .adv, .sw_req, .sw_target, .sw_any_phase, .no_overshoot,
    .cv, .stage_on, .busy, .target, .hot_cnt
  );

  // while a switch is pending, future vectors only hold bits of cv or target
  khot_core_domains #(.N(N), .PG_LAT(PG_LAT)) u_dom (
    .clk, .rst_n, .cv,
    .lookahead_vec (busy ? (cv | target) : cv),
    .drv_en, .cg_mode, .group_on, .pwr_mode, .clk_en
  );

endmodule
