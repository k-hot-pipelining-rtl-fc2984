// khot_top: k-hot pipelining power controllers, in the three forms the
// technique takes, side by side.
//
// k-hot pipelining trades performance for power by powering and clocking only
// k of the m stages of a pipeline; the powered stages move along with the
// instructions. This top holds:
//   1. mc_*: a four-core system of seven-stage in-order cores. Each core has a
//      rotating control vector and a twelve-domain power controller
//      (khot_core_ctrl). A staggering allocator (khot_stagger_alloc) spreads
//      the cores' set bits so the same stage is rarely on in several cores at
//      once; mc_start runs it for the hotness values in mc_k and, when done,
//      loads the result into all cores in the same cycle. Each core also takes
//      direct vector writes (mc_sw_req / mc_sw_target), which may let the
//      controller pick the quickest rotation (mc_any_phase); allocator results
//      always keep their phase. mc_inc raises core mc_inc_core by one bit at
//      run time (khot_stagger_inc), placed where the live control vector sum
//      is lowest; it is taken (mc_inc_taken) only when no core is switching,
//      no allocation finishes in that cycle and a free position exists.
//   2. cn_*: the canonical five-stage pipeline controller: a rotating vector
//      (khot_cv_reg) and the derived enables of latches, forwarding units and
//      branch unit (khot_canon_domains). With cn_mix_en high, khot_mix_ctrl
//      alternates the vector between two hotness values for fractional k;
//      otherwise cn_sw_req / cn_sw_target write it directly.
//   3. cx_*: the controller for pipelines without a fixed vector: fetch
//      throttling (khot_fetch_throttle, up2k or avgk) and latency-aware
//      per-stage power gating (khot_pg_ctrl). The pipeline reports stage
//      occupancy and progress; the controller returns how many instructions to
//      fetch and which stages are powered.
// The processor pipelines themselves, the power switches and the retention
// supply are outside this design; their control and status signals are ports.
//
// Timing: all state is clocked on clk with a synchronous active-low rst_n.
// The allocator needs sum(k) + NCORES + 1 cycles; a vector switch needs at most
// N (2N without overshoot) advancing cycles.
module khot_top
  import khot_pkg::*;
#(
  parameter int unsigned NCORES   = 4,   // cores in the multi-core system
  parameter int unsigned MC_N     = 7,   // stages (= vector bits) per core
  parameter int unsigned PG_LAT   = 0,   // domain power-gating latency, cycles
  parameter int unsigned CN_N     = 5,   // canonical control vector bits
  parameter int unsigned CX_W     = 2,   // throttled pipeline width
  parameter int unsigned CX_NS    = 5,   // throttled pipeline stages
  parameter int unsigned CX_T     = 1,   // stage power switch latency, cycles
  localparam int unsigned MC_KW   = $clog2(MC_N+1),
  localparam int unsigned MC_CI   = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned CN_KW   = $clog2(CN_N+1),
  localparam int unsigned CX_OW   = $clog2(CX_W+1),
  localparam int unsigned CX_KW   = $clog2(CX_NS+1),
  localparam int unsigned CX_MW   = $clog2(CX_NS*CX_W+1)
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  // multi-core system
  input  logic [NCORES-1:0]                          mc_adv,
  input  logic                                       mc_start,
  input  logic [NCORES-1:0][MC_KW-1:0]               mc_k,
  input  logic [NCORES-1:0]                          mc_sw_req,
  input  logic [NCORES-1:0][MC_N-1:0]                mc_sw_target,
  input  logic                                       mc_any_phase,   // direct writes only
  input  logic                                       mc_inc,         // add one bit to a core
  input  logic [MC_CI-1:0]                           mc_inc_core,
  output logic                                       mc_inc_taken,
  input  logic                                       mc_no_overshoot,
  input  logic                                       mc_drv_en,
  input  logic                                       mc_cg_mode,
  output logic [NCORES-1:0][MC_N-1:0]                mc_cv,
  output logic [NCORES-1:0]                          mc_busy,
  output logic [NCORES-1:0][MC_KW-1:0]               mc_hot_cnt,
  output logic [NCORES-1:0][NUM_GROUPS-1:0]          mc_group_on,
  output pwr_mode_e [NCORES-1:0][NUM_DOMAINS-1:0]    mc_pwr_mode,
  output logic [NCORES-1:0][NUM_DOMAINS-1:0]         mc_clk_en,
  output logic                                       mc_alloc_busy,
  output logic                                       mc_alloc_done,
  // canonical five-stage pipeline
  input  logic                                       cn_adv,
  input  logic                                       cn_sw_req,
  input  logic [CN_N-1:0]                            cn_sw_target,
  input  logic                                       cn_any_phase,
  input  logic                                       cn_mix_en,      // alternate two vectors
  input  logic [CN_N-1:0]                            cn_mix_vec_a,
  input  logic [CN_N-1:0]                            cn_mix_vec_b,
  input  logic [15:0]                                cn_mix_dwell_a,
  input  logic [15:0]                                cn_mix_dwell_b,
  output logic                                       cn_mix_phase_b,
  input  logic                                       cn_no_overshoot,
  output logic [CN_N-1:0]                            cn_cv,
  output logic                                       cn_busy,
  output logic [CN_KW-1:0]                           cn_hot_cnt,
  output logic [4:0]                                 cn_stage_pwr,
  output logic [3:0]                                 cn_latch_pwr,
  output logic [1:0]                                 cn_fwd_pwr,
  output logic                                       cn_branch_pwr,
  // fetch-throttled pipeline
  input  throttle_mode_e                             cx_mode,
  input  logic [CX_KW-1:0]                           cx_k,
  input  logic [CX_NS-1:0][CX_OW-1:0]                cx_occ,      // instructions per stage
  input  logic [CX_NS-1:0]                           cx_hot,      // progress per stage
  output logic [CX_OW-1:0]                           cx_fetch_cnt,
  output logic                                       cx_fetch_cond,
  output logic [CX_MW-1:0]                           cx_inflight,
  output logic [CX_KW-1:0]                           cx_hot_stages,
  output logic [CX_NS-1:0]                           cx_stage_ready,
  output logic [CX_NS-1:0]                           cx_pwr_en
);

  // ---------------- multi-core system ----------------
  logic [NCORES-1:0][MC_N-1:0] alloc_vec;

  khot_stagger_alloc #(.C(NCORES), .N(MC_N)) u_alloc (
    .clk, .rst_n, .start(mc_start), .k_req(mc_k),
    .vec(alloc_vec), .busy(mc_alloc_busy), .done(mc_alloc_done)
  );

  logic [MC_N-1:0] inc_target;
  logic            inc_found;

  khot_stagger_inc #(.C(NCORES), .N(MC_N)) u_inc (
    .vec(mc_cv), .core(mc_inc_core), .target(inc_target), .found(inc_found)
  );

  assign mc_inc_taken = mc_inc && inc_found && !mc_alloc_done && (mc_busy == '0);

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic [MC_N-1:0] stage_on_unused;
    logic            inc_here;
    assign inc_here = mc_inc_taken && (mc_inc_core == MC_CI'(c));
    khot_core_ctrl #(.M(MC_N), .N(MC_N), .PG_LAT(PG_LAT)) u_core (
      .clk, .rst_n,
      .adv          (mc_adv[c]),
      .sw_req       (mc_alloc_done | inc_here | mc_sw_req[c]),
      .sw_target    (mc_alloc_done ? alloc_vec[c] : inc_here ? inc_target : mc_sw_target[c]),
      .sw_any_phase (!mc_alloc_done && !inc_here && mc_any_phase),
      .no_overshoot (mc_no_overshoot),
      .drv_en       (mc_drv_en),
      .cg_mode      (mc_cg_mode),
      .cv           (mc_cv[c]),
      .stage_on     (stage_on_unused),
      .busy         (mc_busy[c]),
      .hot_cnt      (mc_hot_cnt[c]),
      .group_on     (mc_group_on[c]),
      .pwr_mode     (mc_pwr_mode[c]),
      .clk_en       (mc_clk_en[c])
    );
  end

  // ---------------- canonical five-stage pipeline ----------------
  logic [4:0]       cn_stage_on;
  logic [CN_N-1:0]  cn_target_unused;

  logic             cn_mix_req;
  logic [CN_N-1:0]  cn_mix_target;

  khot_mix_ctrl #(.N(CN_N), .DW(16)) u_cn_mix (
    .clk, .rst_n, .en(cn_mix_en), .vec_a(cn_mix_vec_a), .vec_b(cn_mix_vec_b),
    .dwell_a(cn_mix_dwell_a), .dwell_b(cn_mix_dwell_b), .busy(cn_busy),
    .sw_req(cn_mix_req), .sw_target(cn_mix_target), .phase_b(cn_mix_phase_b)
  );

  khot_cv_reg #(.M(5), .N(CN_N)) u_cn_cv (
    .clk, .rst_n, .adv(cn_adv),
    .sw_req(cn_mix_en ? cn_mix_req : cn_sw_req),
    .sw_target(cn_mix_en ? cn_mix_target : cn_sw_target),
    .sw_any_phase(cn_any_phase), .no_overshoot(cn_no_overshoot), .cv(cn_cv), .stage_on(cn_stage_on),
    .busy(cn_busy), .target(cn_target_unused), .hot_cnt(cn_hot_cnt)
  );

  khot_canon_domains u_cn_dom (
    .stage_on(cn_stage_on), .stage_pwr(cn_stage_pwr), .latch_pwr(cn_latch_pwr),
    .fwd_pwr(cn_fwd_pwr), .branch_pwr(cn_branch_pwr)
  );

  // ---------------- fetch-throttled pipeline ----------------
  logic [CX_NS-1:0] cx_occupied;
  always_comb
    for (int s = 0; s < CX_NS; s++) cx_occupied[s] = (cx_occ[s] != '0);

  khot_fetch_throttle #(.W(CX_W), .NS(CX_NS)) u_cx_thr (
    .mode(cx_mode), .k(cx_k), .occ(cx_occ), .hot(cx_hot),
    .fetch_on(cx_stage_ready[0]), .inflight(cx_inflight),
    .hot_stages(cx_hot_stages), .fetch_cond(cx_fetch_cond), .fetch_cnt(cx_fetch_cnt)
  );

  khot_pg_ctrl #(.NS(CX_NS), .T(CX_T)) u_cx_pg (
    .clk, .rst_n, .occ(cx_occupied), .fetch_cond(cx_fetch_cond),
    .stage_ready(cx_stage_ready), .pwr_en(cx_pwr_en)
  );

endmodule
