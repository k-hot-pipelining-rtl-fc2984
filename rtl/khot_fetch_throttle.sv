// khot_fetch_throttle: fetch throttling for k-hot operation of a w-wide
// pipeline that has no fixed control vector (superscalar or variable-latency
// stages).
//
// Instead of rotating a vector, hotness is bounded by limiting how many
// instructions fetch may insert. m is the number of instructions in the
// pipeline, those already fetched and waiting in the fetch stage included, u
// the number of stages that are hot (made progress on at
// least one instruction this cycle). Two policies:
//   up2k: fetch only while m < k, at most min(W, k - m) instructions. At most
//         k instructions are in flight, so at most k stages are hot: a hard
//         bound on peak power.
//   avgk: fetch only while m < W*k and u < k, at most min(W, W*k - m). Hotness
//         may exceed k for a while but averages about k; better performance,
//         no power bound.
// fetch_cond is the policy's condition alone; the power-gating controller uses
// it to wake the fetch stage. fetch_cnt is zero unless the fetch stage is on.
//
// Interface: occupancy per stage (0..W each) and hot flag per stage, index 0 =
// fetch. Purely combinational.
// From the source technique: both policies and their formulas. This design's
// choices: counting the fetch stage's instructions in m (without them up2k
// lets k + W instructions into the pipeline, breaking its bound), counting u
// over all stages, and the port encoding.
module khot_fetch_throttle
  import khot_pkg::*;
#(
  parameter int unsigned W  = 2,   // pipeline width
  parameter int unsigned NS = 5,   // pipeline stages (stage 0 = fetch)
  localparam int unsigned OW = $clog2(W+1),
  localparam int unsigned KW = $clog2(NS+1),
  localparam int unsigned MW = $clog2(NS*W+1)
) (
  input  throttle_mode_e            mode,
  input  logic [KW-1:0]             k,           // desired hotness, 0..NS
  input  logic [NS-1:0][OW-1:0]     occ,         // instructions per stage
  input  logic [NS-1:0]             hot,         // stage made progress this cycle
  input  logic                      fetch_on,    // fetch stage powered
  output logic [MW-1:0]             inflight,    // m
  output logic [KW-1:0]             hot_stages,  // u
  output logic                      fetch_cond,  // policy allows fetching
  output logic [OW-1:0]             fetch_cnt    // instructions to fetch this cycle
);

  int unsigned m, u, cap, room;

  always_comb begin
    m = 0;
    for (int s = 0; s < NS; s++) m += int'(occ[s]);
    u = 0;
    for (int s = 0; s < NS; s++) u += int'(hot[s]);
    if (mode == TM_UP2K) begin
      cap        = int'(k);
      fetch_cond = (m < cap);
    end else begin
      cap        = W * int'(k);
      fetch_cond = (m < cap) && (u < int'(k));
    end
    room      = fetch_cond ? cap - m : 0;
    fetch_cnt = (fetch_on && fetch_cond) ? OW'((room < W) ? room : W) : '0;
    inflight   = MW'(m);
    hot_stages = KW'(u);
  end

endmodule
