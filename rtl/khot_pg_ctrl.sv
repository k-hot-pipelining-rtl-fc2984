// khot_pg_ctrl: per-stage power gating for k-hot pipelines driven by fetch
// throttling (no fixed control vector).
//
// Each stage has a power switch that takes T cycles to turn on and T cycles
// to turn off. Instructions that are already in the pipeline move freely, so a
// stage must be on before an instruction can reach it and must stay on while
// it holds one. The rules, applied per stage i with stage indices wrapping
// around the pipeline (i - j taken modulo NS):
//   - an off stage starts to turn on when any of stages i, i-1, ..., i-T holds
//     an instruction (one may arrive within T cycles); the fetch stage also
//     turns on when the throttle's fetch condition holds (after a squash the
//     pipeline may hold fewer instructions than allowed);
//   - an on stage starts to turn off only when none of stages i, i-1, ...,
//     i-2T holds an instruction (it could not turn off and back on in time
//     otherwise) and, for fetch, the fetch condition is false.
// The rules are conservative: a stage holding an instruction is never turned
// off, at the cost of extra on-time when instructions linger in a stage.
// The decision is registered, so a stage reacts one clock after occupancy
// appears; an instruction about to enter a stage that was off therefore waits
// one cycle beyond the switch latency.
//
// Interface: occ[i] = stage i holds at least one instruction (index 0 =
// fetch). stage_ready[i] = fully on, usable this cycle; pwr_en[i] = switch
// closed (turning on or on). One state machine per stage, registered outputs.
// From the source technique: the turn-on and turn-off rules and the wrap-around.
// This design's choices: stage occupancy as the meaning of "hot" for these
// rules, the four-state switch model with T >= 1, keeping fetch on while the
// fetch condition holds, and all stages off after reset.
module khot_pg_ctrl #(
  parameter int unsigned NS = 5,   // pipeline stages
  parameter int unsigned T  = 1    // turn-on / turn-off latency, cycles (>= 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NS-1:0]   occ,          // stage holds an instruction
  input  logic            fetch_cond,   // from the fetch throttle
  output logic [NS-1:0]   stage_ready,  // stage fully powered
  output logic [NS-1:0]   pwr_en        // power switch enable
);

  typedef enum logic [1:0] {S_OFF, S_WAKE, S_ON, S_SLEEP} pstate_e;
  localparam int unsigned TW = $clog2(T+1);

  pstate_e [NS-1:0]        st_q;
  logic    [NS-1:0][TW-1:0] cnt_q;
  logic    [NS-1:0]        want_on, may_off;

  initial assert (T >= 1) else $error("khot_pg_ctrl: T must be at least 1");

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      want_on[i] = 1'b0;
      may_off[i] = 1'b1;
      for (int j = 0; j <= 2 * T; j++) begin
        if (j <= T)  want_on[i] |= occ[(i + NS * (2 * T + 1) - j) % NS];
        may_off[i] &= !occ[(i + NS * (2 * T + 1) - j) % NS];
      end
      if (i == 0) begin
        want_on[i] |= fetch_cond;
        may_off[i] &= !fetch_cond;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q  <= '{default: S_OFF};
      cnt_q <= '0;
    end else begin
      for (int i = 0; i < NS; i++) begin
        unique case (st_q[i])
          S_OFF: if (want_on[i]) begin
            st_q[i]  <= S_WAKE;
            cnt_q[i] <= TW'(T - 1);
          end
          S_WAKE: begin
            if (cnt_q[i] == '0) st_q[i] <= S_ON;
            else                cnt_q[i] <= cnt_q[i] - 1'b1;
          end
          S_ON: if (may_off[i]) begin
            st_q[i]  <= S_SLEEP;
            cnt_q[i] <= TW'(T - 1);
          end
          default: begin
            if (cnt_q[i] == '0) st_q[i] <= S_OFF;
            else                cnt_q[i] <= cnt_q[i] - 1'b1;
          end
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      stage_ready[i] = (st_q[i] == S_ON);
      pwr_en[i]      = (st_q[i] == S_ON) || (st_q[i] == S_WAKE);
    end
  end

endmodule
