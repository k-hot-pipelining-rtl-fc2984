// khot_mix_ctrl: time-shares two control vectors to reach hotness values
// between the integer ones.
//
// A pipeline that spends equal time at k = 1 and k = 2 behaves, on average,
// like k = 3/2. This block alternates a control vector register (khot_cv_reg)
// between vector A and vector B: it requests A, waits for the switch to finish
// (busy low), holds A for dwell_a cycles, requests B, waits, holds B for
// dwell_b cycles, and repeats while en is high. Because every switch goes
// through khot_cv_reg's fetch-bit rewriting, no instruction is lost at the
// changes. The long-run hotness is about
//   (k_A * dwell_a + k_B * dwell_b) / (dwell_a + dwell_b)
// plus the share of the switch periods.
//
// Interface: drive sw_req / sw_target of khot_cv_reg from this block and feed
// its busy back. sw_req is a one-cycle pulse. Dwell values are sampled when a
// phase starts; 0 is treated as 1. When en falls the block stops and leaves
// the vector as it is.
// From the source technique: mixing two hotness values by switching between
// them. This design's choices: the fixed-dwell schedule and the handshake.
module khot_mix_ctrl #(
  parameter int unsigned N  = 5,    // control vector bits
  parameter int unsigned DW = 16    // dwell counter width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [N-1:0]    vec_a,
  input  logic [N-1:0]    vec_b,
  input  logic [DW-1:0]   dwell_a,   // cycles to hold vector A
  input  logic [DW-1:0]   dwell_b,   // cycles to hold vector B
  input  logic            busy,      // switch in progress (from khot_cv_reg)
  output logic            sw_req,
  output logic [N-1:0]    sw_target,
  output logic            phase_b    // B is the current or pending vector
);

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_WAIT, M_DWELL} mstate_e;

  mstate_e       st_q;
  logic [DW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q    <= M_IDLE;
      cnt_q   <= '0;
      phase_b <= 1'b0;
    end else if (!en) begin
      st_q    <= M_IDLE;
      phase_b <= 1'b0;
    end else begin
      unique case (st_q)
        M_IDLE:  st_q <= M_REQ;
        M_REQ:   st_q <= M_WAIT;
        M_WAIT:  if (!busy) begin
          st_q  <= M_DWELL;
          cnt_q <= phase_b ? dwell_b : dwell_a;
        end
        default: begin
          if (cnt_q <= DW'(1)) begin
            st_q    <= M_REQ;
            phase_b <= !phase_b;
          end else begin
            cnt_q <= cnt_q - 1'b1;
          end
        end
      endcase
    end
  end

  assign sw_req    = en && (st_q == M_REQ);
  assign sw_target = phase_b ? vec_b : vec_a;

endmodule
