// khot_stagger_alloc: builds staggered control vectors for the cores of a
// multi-core k-hot system.
//
// If every core uses the same control vector, the same stage is on in all
// cores at once and the power of the most expensive stage adds up across
// cores. Staggering spreads the set bits so that the per-position sum of all
// vectors (the control vector sum) is as even as possible. This block does it
// greedily: for each core in turn (core 0 first) it adds that core's k bits one
// at a time; each bit goes to the first position, scanning from the fetch end
// (bit N-1), whose column sum is the current minimum and which is still clear
// in that core's vector. If no such position exists the step adds nothing.
// All vectors rotate in lockstep afterwards, so the result is meant to be
// loaded into all cores in the same cycle.
//
// Interface: a start pulse samples k_req and clears all vectors; one bit is
// placed per clock, plus one clock per core, and done pulses when the last
// core is finished (sum(k) + C + 1 cycles after start). vec holds the result
// until the next start. k values above N are treated as N.
// From the source technique: the greedy minimum-sum placement and its order.
// This design's choices: the sequential one-bit-per-cycle schedule, the
// start/done handshake and the clamp.
module khot_stagger_alloc #(
  parameter int unsigned C  = 4,   // cores
  parameter int unsigned N  = 7,   // control vector bits
  localparam int unsigned KW = $clog2(N+1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [C-1:0][KW-1:0]   k_req,   // hotness (set bits) per core
  output logic [C-1:0][N-1:0]    vec,     // staggered control vectors
  output logic                   busy,
  output logic                   done
);

  localparam int unsigned SW = $clog2(C+1);
  localparam int unsigned CI = (C > 1) ? $clog2(C) : 1;

  logic [C-1:0][KW-1:0] k_q;
  logic [CI-1:0]        core_q;
  logic [KW-1:0]        rem_q;

  // column sums, their minimum, and the chosen position for the active core
  logic [N-1:0][SW-1:0] col_sum;
  logic [SW-1:0]        min_sum;
  logic                 found;
  logic [N-1:0]         pick;      // one-hot position to set

  function automatic logic [KW-1:0] clampk(input logic [KW-1:0] k);
    return (int'(k) > int'(N)) ? KW'(N) : k;
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      col_sum[i] = '0;
      for (int c = 0; c < C; c++) col_sum[i] += SW'(vec[c][i]);
    end
    min_sum = col_sum[N-1];
    for (int i = 0; i < N; i++)
      if (col_sum[i] < min_sum) min_sum = col_sum[i];
    found = 1'b0;
    pick  = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (!found && col_sum[i] == min_sum && !vec[core_q][i]) begin
        found   = 1'b1;
        pick[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) begin
      busy   <= 1'b0;
      vec    <= '0;
      k_q    <= '0;
      core_q <= '0;
      rem_q  <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      vec    <= '0;
      k_q    <= k_req;
      core_q <= '0;
      rem_q  <= clampk(k_req[0]);
    end else if (busy) begin
      if (rem_q != '0) begin
        vec[core_q] <= vec[core_q] | pick;
        rem_q       <= rem_q - 1'b1;
      end else if (32'(core_q) == C - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        core_q <= core_q + 1'b1;
        rem_q  <= clampk(k_q[core_q + 1'b1]);
      end
    end
  end

endmodule
