// khot_stagger_inc: raises the hotness of one running core by one, keeping the
// control vector sum of a multi-core k-hot system even.
//
// This is the single greedy step of the staggering scheme, applied to live
// vectors instead of to vectors being built from scratch: it forms the
// per-position sum of all cores' current control vectors, finds its minimum,
// and picks the first position, scanning from the fetch end (bit N-1), that
// has the minimum sum and is clear in the chosen core's vector. The result is
// that core's vector with the position set, in the frame of the vectors given,
// ready to be handed to the core's control vector as a switch target. If every
// minimum-sum position is already set in the core, found is low and the
// target equals the current vector.
//
// Interface: purely combinational. The vectors must be the ones in force (no
// switch pending) and all cores must rotate in lockstep, or the column sums
// mean nothing.
// From the source technique: the minimum-sum, first-free-position step. This
// design's choices: applying it to running cores and the found flag.
module khot_stagger_inc #(
  parameter int unsigned C  = 4,   // cores
  parameter int unsigned N  = 7,   // control vector bits
  localparam int unsigned CI = (C > 1) ? $clog2(C) : 1
) (
  input  logic [C-1:0][N-1:0] vec,     // current control vectors
  input  logic [CI-1:0]       core,    // core to raise
  output logic [N-1:0]        target,  // its vector with one more bit set
  output logic                found    // a free minimum-sum position exists
);

  localparam int unsigned SW = $clog2(C+1);

  logic [N-1:0][SW-1:0] col;
  logic [SW-1:0]        mn;
  logic [N-1:0]         own;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      col[i] = '0;
      for (int c = 0; c < C; c++) col[i] += SW'(vec[c][i]);
    end
    mn = SW'(C);
    for (int i = 0; i < N; i++) if (col[i] < mn) mn = col[i];
    own    = vec[core];
    target = own;
    found  = 1'b0;
    for (int i = N-1; i >= 0; i--) begin
      if (!found && col[i] == mn && !own[i]) begin
        target[i] = 1'b1;
        found     = 1'b1;
      end
    end
  end

endmodule
