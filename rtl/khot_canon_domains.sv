// khot_canon_domains: power-domain enables of the canonical five-stage
// (IF, ID, EX, MEM, WB) k-hot pipeline.
//
// Every block of the pipeline sits in its own power domain. The control vector
// gives one bit per stage; the domains of logic shared between stages are
// derived from those bits:
//   - a set of pipeline latches is shared by the stage that writes it and the
//     stage that reads it, and is powered when either is on (OR);
//   - a forwarding unit is shared by its source and destination stage and is
//     powered only when both are on (AND);
//   - the branch unit is shared by fetch and the resolving stage (EX) and is
//     powered only when both are on (AND).
// With {IF,ID,EX,MEM,WB} = 00110 three latch sets and the MEM->EX forwarding
// unit are on; with 01010 all four latch sets are on.
//
// Interface: stage_on[4] = IF ... stage_on[0] = WB. Purely combinational.
// From the source technique: the OR rule for latches and the AND rule for
// forwarding and branch logic. This design's choices: two forwarding units
// (MEM->EX and WB->EX) and EX as the branch-resolving stage.
module khot_canon_domains (
  input  logic [4:0] stage_on,    // {IF, ID, EX, MEM, WB}
  output logic [4:0] stage_pwr,   // stage logic domains, same order
  output logic [3:0] latch_pwr,   // {IF/ID, ID/EX, EX/MEM, MEM/WB}
  output logic [1:0] fwd_pwr,     // {MEM->EX, WB->EX}
  output logic       branch_pwr   // branch unit (IF and EX)
);

  localparam int unsigned S_IF = 4, S_EX = 2, S_MEM = 1, S_WB = 0;

  always_comb begin
    stage_pwr = stage_on;
    // latch set j sits between stage j+1 (writer) and stage j (reader)
    for (int j = 0; j < 4; j++) latch_pwr[j] = stage_on[j+1] | stage_on[j];
    fwd_pwr[1] = stage_on[S_MEM] & stage_on[S_EX];
    fwd_pwr[0] = stage_on[S_WB]  & stage_on[S_EX];
    branch_pwr = stage_on[S_IF]  & stage_on[S_EX];
  end

endmodule
