// khot_core_domains: power-domain controller of the seven-stage, two-wide
// in-order evaluation core.
//
// The core's seven pipeline stages (F1 F2 D E M1 M2 WB; fetch and memory take
// two stages each) form five stage groups: fetch, decode, execute, memory and
// writeback. A group is active when any of its stages is on in the control
// vector. The core is split into twelve power domains: one always-on domain,
// seven state-holding domains (branch predictor, BTB, I-cache, D-cache, ITLB,
// DTLB, register file) and four logic domains (IFU, LSU, EXEU, MMU). A domain
// is enabled when any of the groups that use it is active (OR of its enablers,
// ENABLERS[d]). An enabled domain runs at nominal voltage with its clock on.
// A disabled state domain drops to data retention voltage (or stays at nominal
// voltage when drv_en is low); a disabled logic domain is power gated (or, with
// cg_mode high, kept powered and only clock gated).
//
// Power-gating latency: with PG_LAT = L > 0 a domain must be asked to power up
// L cycles before it is needed, and a domain that would be needed again within
// 2L cycles of going idle is kept on. Because the control vector rotates, its
// future values are known: the request looks at the vector rotated by
// 0..2L places. lookahead_vec must be a superset of every future vector within
// that window (the vector ORed with a pending switch target is one).
//
// Interface: cv is the N-bit control vector (bits 6..0 = F1 ... WB);
// outputs are per domain, indexed by khot_pkg::domain_e. Combinational except
// for one request flop per domain used when PG_LAT > 0.
// From the source technique: the twelve domains, their three behaviours, OR of
// enablers, DRV for idle state domains, the clock-gating variant and the
// keep-on rule for latency. This design's choice: the stage groups that enable
// each domain (ENABLERS), since the technique gives that mapping only as a
// figure; execute and writeback both enabling the execution unit follows the
// text.
module khot_core_domains
  import khot_pkg::*;
#(
  parameter int unsigned N      = 7,     // control vector bits (>= 7)
  parameter int unsigned PG_LAT = 0,     // power-gating turn-on/off latency, cycles
  // enabling groups per domain, bit = group_e {WB, MEM, EXE, DEC, FETCH}
  parameter logic [NUM_DOMAINS-1:0][NUM_GROUPS-1:0] ENABLERS = '{
    5'b01001,   // D_MMU      : fetch, memory
    5'b10100,   // D_EXEU     : execute, writeback
    5'b01000,   // D_LSU      : memory
    5'b00011,   // D_IFU      : fetch, decode
    5'b10010,   // D_RF       : decode (read), writeback (write)
    5'b01000,   // D_DTLB     : memory
    5'b00001,   // D_ITLB     : fetch
    5'b01000,   // D_DCACHE   : memory
    5'b00001,   // D_ICACHE   : fetch
    5'b00101,   // D_BTB      : fetch, execute
    5'b00101,   // D_BP       : fetch (predict), execute (update)
    5'b00000    // D_ALWAYS_ON: none
  }
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N-1:0]                      cv,             // current control vector
  input  logic [N-1:0]                      lookahead_vec,  // superset of future vectors
  input  logic                              drv_en,         // idle state domains at DRV
  input  logic                              cg_mode,        // clock-gate logic domains only
  output logic [NUM_GROUPS-1:0]             group_on,       // active stage groups
  output pwr_mode_e [NUM_DOMAINS-1:0]       pwr_mode,       // requested power per domain
  output logic [NUM_DOMAINS-1:0]            clk_en          // clock enable per domain
);

  localparam int unsigned WIN = 2 * PG_LAT;

  function automatic dom_class_e dclass(input int unsigned d);
    if (d == int'(D_ALWAYS_ON)) return DC_ALWAYS;
    if (d >= int'(D_IFU))       return DC_LOGIC;
    return DC_STATE;
  endfunction

  function automatic logic [NUM_GROUPS-1:0] groups(input logic [N-1:0] v);
    logic [NUM_GROUPS-1:0] g;
    g[G_FETCH] = v[6] | v[5];
    g[G_DEC]   = v[4];
    g[G_EXE]   = v[3];
    g[G_MEM]   = v[2] | v[1];
    g[G_WB]    = v[0];
    return g;
  endfunction

  // group activity j cycles ahead, j = 0 uses the current vector
  logic [WIN:0][NUM_GROUPS-1:0]   g_ahead;
  logic [NUM_DOMAINS-1:0]         need_now, need_soon, need_win, req, req_q;

  always_comb begin
    logic [N-1:0] v;
    g_ahead[0] = groups(cv);
    v = lookahead_vec;
    for (int j = 1; j <= WIN; j++) begin
      v = {v[0], v[N-1:1]};
      g_ahead[j] = groups(v);
    end
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      need_now[d]  = |(g_ahead[0] & ENABLERS[d]);
      need_soon[d] = 1'b0;
      need_win[d]  = 1'b0;
      for (int j = 0; j <= WIN; j++) begin
        if (j <= PG_LAT) need_soon[d] |= |(g_ahead[j] & ENABLERS[d]);
        need_win[d] |= |(g_ahead[j] & ENABLERS[d]);
      end
      req[d] = need_soon[d] | (req_q[d] & need_win[d]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) req_q <= '1;
    else        req_q <= req;
  end

  always_comb begin
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      unique case (dclass(d))
        DC_ALWAYS: begin
          pwr_mode[d] = PM_ON;
          clk_en[d]   = 1'b1;
        end
        DC_STATE: begin
          pwr_mode[d] = (req[d] || !drv_en) ? PM_ON : PM_DRV;
          clk_en[d]   = need_now[d];
        end
        default: begin
          pwr_mode[d] = (req[d] || cg_mode) ? PM_ON : PM_OFF;
          clk_en[d]   = need_now[d];
        end
      endcase
    end
  end

  assign group_on = g_ahead[0];

  initial assert (N >= 7) else $error("khot_core_domains: need N >= 7");

endmodule
