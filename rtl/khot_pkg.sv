// khot_pkg: types and constants shared by the k-hot pipelining controllers.
//
// A k-hot pipeline powers (and clocks) only k of its m stages in any cycle. The
// powered stages are named by a rotating control vector; bit m-1 of the stage
// field is the front of the pipeline (fetch) and bit 0 the back (writeback).
// This package holds the power-mode encoding of a power domain, the names of
// the twelve power domains of the seven-stage evaluation core, the five logical
// stage groups that enable them, and the fetch-throttle modes used on complex
// pipelines. Encodings are this design's own choice.
package khot_pkg;

  // Power state requested for one power domain.
  typedef enum logic [1:0] {
    PM_OFF = 2'd0,   // power gated
    PM_DRV = 2'd1,   // held at data retention voltage (state kept, no access)
    PM_ON  = 2'd2    // nominal voltage
  } pwr_mode_e;

  // Logical stage groups of the seven-stage core. Fetch and memory each span
  // two pipeline stages; the others span one.
  localparam int unsigned NUM_GROUPS = 5;
  typedef enum logic [2:0] {
    G_FETCH = 3'd0,
    G_DEC   = 3'd1,
    G_EXE   = 3'd2,
    G_MEM   = 3'd3,
    G_WB    = 3'd4
  } group_e;

  // Power domains of the seven-stage core.
  localparam int unsigned NUM_DOMAINS = 12;
  typedef enum logic [3:0] {
    D_ALWAYS_ON = 4'd0,
    D_BP        = 4'd1,
    D_BTB       = 4'd2,
    D_ICACHE    = 4'd3,
    D_DCACHE    = 4'd4,
    D_ITLB      = 4'd5,
    D_DTLB      = 4'd6,
    D_RF        = 4'd7,
    D_IFU       = 4'd8,
    D_LSU       = 4'd9,
    D_EXEU      = 4'd10,
    D_MMU       = 4'd11
  } domain_e;

  // Behaviour class of a domain when none of its enabling stages is active.
  typedef enum logic [1:0] {
    DC_ALWAYS = 2'd0,  // always powered
    DC_STATE  = 2'd1,  // holds state: retention voltage when idle
    DC_LOGIC  = 2'd2   // stateless logic: power gated when idle
  } dom_class_e;

  // Enabling groups of each domain, one bit per group_e (bit index = group).
  typedef logic [NUM_GROUPS-1:0] group_mask_t;

  // Fetch-throttle policies for pipelines without a fixed control vector.
  typedef enum logic {
    TM_UP2K = 1'b0,    // never more than k instructions in flight
    TM_AVGK = 1'b1     // up to w*k in flight while fewer than k stages are hot
  } throttle_mode_e;

endpackage
