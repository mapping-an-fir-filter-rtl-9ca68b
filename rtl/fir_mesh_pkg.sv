// Shared types and constants of the FIR processor mesh.
//
// Every link between two processor units carries a flit: a data word plus a
// tag. A unit broadcasts each flit to its four neighbours; a neighbour keeps
// only flits whose tag and arrival direction match one of its two input
// selections. The per-unit configuration (pu_cfg_t) picks the unit's role,
// i.e. which of the small per-sample programs it runs, and how its two input
// buffers and its output are tagged.
//
// The 32-bit word, the 4-bit tag and the role encoding are this design's own
// choices; the sixteen-tap filter length is the one the mappings are built for.
package fir_mesh_pkg;

  localparam int unsigned DATA_W    = 32;  // sample, coefficient and partial-sum word
  localparam int unsigned TAG_W     = 4;   // stream tag carried with every word
  localparam int unsigned NTAPS_MAX = 16;  // filter taps one unit can hold
  localparam int unsigned NDIR      = 4;   // neighbour links of a unit
  localparam int unsigned IX_N = 0, IX_E = 1, IX_S = 2, IX_W = 3;  // link indices

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic        [TAG_W-1:0]  tag_t;
  typedef logic        [4:0]        ntaps_t;   // 1..16
  typedef logic        [3:0]        taddr_t;   // 0..15

  typedef struct packed {
    tag_t  tag;
    word_t data;
  } flit_t;

  // Arrival direction of an input; DIR_NONE reads a constant zero that is
  // always available (used by the first unit of a partial-sum chain).
  typedef enum logic [2:0] {
    DIR_N    = 3'd0,
    DIR_E    = 3'd1,
    DIR_S    = 3'd2,
    DIR_W    = 3'd3,
    DIR_NONE = 3'd4
  } dir_e;

  typedef enum logic [3:0] {
    ROLE_IDLE      = 4'd0,  // does nothing
    ROLE_DIST      = 4'd1,  // forward IBuf0 to OBuf (optionally one sample late)
    ROLE_MULT      = 4'd2,  // OBuf <- IBuf0 * h0
    ROLE_ADD       = 4'd3,  // OBuf <- IBuf0 + IBuf1
    ROLE_MULT_ADD  = 4'd4,  // OBuf <- IBuf0 * h0 + IBuf1         (two steps)
    ROLE_DIST_MULT = 4'd5,  // OBuf <- x (forward), OBuf <- x * h0 (three steps)
    ROLE_MAC       = 4'd6,  // K-tap segment with its own delay line
    ROLE_DIST_WIN  = 4'd7,  // keep a K-sample window, send all K words per sample
    ROLE_MACS      = 4'd8,  // K-tap MAC over K words streamed in on IBuf0
    ROLE_ADD3      = 4'd9   // OBuf <- IBuf0 + IBuf1 + next IBuf0 (three steps)
  } role_e;

  // A word is taken when it comes from dir and its tag equals tag in every
  // bit where mask is 1.
  typedef struct packed {
    dir_e dir;
    tag_t tag;
    tag_t mask;
  } in_sel_t;

  typedef struct packed {
    role_e   role;
    ntaps_t  ntaps;    // ROLE_MAC / _DIST_WIN / _MACS: taps of this unit, 1..NTAPS_MAX
    logic    delay;    // ROLE_DIST / _DIST_MULT / _DIST_WIN: take the previous sample (z^-1)
    logic    fwd;      // ROLE_MAC: forward the sample leaving the local delay line
    logic    psum;     // ROLE_MAC / ROLE_MACS: add the partial sum from IBuf1 before output
    in_sel_t in0;      // selection of input buffer 0
    in_sel_t in1;      // selection of input buffer 1
    tag_t    out_tag;  // tag of results
    tag_t    fwd_tag;  // tag of forwarded samples
  } pu_cfg_t;

  localparam pu_cfg_t PU_CFG_IDLE = '{
    role: ROLE_IDLE, ntaps: 5'd1, delay: 1'b0, fwd: 1'b0, psum: 1'b0,
    in0: '{dir: DIR_NONE, tag: '0, mask: '1}, in1: '{dir: DIR_NONE, tag: '0, mask: '1},
    out_tag: '0, fwd_tag: '0
  };

  // Neighbour in direction d is the one that sees this unit in direction opp(d).
  function automatic logic [1:0] opp_dir(input logic [1:0] d);
    return d ^ 2'd2;  // N<->S, E<->W
  endfunction

endpackage
