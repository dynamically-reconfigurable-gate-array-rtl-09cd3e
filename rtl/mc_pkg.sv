// mc_pkg: architecture constants and configuration types shared by the
// multi-context FPGA built around the Reconfigurable Context Memory (RCM).
//
// The fabric switches between NCTX contexts selected by a CTX_BITS-wide
// context ID (S[CTX_BITS-1:0]). Each RCM crosspoint is driven by a fine-grained
// switch element (SE) holding only two configuration bits, D1 and D0: D1=0
// makes the crosspoint state the constant D0 in every context, D1=1 makes it
// follow a "decoder line" U, which is either a (possibly inverted) context-ID
// bit or the output of a complex-pattern generator built from several SEs.
// Eight contexts follow the area evaluation of the architecture; the
// track counts, LUT size and generator count are this design's own choices.
package mc_pkg;

  // ---- contexts -----------------------------------------------------------
  parameter int unsigned CTX_BITS = 3;               // 8 contexts
  parameter int unsigned NCTX     = 1 << CTX_BITS;

  // ---- routing resources of one cell --------------------------------------
  parameter int unsigned N_SIDES  = 4;               // N, E, S, W
  parameter int unsigned W_S      = 2;               // single-length tracks per side
  parameter int unsigned W_D      = 1;               // double-length tracks per side
  parameter int unsigned LB_K     = 4;               // logic block inputs (LUT size)

  // ---- RCM decoder resources ----------------------------------------------
  // Context lines: one input controller per line, line j carries
  // S[j % CTX_BITS], optionally inverted.
  parameter int unsigned N_CTX_LINES = 2 * CTX_BITS;
  parameter int unsigned N_CPLX      = 2;            // complex-pattern generators per RCM
  parameter int unsigned N_DEC       = N_CTX_LINES + N_CPLX;
  parameter int unsigned USEL_W      = $clog2(N_DEC);

  // Complex-pattern generator: binary tree of SEs. Leaves decode S[0],
  // inner nodes steer with S[1..CTX_BITS-1] through two SE passgates.
  parameter int unsigned CPLX_LEAVES = 1 << (CTX_BITS - 1);
  parameter int unsigned CPLX_NODES  = CPLX_LEAVES - 1;

  // ---- RCM crossbar geometry ----------------------------------------------
  // Vertical tracks (crossbar inputs): singles, doubles, LB output.
  parameter int unsigned RCM_NIN  = N_SIDES * W_S + N_SIDES * W_D + 1;
  // Horizontal tracks (crossbar outputs): LB inputs, singles, doubles.
  parameter int unsigned RCM_NOUT = LB_K + N_SIDES * W_S + N_SIDES * W_D;

  parameter int unsigned IN_S_BASE  = 0;
  parameter int unsigned IN_D_BASE  = N_SIDES * W_S;
  parameter int unsigned IN_LB      = N_SIDES * W_S + N_SIDES * W_D;
  parameter int unsigned OUT_LB_BASE = 0;
  parameter int unsigned OUT_S_BASE  = LB_K;
  parameter int unsigned OUT_D_BASE  = LB_K + N_SIDES * W_S;

  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  typedef logic [CTX_BITS-1:0] ctx_t;

  // Two memory bits of one switch element.
  typedef struct packed {
    logic d1;   // 1: pass the variable input U, 0: pass the constant D0
    logic d0;   // constant value
  } se_bits_t;

  // One crosspoint: its SE plus the choice of decoder line feeding U.
  typedef struct packed {
    se_bits_t            se;
    logic [USEL_W-1:0]   usel;
  } xp_cfg_t;

  typedef struct packed {
    logic     inv;  // input controller on the leaf's S[0] input
    se_bits_t se;
  } leaf_cfg_t;

  typedef struct packed {
    se_bits_t sel_t;  // SE whose U is S[level]; its passgate passes the "1" child
    se_bits_t sel_f;  // SE whose U is ~S[level]; its passgate passes the "0" child
  } node_cfg_t;

  typedef struct packed {
    leaf_cfg_t [CPLX_LEAVES-1:0] leaf;
    node_cfg_t [CPLX_NODES-1:0]  node;
  } cplx_cfg_t;

  typedef struct packed {
    logic      [N_CTX_LINES-1:0]            c_inv;
    cplx_cfg_t [N_CPLX-1:0]                 cplx;
    xp_cfg_t   [RCM_NOUT-1:0][RCM_NIN-1:0]  xp;
  } rcm_cfg_t;

  typedef struct packed {
    logic                              ff_sel;  // 1: registered output
    logic [NCTX-1:0][(1<<LB_K)-1:0]    lut;     // one truth table per context
  } lb_cfg_t;

  typedef struct packed {
    lb_cfg_t  lb;
    rcm_cfg_t rcm;
  } cell_cfg_t;

  parameter int unsigned CELL_CFG_W = $bits(cell_cfg_t);

endpackage
