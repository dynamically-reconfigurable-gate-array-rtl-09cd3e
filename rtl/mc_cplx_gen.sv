// mc_cplx_gen: generator for "complex" configuration-bit patterns.
//
// Most crosspoint patterns over the contexts are constant or follow one
// context-ID bit, and a single switch element (SE) produces them. The rare
// patterns that depend on several context-ID bits are built from several SEs;
// this module is that structure. It is a binary tree:
//   * CPLX_LEAVES leaf SEs, each fed with S[0] through an input controller, so
//     a leaf gives 0, 1, S[0] or ~S[0];
//   * CPLX_NODES inner nodes of two SEs each. At tree level L (root = top
//     context bit) one SE follows S[bit] and its passgate passes the "1"
//     child, the other follows ~S[bit] and passes the "0" child. The two
//     passgates share the node's output net.
// With D1=1 in all inner SEs the tree output equals the truth-table entry
// chosen by the context ID, i.e. any function of the context. Leaf l holds
// the two entries whose upper context bits equal l.
// That several SEs make these patterns follows the architecture; the tree
// arrangement is this design's own. Combinational.
//
// Interface: ctx (context ID), cfg (cplx_cfg_t), g (generated bit).
module mc_cplx_gen
  import mc_pkg::*;
(
  input  ctx_t      ctx,
  input  cplx_cfg_t cfg,
  output logic      g
);

  // Heap-ordered tree nets: nodes 0..CPLX_NODES-1, leaves after them.
  logic [2*CPLX_LEAVES-2:0] t;

  for (genvar l = 0; l < CPLX_LEAVES; l++) begin : g_leaf
    logic s0_pol;
    logic unused_pass;
    mc_input_ctrl #(.WIDTH(1)) u_c (
      .inv (cfg.leaf[l].inv),
      .din (ctx[0]),
      .dout(s0_pol)
    );
    mc_se u_se (
      .cfg     (cfg.leaf[l].se),
      .u       (s0_pol),
      .pass_in (1'b0),
      .g       (t[CPLX_NODES + l]),
      .pass_out(unused_pass)
    );
  end

  for (genvar k = 0; k < CPLX_NODES; k++) begin : g_node
    localparam int unsigned DEPTH = $clog2(k + 2) - 1;
    localparam int unsigned BIT   = CTX_BITS - 1 - DEPTH;
    logic g_t, g_f, p_t, p_f;
    mc_se u_se_t (
      .cfg     (cfg.node[k].sel_t),
      .u       (ctx[BIT]),
      .pass_in (t[2*k + 2]),
      .g       (g_t),
      .pass_out(p_t)
    );
    mc_se u_se_f (
      .cfg     (cfg.node[k].sel_f),
      .u       (~ctx[BIT]),
      .pass_in (t[2*k + 1]),
      .g       (g_f),
      .pass_out(p_f)
    );
    // Two passgates on one net (open passgates drive 0).
    assign t[k] = p_t | p_f;
  end

  assign g = t[0];

endmodule
