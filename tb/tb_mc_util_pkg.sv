// tb_mc_util_pkg: configuration compiler used by the testbenches.
//
// Testbenches describe a routing by intent: for every horizontal track of an
// RCM and every context, the index of the vertical track that drives it, or
// -1. compile_rcm turns that into switch-element settings the way a CAD flow
// for this fabric would. Each crosspoint's on/off pattern over the contexts
// is classified as constant (one SE with D1=0), following one context-ID
// bit or its inverse (one SE fed by an input controller line), or complex
// (one SE fed by a complex-pattern generator, which is programmed here from
// the pattern's truth table; crosspoints with the same complex pattern share
// one generator). The counters in rcm_stats_t report how many crosspoints
// fell in each class and how many generators were used; ok is cleared when
// the routing needs more generators than the RCM has.
package tb_mc_util_pkg;
  import mc_pkg::*;

  typedef int src_map_t [RCM_NOUT][NCTX];

  typedef struct {
    int n_gen;         // complex-pattern generators used
    int n_need;        // distinct complex patterns the routing needs
    bit out_ok [RCM_NOUT];  // every crosspoint of this track got its pattern
    int n_const_on;
    int n_const_off;
    int n_single;
    int n_cplx;
    bit ok;
  } rcm_stats_t;

  // Input controller setting used by compile_rcm: line b is S[b], line
  // b+CTX_BITS is ~S[b].
  function automatic logic [N_CTX_LINES-1:0] std_c_inv();
    logic [N_CTX_LINES-1:0] v;
    for (int j = 0; j < N_CTX_LINES; j++) v[j] = (j >= CTX_BITS);
    return v;
  endfunction

  // Program a complex generator so that its output over the contexts is pat.
  function automatic cplx_cfg_t cplx_from_pattern(logic [NCTX-1:0] pat);
    cplx_cfg_t c;
    c = '0;
    for (int l = 0; l < CPLX_LEAVES; l++) begin
      logic e0, e1;
      e0 = pat[2*l];
      e1 = pat[2*l+1];
      if (e0 == e1) begin
        c.leaf[l].se  = '{d1: 1'b0, d0: e0};
        c.leaf[l].inv = 1'b0;
      end else begin
        c.leaf[l].se  = '{d1: 1'b1, d0: 1'b0};
        c.leaf[l].inv = e0;        // e0=1,e1=0 -> ~S0
      end
    end
    for (int k = 0; k < CPLX_NODES; k++) begin
      c.node[k].sel_t = '{d1: 1'b1, d0: 1'b0};
      c.node[k].sel_f = '{d1: 1'b1, d0: 1'b0};
    end
    return c;
  endfunction

  function automatic void compile_rcm(input src_map_t src, output rcm_cfg_t cfg,
                                      output rcm_stats_t st);
    int ncplx;
    logic [NCTX-1:0] cplx_pat [N_CPLX];
    logic [NCTX-1:0] seen [$];
    cfg       = '0;
    cfg.c_inv = std_c_inv();
    st        = '{0, 0, 0, 0, 0, 0, '{default: 1'b1}, 1'b1};
    foreach (st.out_ok[o]) st.out_ok[o] = 1'b1;
    ncplx     = 0;
    for (int o = 0; o < RCM_NOUT; o++) begin
      for (int i = 0; i < RCM_NIN; i++) begin
        logic [NCTX-1:0] pat;
        bit done;
        for (int c = 0; c < NCTX; c++) pat[c] = (src[o][c] == i);
        done = 1'b0;
        if (pat == '0) begin
          cfg.xp[o][i].se = '{d1: 1'b0, d0: 1'b0};
          st.n_const_off++;
          done = 1'b1;
        end else if (pat == '1) begin
          cfg.xp[o][i].se = '{d1: 1'b0, d0: 1'b1};
          st.n_const_on++;
          done = 1'b1;
        end
        for (int b = 0; b < CTX_BITS && !done; b++) begin
          logic [NCTX-1:0] sb;
          for (int c = 0; c < NCTX; c++) sb[c] = c[b];
          if (pat == sb || pat == ~sb) begin
            cfg.xp[o][i].se   = '{d1: 1'b1, d0: 1'b0};
            cfg.xp[o][i].usel = USEL_W'((pat == sb) ? b : b + CTX_BITS);
            st.n_single++;
            done = 1'b1;
          end
        end
        // A complex pattern already made by a generator is shared.
        for (int m = 0; m < ncplx && !done; m++) begin
          if (cplx_pat[m] == pat) begin
            cfg.xp[o][i].se   = '{d1: 1'b1, d0: 1'b0};
            cfg.xp[o][i].usel = USEL_W'(N_CTX_LINES + m);
            st.n_cplx++;
            done = 1'b1;
          end
        end
        if (!done) begin
          bit seen_before;
          seen_before = 1'b0;
          foreach (seen[q]) if (seen[q] == pat) seen_before = 1'b1;
          if (!seen_before) begin
            seen.push_back(pat);
            st.n_need++;
          end
          if (ncplx < N_CPLX) begin
            cplx_pat[ncplx]    = pat;
            cfg.cplx[ncplx]    = cplx_from_pattern(pat);
            cfg.xp[o][i].se    = '{d1: 1'b1, d0: 1'b0};
            cfg.xp[o][i].usel  = USEL_W'(N_CTX_LINES + ncplx);
            ncplx++;
            st.n_gen = ncplx;
            st.n_cplx++;
          end else begin
            st.ok        = 1'b0;
            st.out_ok[o] = 1'b0;
          end
        end
      end
    end
  endfunction

  // A map with every track undriven in every context.
  function automatic src_map_t empty_map();
    src_map_t m;
    for (int o = 0; o < RCM_NOUT; o++)
      for (int c = 0; c < NCTX; c++) m[o][c] = -1;
    return m;
  endfunction

endpackage
