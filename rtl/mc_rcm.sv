// mc_rcm: Reconfigurable Context Memory (RCM), the switch block of a cell.
//
// The RCM is a crossbar whose crosspoints change with the context without
// storing one bit per context. It has three kinds of parts:
//   * input controllers C: N_CTX_LINES programmable inverters; line j
//     carries S[j % CTX_BITS], inverted if c_inv[j] is set. Together with
//     the N_CPLX complex-pattern generators (several SEs each) they form the
//     N_DEC decoder lines.
//   * one switch element (SE) per crosspoint: D1=0 holds the crosspoint at
//     D0 in every context, D1=1 makes it follow decoder line usel. This is
//     the SE acting as a reconfigurable decoder.
//   * programmable switches P: for each horizontal track o, a row of
//     passgates joins vertical track i to it when SE(o,i) is 1.
// Vertical tracks (inputs, RCM_NIN): single-length tracks from the four
// sides, double-length tracks from the four sides, the logic block output.
// Horizontal tracks (outputs, RCM_NOUT): logic block inputs, outgoing
// single-length and double-length tracks. The index map is in mc_pkg.
//
// The three kinds of parts and their roles follow the architecture; the
// crossbar population (full), the decoder-line set and the shared pool of
// complex generators are this design's choices. Combinational: a context
// switch takes effect as soon as ctx changes. conflict is set when some
// horizontal track has two closed switches in the current context.
module mc_rcm
  import mc_pkg::*;
(
  input  ctx_t                ctx,
  input  rcm_cfg_t            cfg,
  input  logic [RCM_NIN-1:0]  vin,
  output logic [RCM_NOUT-1:0] hout,
  output logic [RCM_NOUT-1:0] hdriven,
  output logic                conflict
);

  logic [N_DEC-1:0]       dec;       // decoder lines
  logic [RCM_NOUT-1:0]    row_conflict;

  // ---- input controllers on the context-ID bits ---------------------------
  for (genvar j = 0; j < N_CTX_LINES; j++) begin : g_c
    mc_input_ctrl #(.WIDTH(1)) u_c (
      .inv (cfg.c_inv[j]),
      .din (ctx[j % CTX_BITS]),
      .dout(dec[j])
    );
  end

  // ---- complex-pattern generators -----------------------------------------
  for (genvar m = 0; m < N_CPLX; m++) begin : g_cplx
    mc_cplx_gen u_gen (
      .ctx(ctx),
      .cfg(cfg.cplx[m]),
      .g  (dec[N_CTX_LINES + m])
    );
  end

  // ---- crosspoints: SE decoder + P switch row per horizontal track --------
  for (genvar o = 0; o < RCM_NOUT; o++) begin : g_row
    logic [RCM_NIN-1:0] ctrl;
    for (genvar i = 0; i < RCM_NIN; i++) begin : g_xp
      logic u_sel;
      logic unused_pass;
      // Decoder-line selection; codes past the last line read 0.
      always_comb begin
        u_sel = 1'b0;
        for (int unsigned d = 0; d < N_DEC; d++)
          if (cfg.xp[o][i].usel == USEL_W'(d)) u_sel = dec[d];
      end
      mc_se u_se (
        .cfg     (cfg.xp[o][i].se),
        .u       (u_sel),
        .pass_in (1'b0),
        .g       (ctrl[i]),
        .pass_out(unused_pass)
      );
    end
    mc_pswitch_row #(.NIN(RCM_NIN)) u_p (
      .vert    (vin),
      .ctrl    (ctrl),
      .h       (hout[o]),
      .driven  (hdriven[o]),
      .conflict(row_conflict[o])
    );
  end

  assign conflict = |row_conflict;

endmodule
