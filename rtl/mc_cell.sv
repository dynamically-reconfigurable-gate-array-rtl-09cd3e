// mc_cell: one cell of the cellular array, a logic block and its RCM.
//
// The RCM receives the single-length and double-length tracks arriving from
// the four sides and the logic block output, and drives the logic block
// inputs and the tracks leaving on the four sides. Side order is N, E, S, W
// (mc_pkg::side_e). The whole cell follows the context ID ctx: the LUT picks
// the context's truth table and the RCM switch elements decode the
// context's crosspoint states.
//
// Interface: clk, rst_n, ctx, cfg (cell_cfg_t), s_in/s_out
// [side][W_S], d_in/d_out [side][W_D], lb_out, conflict (two drivers on one
// track in the current context). Combinational from inputs to track outputs,
// except through the logic block flip-flop when it is selected.
//
// The path LB output -> RCM -> LB inputs, and paths through neighbouring
// cells, are combinational loops in the structure of any FPGA fabric; a
// lint tool reports them as circular logic. Only a configuration that
// closes such a path in some context makes a real loop, and that is a
// configuration error, so the structure is left as it is.
module mc_cell
  import mc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  ctx_t                          ctx,
  input  cell_cfg_t                     cfg,
  input  logic [N_SIDES-1:0][W_S-1:0]   s_in,
  input  logic [N_SIDES-1:0][W_D-1:0]   d_in,
  output logic [N_SIDES-1:0][W_S-1:0]   s_out,
  output logic [N_SIDES-1:0][W_D-1:0]   d_out,
  output logic                          lb_out,
  output logic                          conflict
);

  logic [RCM_NIN-1:0]  vin;
  logic [RCM_NOUT-1:0] hout;
  logic [RCM_NOUT-1:0] unused_hdriven;
  logic [LB_K-1:0]     lb_in;

  always_comb begin
    for (int unsigned s = 0; s < N_SIDES; s++) begin
      for (int unsigned t = 0; t < W_S; t++) begin
        vin[IN_S_BASE + s*W_S + t]  = s_in[s][t];
        s_out[s][t]                 = hout[OUT_S_BASE + s*W_S + t];
      end
      for (int unsigned t = 0; t < W_D; t++) begin
        vin[IN_D_BASE + s*W_D + t]  = d_in[s][t];
        d_out[s][t]                 = hout[OUT_D_BASE + s*W_D + t];
      end
    end
    vin[IN_LB] = lb_out;
    for (int unsigned k = 0; k < LB_K; k++) lb_in[k] = hout[OUT_LB_BASE + k];
  end

  mc_rcm u_rcm (
    .ctx     (ctx),
    .cfg     (cfg.rcm),
    .vin     (vin),
    .hout    (hout),
    .hdriven (unused_hdriven),
    .conflict(conflict)
  );

  mc_lb u_lb (
    .clk  (clk),
    .rst_n(rst_n),
    .ctx  (ctx),
    .cfg  (cfg.lb),
    .din  (lb_in),
    .dout (lb_out)
  );

endmodule
