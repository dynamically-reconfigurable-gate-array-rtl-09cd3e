// mc_lb: multi-context logic block.
//
// A LB_K-input look-up table with one truth table per context, as in a
// conventional multi-context FPGA: the context ID picks the table, the LB_K
// inputs pick the entry. An optional output flip-flop, chosen by one
// configuration bit shared by all contexts, lets a value computed in one
// context be read in the next; it clears on reset.
// The architecture names the logic block and keeps its per-context memory;
// the LUT form, its size and the flip-flop are this design's choices.
//
// Interface: clk, rst_n (active-low, synchronous), ctx, cfg (lb_cfg_t),
// din[LB_K], dout. Combinational path din/ctx -> dout when ff_sel=0; one
// clock of latency when ff_sel=1.
module mc_lb
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ctx_t             ctx,
  input  lb_cfg_t          cfg,
  input  logic [LB_K-1:0]  din,
  output logic             dout
);

  logic comb_q, ff_q;

  always_comb comb_q = cfg.lut[ctx][din];

  always_ff @(posedge clk) begin
    if (!rst_n) ff_q <= 1'b0;
    else        ff_q <= comb_q;
  end

  always_comb dout = cfg.ff_sel ? ff_q : comb_q;

endmodule
