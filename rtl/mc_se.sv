// mc_se: fine-grained switch element (SE).
//
// The element is one 2:1 multiplexer, two memory bits and a passgate. D1
// selects what the multiplexer passes: D1=0 gives the constant D0, D1=1 gives
// the variable input U. The multiplexer output G is the element's
// configuration bit. It opens or closes the passgate between pass_in and
// pass_out. Routing a context-ID bit (plain or inverted) to U makes one
// element reproduce every configuration pattern that is constant over the
// contexts or depends on a single context-ID bit, with two memory bits in
// place of one bit per context.
//
// Interface: cfg carries {D1, D0}; u is the variable input; g is the
// generated configuration bit. The passgate is modelled as a two-state
// switch: an open passgate drives 0, so several passgates on one net combine
// by OR (a pull-down on the shared net, which is this design's choice).
// Purely combinational.
module mc_se
  import mc_pkg::*;
(
  input  se_bits_t cfg,
  input  logic     u,
  input  logic     pass_in,
  output logic     g,
  output logic     pass_out
);

  always_comb begin
    g        = cfg.d1 ? u : cfg.d0;
    pass_out = g & pass_in;
  end

endmodule
