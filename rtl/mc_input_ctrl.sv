// mc_input_ctrl: input controller "C" of the RCM.
//
// A programmable inverter: one memory bit decides whether the input reaches
// the output as it is or inverted. In the RCM the controllers sit on the
// context-ID bits entering the switch-element decoders, so that an element
// can follow either S[i] or ~S[i]. Where the controllers sit is this design's
// reading; the inverting function is the architecture's.
//
// Interface: inv (configuration), din, dout = din ^ inv. Combinational.
module mc_input_ctrl #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] inv,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  always_comb dout = din ^ inv;

endmodule
