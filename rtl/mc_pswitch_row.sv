// mc_pswitch_row: the programmable switches P along one horizontal track.
//
// Each switch P is a passgate joining one vertical track to the horizontal
// track; its on/off state is a configuration bit ctrl[i] produced, per
// context, by a switch element. With two-state signals the closed passgates
// combine by OR and an undriven track reads 0. The row also reports whether
// the track is driven at all and whether more than one vertical track is
// connected at once (a routing conflict, which a correct configuration
// never produces).
//
// Interface: vert[NIN] vertical tracks, ctrl[NIN] switch states, h the
// horizontal track, driven, conflict. Combinational.
module mc_pswitch_row #(
  parameter int unsigned NIN = 13
) (
  input  logic [NIN-1:0] vert,
  input  logic [NIN-1:0] ctrl,
  output logic           h,
  output logic           driven,
  output logic           conflict
);

  always_comb begin
    int unsigned n_on;
    n_on = 0;
    for (int unsigned i = 0; i < NIN; i++) n_on += 32'(ctrl[i]);
    h        = |(vert & ctrl);
    driven   = (n_on != 0);
    conflict = (n_on > 1);
  end

endmodule
