// mc_cfg_chain: configuration memory of one cell, loaded serially.
//
// A W-bit shift register. While shift_en is high each clock moves the
// register one place toward the MSB, takes si into bit 0 and presents the
// old MSB on so, so cells can be chained. q holds the configuration the cell
// uses. The memory is not cleared by reset: it is only ever written by
// shifting. The loading method is this design's choice.
//
// Interface: clk, shift_en, si, so, q[W]. One bit per clock.
module mc_cfg_chain #(
  parameter int unsigned W = 1223
) (
  input  logic         clk,
  input  logic         shift_en,
  input  logic         si,
  output logic         so,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (shift_en) q <= {q[W-2:0], si};
  end

  assign so = q[W-1];

endmodule
