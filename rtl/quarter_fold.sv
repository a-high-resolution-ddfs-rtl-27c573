// quarter_fold: quadrant folding of the phase word (addrnull in the design).
//
// Only a quarter of the sine is stored. In the second and fourth quarter of
// the period (mirror = 1) the quarter-wave phase word is bitwise inverted,
// which maps phase p to 2^Q - 1 - p. Because the tables sample the sine at
// (p + 1/2) phase steps, the inverted word addresses exactly the mirrored
// point of the quarter wave.
//
// Interface: mirror (phase bit Q), phase[Q_W-1:0] (phase bits Q-1..0),
// addr[Q_W-1:0]. Purely combinational. The inverter and multiplexer follow the
// document's counter block scheme.
module quarter_fold #(
  parameter int unsigned Q_W = ddfs_pkg::Q_W
) (
  input  logic           mirror,
  input  logic [Q_W-1:0] phase,
  output logic [Q_W-1:0] addr
);
  always_comb addr = mirror ? ~phase : phase;
endmodule
