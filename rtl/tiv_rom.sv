// tiv_rom: table of initial values (TIV) of the bipartite table method.
//
// 2^A_W words of TIV_W bits hold the quarter-wave sine sampled at the centre
// of each of the 2^a phase intervals:
//   TIV[i] = round(AMP * sin((i + 1/2) * (pi/2) / 2^a)),   AMP = 32765.
// AMP is the largest amplitude for which TIV + TO never exceeds 2^15 - 1.
// The contents are computed at elaboration by a constant function, so the
// table needs no data file; a synthesis tool turns it into a ROM.
//
// Interface: clk, addr[A_W-1:0], data[TIV_W-1:0].
// Timing: a block-RAM style read with an address register and an output
// register, so data belongs to the address presented 2 edges earlier.
// Size and contents follow the source design (its table-generation method, with
// the 15-bit word its block scheme prints); the amplitude and the read
// latency are this design's choices.
module tiv_rom #(
  parameter int unsigned A_W   = ddfs_pkg::A_W,
  parameter int unsigned TIV_W = ddfs_pkg::TIV_W,
  parameter int unsigned AMP   = ddfs_pkg::AMP
) (
  input  logic             clk,
  input  logic [A_W-1:0]   addr,
  output logic [TIV_W-1:0] data
);
  typedef logic [TIV_W-1:0] table_t [2**A_W];

  // Nearest integer, halves rounded up (also correct for negative x).
  function automatic int round_half_up(input real x);
    int i = $rtoi(x + 0.5);
    if (real'(i) > x + 0.5) i--;
    return i;
  endfunction

  function automatic table_t gen_table();
    table_t tab;
    real    step = ddfs_pkg::PI / 2.0 / real'(2**A_W);
    for (int i = 0; i < 2**A_W; i++)
      tab[i] = TIV_W'(round_half_up(real'(AMP) * $sin((real'(i) + 0.5) * step)));
    return tab;
  endfunction

  localparam table_t TABLE = gen_table();

  logic [A_W-1:0] addr_q;

  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= TABLE[addr_q];
  end
endmodule
