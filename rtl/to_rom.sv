// to_rom: table of offsets (TO) of the bipartite table method.
//
// The quarter wave is cut into 2^b slope segments of 2^(a-b) TIV intervals;
// each segment uses one slope M_s, the mean slope of the sine over it. For
// every segment s and every position j of the phase inside one TIV interval
// (2^c positions) the table holds the signed offset from the interval centre:
//   M_s           = AMP * (sin((s+1)*L) - sin(s*L)) / L,  L = 2^(a-b) * D
//   TO[s*2^c + j] = round(M_s * (j + 1/2 - 2^(c-1)) * d)
// with D = (pi/2)/2^a the TIV interval, d = (pi/2)/2^(a+c) the phase step and
// AMP = 32765. The entries lie in -25..25 and are kept as 6-bit two's
// complement words. The contents are computed at elaboration by a constant
// function.
//
// Interface: clk, addr[B_W+C_W-1:0] = {segment, position}, data[TO_W-1:0].
// Timing: as tiv_rom, data belongs to the address presented 2 edges earlier.
// Size, addressing and the centred-offset formula follow the source design; the
// exact mean-slope expression, amplitude and latency are this design's choices.
module to_rom #(
  parameter int unsigned A_W  = ddfs_pkg::A_W,
  parameter int unsigned B_W  = ddfs_pkg::B_W,
  parameter int unsigned C_W  = ddfs_pkg::C_W,
  parameter int unsigned TO_W = ddfs_pkg::TO_W,
  parameter int unsigned AMP  = ddfs_pkg::AMP
) (
  input  logic                          clk,
  input  logic        [B_W+C_W-1:0]     addr,
  output logic signed [TO_W-1:0]        data
);
  typedef logic [TO_W-1:0] table_t [2**(B_W+C_W)];

  // Nearest integer, halves rounded up (also correct for negative x).
  function automatic int round_half_up(input real x);
    int i = $rtoi(x + 0.5);
    if (real'(i) > x + 0.5) i--;
    return i;
  endfunction

  function automatic table_t gen_table();
    table_t tab;
    real    big_d = ddfs_pkg::PI / 2.0 / real'(2**A_W);        // TIV interval
    real    lsb_d = ddfs_pkg::PI / 2.0 / real'(2**(A_W+C_W));  // phase step
    real    seg_l = big_d * real'(2**(A_W-B_W));               // slope segment
    real    slope;
    for (int s = 0; s < 2**B_W; s++) begin
      slope = real'(AMP) * ($sin(real'(s+1) * seg_l) - $sin(real'(s) * seg_l)) / seg_l;
      for (int j = 0; j < 2**C_W; j++)
        tab[s*(2**C_W) + j] = TO_W'(round_half_up(
            slope * (real'(j) + 0.5 - real'(2**(C_W-1))) * lsb_d));
    end
    return tab;
  endfunction

  localparam table_t TABLE = gen_table();

  logic [B_W+C_W-1:0] addr_q;

  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= TABLE[addr_q];
  end
endmodule
