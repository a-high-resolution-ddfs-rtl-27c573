// ddfs_pkg: shared sizes of the bipartite-table sine DDFS.
//
// The phase accumulator is 32 bits wide and its top 20 bits drive the
// phase-to-amplitude stage: 2 quadrant bits and an 18-bit quarter-wave phase
// word. The phase word is split a + c = 10 + 8: the 10 upper bits address the
// table of initial values (TIV), the 3 most significant bits (b) together with
// the 8 low bits (c) address the table of offsets (TO). These numbers follow
// the source design. The 15-bit TIV word and the 6-bit signed TO word follow the
// printed port widths of its phase-to-amplitude block scheme; the 16-bit output
// is a sign bit above a 15-bit magnitude. The two-cycle table read latency is
// this design's choice (a block RAM with address and output registers).
package ddfs_pkg;
  localparam int unsigned ACC_W    = 32;  // phase accumulator width (N)
  localparam int unsigned PHASE_W  = 20;  // truncated phase: 2 quadrant bits + Q
  localparam int unsigned Q_W      = 18;  // quarter-wave phase word (Q = a + c)
  localparam int unsigned A_W      = 10;  // TIV address bits (a)
  localparam int unsigned B_W      = 3;   // slope segment bits (b)
  localparam int unsigned C_W      = 8;   // offset bits inside one TIV step (c)
  localparam int unsigned TIV_W    = 15;  // TIV word: quarter-wave magnitude
  localparam int unsigned TO_W     = 6;   // TO word: signed offset
  localparam int unsigned OUT_W    = 16;  // douty: sign + magnitude
  localparam int unsigned ROM_LAT  = 2;   // table read latency in clock cycles
  // Sine amplitude of the tables: the largest value for which TIV + TO never
  // exceeds 2^TIV_W - 1 anywhere on the quarter wave.
  localparam int unsigned AMP      = 32765;
  localparam real         PI       = 3.14159265358979323846;

  // Quadrant of the truncated phase: bit 1 = second half (negate),
  // bit 0 = odd quarter (mirror the phase word).
  typedef struct packed {
    logic negate;
    logic mirror;
  } quadrant_t;
endpackage
