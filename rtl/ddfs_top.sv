// ddfs_top: direct digital frequency synthesizer with bipartite sine tables.
//
// A 32-bit phase accumulator adds the frequency tuning word every clock, so
// f_out = FTW * f_clk / 2^32 (23.28 mHz steps at 100 MHz). Its top 20 bits are
// split into a quadrant (2 bits) and an 18-bit quarter-wave phase word. In odd
// quarters the phase word is inverted (mirroring), then its upper 10 bits read
// the table of initial values and its upper 3 bits with its lower 8 bits read
// the table of offsets. Their sum is the quarter-wave magnitude; in the second
// half period it is inverted and given a sign bit. douty is a 16-bit signed
// sample, -32768 .. 32767, with a spurious-free dynamic range above 100 dB.
//
// Interface: clk, rst_n (synchronous, active low), ftw[31:0], douty[15:0].
// Timing: one sample per clock. An FTW change reaches douty 4 edges later:
// accumulator (1), table address and output registers (2), output register
// (1). The half-period sign bit is delayed by the table latency so that it
// stays aligned with its table data.
// Structure, sizes and table split follow the source design; the reset, the table
// latency and the alignment delay are this design's choices.
module ddfs_top
  import ddfs_pkg::*;
#(
  parameter int unsigned FTW_W = ACC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [FTW_W-1:0] ftw,
  output logic signed [OUT_W-1:0] douty
);
  logic [PHASE_W-1:0]   count_out;
  quadrant_t            quad;
  logic [Q_W-1:0]       phase_word, addr;
  logic [TIV_W-1:0]     tiv_data;
  logic signed [TO_W-1:0] to_data;
  logic [ROM_LAT-1:0]   negate_dly;

  phase_accum #(.ACC_W(FTW_W), .OUT_W(PHASE_W)) u_phase_accum (
    .clk, .rst_n, .ftw, .count_out
  );

  assign quad       = quadrant_t'(count_out[PHASE_W-1 -: 2]);
  assign phase_word = count_out[Q_W-1:0];

  quarter_fold #(.Q_W(Q_W)) u_fold (
    .mirror(quad.mirror), .phase(phase_word), .addr
  );

  tiv_rom #(.A_W(A_W), .TIV_W(TIV_W)) u_initial_values (
    .clk, .addr(addr[Q_W-1 -: A_W]), .data(tiv_data)
  );

  to_rom #(.A_W(A_W), .B_W(B_W), .C_W(C_W), .TO_W(TO_W)) u_offset_values (
    .clk, .addr({addr[Q_W-1 -: B_W], addr[C_W-1:0]}), .data(to_data)
  );

  // Half-period sign, delayed to match the table read latency.
  always_ff @(posedge clk) begin
    if (!rst_n) negate_dly <= '0;
    else        negate_dly <= {negate_dly[ROM_LAT-2:0], quad.negate};
  end

  btm_output #(.TIV_W(TIV_W), .TO_W(TO_W)) u_output (
    .clk, .rst_n, .tiv(tiv_data), .to(to_data),
    .negate(negate_dly[ROM_LAT-1]), .douty
  );
endmodule
