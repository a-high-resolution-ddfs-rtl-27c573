// phase_accum: DDFS phase accumulator (the "counter" of the design).
//
// A 32-bit register adds the frequency tuning word FTW on every rising clock
// edge and wraps modulo 2^32, so the output frequency is
// f_out = FTW * f_clk / 2^32. Only the 20 most significant accumulator bits are
// brought out (count_out = acc[31:12]); the lower 12 bits carry phase
// resolution but do not address the tables.
//
// Interface: clk, synchronous active-low reset rst_n (clears the phase to 0),
// ftw[ACC_W-1:0], count_out[OUT_W-1:0].
// Timing: count_out is registered; an FTW change affects count_out one edge
// later. The widths follow the source design; the reset is this design's addition.
module phase_accum #(
  parameter int unsigned ACC_W = ddfs_pkg::ACC_W,
  parameter int unsigned OUT_W = ddfs_pkg::PHASE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] ftw,
  output logic [OUT_W-1:0] count_out
);
  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + ftw;
  end

  assign count_out = acc[ACC_W-1 -: OUT_W];
endmodule
