// btm_output: BTM adder, half-wave sign and output register (douty).
//
// The quarter-wave magnitude is f_app = TIV + TO, the signed 6-bit offset
// being sign-extended to the 15-bit TIV width. In the second half of the sine
// period (negate = 1) the magnitude is bitwise inverted and a 1 is placed in
// the sign bit, so douty = {1, ~f_app}, which read as a 16-bit two's complement
// number is -(f_app + 1). The output is therefore symmetric about -1/2 LSB;
// inverting its most significant bit gives offset binary for a DAC.
//
// Interface: clk, rst_n (synchronous, clears douty), tiv[TIV_W-1:0],
// to[TO_W-1:0] signed, negate, douty[TIV_W:0] signed.
// Timing: one register; douty follows its inputs by one edge.
// The adder, inverter, multiplexer and output register follow the source design's
// block scheme; the sign-bit placement and the reset are this design's choices.
module btm_output #(
  parameter int unsigned TIV_W = ddfs_pkg::TIV_W,
  parameter int unsigned TO_W  = ddfs_pkg::TO_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [TIV_W-1:0] tiv,
  input  logic signed [TO_W-1:0]  to,
  input  logic                    negate,
  output logic signed [TIV_W:0]   douty
);
  logic [TIV_W:0]   sum_wide;   // one extra bit to catch a table overflow
  logic [TIV_W-1:0] f_app;

  always_comb begin
    sum_wide = {1'b0, tiv} + {{(TIV_W+1-TO_W){to[TO_W-1]}}, to};
    f_app    = sum_wide[TIV_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      douty <= '0;
    else if (negate) douty <= {1'b1, ~f_app};
    else             douty <= {1'b0, f_app};
  end

  // The tables are built so that TIV + TO stays inside 0 .. 2^TIV_W - 1.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  sum_wide[TIV_W] == 1'b0)
    else $error("btm_output: TIV + TO left the %0d-bit range", TIV_W);
endmodule
