// tb_btm_output: self-checking test of the BTM adder and output stage.
//
// Random initial values, signed offsets and half-wave flags are applied; one
// edge later douty must be tiv + to in the first half period and
// -(tiv + to + 1) in the second, read as a signed 16-bit number. Sums near 0
// and near 2^15 - 1 and negative offsets are exercised on purpose. A reset
// must clear the output.
module tb_btm_output;
  logic               clk = 1'b0;
  logic               rst_n;
  logic        [14:0] tiv;
  logic signed [5:0]  to;
  logic               negate;
  logic signed [15:0] douty;
  int                 checks = 0, failures = 0, negs = 0, neg_offsets = 0;

  btm_output dut (.clk, .rst_n, .tiv, .to, .negate, .douty);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int t, input int o, input logic n);
    int sum, expected;
    tiv = 15'(t); to = 6'(o); negate = n;
    @(posedge clk);
    #1;
    sum      = t + o;
    expected = n ? -(sum + 1) : sum;
    checks++;
    if (int'(douty) != expected) begin
      failures++;
      $display("tiv=%0d to=%0d negate=%0b: douty=%0d expected=%0d", t, o, n, douty, expected);
    end
    if (n) negs++;
    if (o < 0) neg_offsets++;
  endtask

  initial begin
    int t, o;
    rst_n = 1'b0; tiv = 15'd1000; to = 6'sd3; negate = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (douty !== '0) begin failures++; $display("reset did not clear douty"); end
    rst_n = 1'b1;
    apply(25, -25, 1'b0);
    apply(25, -25, 1'b1);
    apply(32765, 2, 1'b0);
    apply(32765, 2, 1'b1);
    apply(16000, -17, 1'b1);
    for (int n = 0; n < 5000; n++) begin
      o = int'($urandom_range(50)) - 25;
      t = 25 + int'($urandom_range(32765 - 27));
      apply(t, o, 1'($urandom));
    end
    checks++;
    if (negs == 0 || neg_offsets == 0) begin failures++; $display("negation or negative offsets not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
