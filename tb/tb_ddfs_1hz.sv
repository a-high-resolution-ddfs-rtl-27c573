// tb_ddfs_1hz: the slowest tone of the frequency table run for a full period.
//
// At a 100 MHz clock, FTW = 43 gives 1.0012 Hz, a period of 2^32 / 43 =
// 99,882,960 clock cycles. The testbench starts the tone from phase 0 after a
// reset and records the falling and the rising zero crossing of douty. The
// falling one must come half a period after the start and the rising one a
// full period after it, both within 2 cycles (plus the 4-cycle latency).
// About 10^8 cycles are simulated, with little work per cycle.
module tb_ddfs_1hz;
  localparam longint unsigned FTW_1HZ = 43;

  logic               clk = 1'b0;
  logic               rst_n;
  logic        [31:0] ftw;
  logic signed [15:0] douty;
  int                 checks = 0, failures = 0;

  ddfs_top dut (.clk, .rst_n, .ftw, .douty);

  always #5 clk = ~clk;

  initial begin
    repeat (110_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cycle = 0, fall = -1, rise = -1;
    real    period = 4294967296.0 / real'(FTW_1HZ);
    logic signed [15:0] prev;
    rst_n = 1'b0;
    ftw   = 32'(FTW_1HZ);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;     // first accumulator update on the next edge
    prev  = 16'sd0;
    while (rise < 0) begin
      @(posedge clk);
      cycle++;
      #1;
      if (prev >= 0 && douty < 0 && fall < 0) fall = cycle;
      if (prev < 0 && douty >= 0) rise = cycle;
      prev = douty;
    end
    $display("falling crossing at %0d, rising at %0d cycles; period %f cycles", fall, rise, period);
    checks++;
    if (real'(fall - 4) < period / 2.0 - 2.0 || real'(fall - 4) > period / 2.0 + 2.0) begin
      failures++;
      $display("half period off");
    end
    checks++;
    if (real'(rise - 4) < period - 2.0 || real'(rise - 4) > period + 2.0) begin
      failures++;
      $display("period off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
