// tb_phase_accum: self-checking test of the 32-bit phase accumulator.
//
// A 64-bit reference phase is advanced by the tuning word every clock and
// reduced modulo 2^32; count_out must equal its top 20 bits one edge after
// each update. The tuning words of the frequency table (1 Hz .. 30 MHz) and
// random words are applied, and the test checks that wrap-around happens and
// that a new FTW takes effect on the next edge.
module tb_phase_accum;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] ftw;
  logic [19:0] count_out;
  int          checks = 0, failures = 0, wraps = 0;
  longint unsigned ref_phase;

  phase_accum dut (.clk, .rst_n, .ftw, .count_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    @(posedge clk);
    ref_phase = (ref_phase + 64'(ftw)) % 64'h1_0000_0000;
    #1;
    checks++;
    if (count_out !== 20'(ref_phase >> 12)) begin
      failures++;
      $display("mismatch: ftw=%h count_out=%h expected=%h", ftw, count_out, 20'(ref_phase >> 12));
    end
  endtask

  localparam logic [31:0] FTWS [8] = '{32'd1, 32'd43, 32'd42950, 32'd42949673,
                                       32'd214748365, 32'd107374182, 32'd322122547,
                                       32'hFFFF_FFFF};
  initial begin
    logic [19:0] prev;
    rst_n = 1'b0;
    ftw   = 32'h1234_5678;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (count_out !== '0) begin failures++; $display("reset did not clear the phase"); end
    ref_phase = 0;
    rst_n = 1'b1;
    foreach (FTWS[k]) begin
      ftw = FTWS[k];
      for (int n = 0; n < 600; n++) begin
        prev = count_out;
        step_and_check();
        if (count_out < prev) wraps++;
      end
    end
    for (int n = 0; n < 2000; n++) begin
      if (n % 50 == 0) ftw = $urandom;
      prev = count_out;
      step_and_check();
      if (count_out < prev) wraps++;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("accumulator never wrapped"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
