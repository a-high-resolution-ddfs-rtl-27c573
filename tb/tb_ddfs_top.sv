// tb_ddfs_top: end-to-end test of the DDFS at its default sizes.
//
// The testbench keeps its own 64-bit phase accumulator and, from the phase
// three edges back, predicts every douty sample bit-exactly from reference
// tables (tb/tiv_ref.hex, tb/to_ref.hex, generated separately) and also checks
// it against an ideal sine, within 3.5 LSB. It runs the tuning words of the
// frequency table at 100 MHz and 400 MHz clocks (1 kHz .. 30 MHz, one full
// period of the 1 kHz tone included), measures the period from the rising
// zero crossings and compares it with 2^32 / FTW clock cycles, and measures the
// latency from an FTW change to the first changed output (4 edges).
// Mechanisms counted and required: mirrored quarters, negated half periods,
// FTW switches and accumulator wrap-around.
module tb_ddfs_top;
  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = 32765.0;

  logic               clk = 1'b0;
  logic               rst_n;
  logic        [31:0] ftw;
  logic signed [15:0] douty;

  logic [14:0] tiv_ref [1024];
  logic [5:0]  to_ref  [2048];

  int checks = 0, failures = 0;
  int n_mirror = 0, n_negate = 0, n_switch = 0, n_wrap = 0;
  real max_err = 0.0;

  ddfs_top dut (.clk, .rst_n, .ftw, .douty);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bit-exact expectation for a 20-bit phase, from the reference tables.
  function automatic int model(input logic [19:0] p);
    logic [17:0] w;
    int          s;
    w = p[18] ? (18'h3FFFF - p[17:0]) : p[17:0];
    s = int'(tiv_ref[w[17:8]]) + int'($signed(to_ref[{w[17:15], w[7:0]}]));
    return p[19] ? -(s + 1) : s;
  endfunction

  // phase history: hist[k] = top 20 bits of the reference phase after edge k
  logic [19:0]     hist [4];
  longint unsigned ref_acc;
  bit              checking = 0;

  always @(posedge clk) begin
    if (!rst_n) ref_acc <= 0;
    else        ref_acc <= (ref_acc + 64'(ftw)) % 64'h1_0000_0000;
  end

  // Compare after every edge once the pipeline holds known phases.
  always @(posedge clk) begin
    int  expected;
    real ideal, err;
    #1;
    hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0];
    hist[0] = 20'(ref_acc >> 12);
    if (hist[0] < hist[1]) n_wrap++;
    if (checking) begin
      expected = model(hist[3]);
      ideal    = AMP * $sin(2.0 * PI * (real'(hist[3]) + 0.5) / 1048576.0)
                      - (hist[3][19] ? 1.0 : 0.0);
      err      = real'(douty) - ideal;
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (int'(douty) != expected) begin
        failures++;
        if (failures < 10) $display("phase %h: douty=%0d expected=%0d", hist[3], douty, expected);
      end
      checks++;
      if (err > 3.5) begin
        failures++;
        if (failures < 10) $display("phase %h: douty=%0d is %f from the sine", hist[3], douty, err);
      end
      if (hist[3][18]) n_mirror++;
      if (hist[3][19]) n_negate++;
    end
  end

  // Run FTW for n cycles; check the period from rising zero crossings.
  task automatic run_tone(input logic [31:0] w, input int n, input string name);
    int  first = -1, last = -1, crossings = 0;
    logic signed [15:0] prev;
    real expected_period = 4294967296.0 / real'(w);
    real measured;
    @(negedge clk);
    ftw = w;
    n_switch++;
    repeat (4) @(posedge clk);   // let the new tone reach douty
    #2;
    prev = douty;
    for (int c = 0; c < n; c++) begin
      @(posedge clk);
      #2;
      if (prev < 0 && douty >= 0) begin
        if (first < 0) first = c;
        last = c;
        crossings++;
      end
      prev = douty;
    end
    checks++;
    if (crossings < 2) begin
      failures++;
      $display("%s: fewer than two zero crossings", name);
    end else begin
      measured = real'(last - first) / real'(crossings - 1);
      $display("%s: FTW=%h period %f cycles, expected %f", name, w, measured, expected_period);
      if ((real'(last - first) - expected_period * real'(crossings - 1)) > 1.5 ||
          (expected_period * real'(crossings - 1) - real'(last - first)) > 1.5) begin
        failures++;
        $display("%s: period off", name);
      end
    end
  endtask

  initial begin
    int latency;
    logic signed [15:0] held_sample;
    $readmemh("tb/tiv_ref.hex", tiv_ref);
    $readmemh("tb/to_ref.hex", to_ref);
    rst_n = 1'b0;
    ftw   = 32'd0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    checking = 1;
    // Latency: from FTW applied before an edge to the first changed sample.
    @(negedge clk);
    held_sample = douty;
    ftw = 32'd42949673;
    n_switch++;
    latency = 0;
    do begin
      @(posedge clk);
      #2;
      latency++;
    end while (douty == held_sample && latency < 20);
    checks++;
    $display("latency FTW -> douty: %0d edges", latency);
    if (latency != 4) begin
      failures++;
      $display("latency %0d, expected 4", latency);
    end
    // Table 2: 100 MHz clock rows, then 400 MHz clock rows
    run_tone(32'd42949673,  1000,   "1 MHz @ 100 MHz");
    run_tone(32'd214748365, 1000,   "5 MHz @ 100 MHz");
    run_tone(32'd107374182, 1000,   "10 MHz @ 400 MHz");
    run_tone(32'd214748365, 1000,   "20 MHz @ 400 MHz");
    run_tone(32'd322122547, 1000,   "30 MHz @ 400 MHz");
    run_tone(32'd42950,     210000, "1 kHz @ 100 MHz");
    // random tuning words
    for (int k = 0; k < 4; k++) run_tone(32'($urandom_range(32'h4000_0000, 32'h0100_0000)), 2000, "random");
    checking = 0;
    checks++;
    if (n_mirror == 0 || n_negate == 0 || n_switch < 2 || n_wrap == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("mirrored samples=%0d negated samples=%0d FTW switches=%0d wraps=%0d max |error|=%f LSB",
             n_mirror, n_negate, n_switch, n_wrap, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
