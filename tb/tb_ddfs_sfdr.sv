// tb_ddfs_sfdr: spurious-free dynamic range of the DDFS output.
//
// With FTW = 2^12 the 20-bit table phase advances by one step per clock, so
// 2^20 consecutive samples form exactly one period that visits every table
// entry in every quarter. The testbench captures that period from douty,
// computes its spectrum with an in-testbench radix-2 FFT and reports the
// ratio of the fundamental to the largest other (non-DC) bin. The design
// target is an SFDR above 100 dB; the capture takes 2^20 + a few cycles.
module tb_ddfs_sfdr;
  localparam int  LOG_N = 20;
  localparam int  N     = 1 << LOG_N;
  localparam real PI    = 3.14159265358979323846;

  logic               clk = 1'b0;
  logic               rst_n;
  logic        [31:0] ftw;
  logic signed [15:0] douty;

  real re [N];
  real im [N];
  int  checks = 0, failures = 0;

  ddfs_top dut (.clk, .rst_n, .ftw, .douty);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    #100000000;   // room for the FFT, which runs without clock edges
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bit_reverse(input int x);
    int r = 0;
    for (int b = 0; b < LOG_N; b++) r |= ((x >> b) & 1) << (LOG_N - 1 - b);
    return r;
  endfunction

  task automatic fft();
    real tr, ti, wr, wi, ur, ui;
    int  j;
    for (int i = 0; i < N; i++) begin
      j = bit_reverse(i);
      if (j > i) begin
        tr = re[i]; re[i] = re[j]; re[j] = tr;
        ti = im[i]; im[i] = im[j]; im[j] = ti;
      end
    end
    for (int len = 2; len <= N; len <<= 1) begin
      for (int k = 0; k < len / 2; k++) begin
        wr = $cos(-2.0 * PI * real'(k) / real'(len));
        wi = $sin(-2.0 * PI * real'(k) / real'(len));
        for (int s = 0; s < N; s += len) begin
          ur = re[s + k + len/2] * wr - im[s + k + len/2] * wi;
          ui = re[s + k + len/2] * wi + im[s + k + len/2] * wr;
          re[s + k + len/2] = re[s + k] - ur;
          im[s + k + len/2] = im[s + k] - ui;
          re[s + k] = re[s + k] + ur;
          im[s + k] = im[s + k] + ui;
        end
      end
    end
  endtask

  initial begin
    real fund, spur, mag, sfdr_db;
    int  spur_bin;
    rst_n = 1'b0;
    ftw   = 32'd1 << 12;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);   // pipeline filled with the first phases
    for (int i = 0; i < N; i++) begin
      #1;
      re[i] = real'(douty);
      im[i] = 0.0;
      @(posedge clk);
    end
    fft();
    fund = $sqrt(re[1] * re[1] + im[1] * im[1]);
    spur = 0.0;
    spur_bin = 0;
    for (int k = 2; k <= N / 2; k++) begin
      mag = $sqrt(re[k] * re[k] + im[k] * im[k]);
      if (mag > spur) begin spur = mag; spur_bin = k; end
    end
    sfdr_db = 20.0 * $log10(fund / spur);
    $display("fundamental %e, largest spur %e at bin %0d, SFDR %f dB", fund, spur, spur_bin, sfdr_db);
    checks++;
    if (!(sfdr_db > 100.0)) begin
      failures++;
      $display("SFDR below 100 dB");
    end
    // the fundamental must carry the full amplitude: |X[1]| = N/2 * 32765
    checks++;
    if (fund < 0.999 * real'(N) / 2.0 * 32765.0 || fund > 1.001 * real'(N) / 2.0 * 32765.0) begin
      failures++;
      $display("fundamental amplitude off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
