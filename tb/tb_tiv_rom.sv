// tb_tiv_rom: self-checking test of the table of initial values.
//
// Every one of the 1024 words is read with back-to-back addresses and
// compared, two edges later, with a reference table (tb/tiv_ref.hex, built
// separately from round(32765 * sin((i + 1/2) * (pi/2) / 1024))). Each word is
// also checked to lie within half an LSB of that sine, and the table must rise
// monotonically over the quarter wave.
module tb_tiv_rom;
  logic        clk = 1'b0;
  logic [9:0]  addr;
  logic [14:0] data;
  logic [14:0] ref_tab [1024];
  int          checks = 0, failures = 0;

  tiv_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  prev = -1;
    int  k;
    real ideal;
    $readmemh("tb/tiv_ref.hex", ref_tab);
    for (int i = 0; i < 1024 + 1; i++) begin
      addr = 10'(i);
      @(posedge clk);
      #1;
      // data now holds the word whose address was set before the previous edge
      if (i >= 1) begin
        k = i - 1;
        checks++;
        if (data !== ref_tab[k]) begin
          failures++;
          $display("word %0d: got %0d expected %0d", k, data, ref_tab[k]);
        end
        ideal = 32765.0 * $sin((real'(k) + 0.5) * 3.14159265358979 / 2048.0);
        checks++;
        if (real'(data) - ideal > 0.5001 || ideal - real'(data) > 0.5001) begin
          failures++;
          $display("word %0d: %0d is not round(%f)", k, data, ideal);
        end
        checks++;
        if (int'(data) < prev) begin
          failures++;
          $display("word %0d: table not monotonic", k);
        end
        prev = int'(data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
