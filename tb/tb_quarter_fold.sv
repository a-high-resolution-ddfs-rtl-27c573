// tb_quarter_fold: self-checking test of the quadrant address folding.
//
// With mirror = 0 the address must equal the phase word; with mirror = 1 it
// must be 2^18 - 1 - phase, the mirrored point of the quarter wave. Corner
// words and random words are checked in both modes.
module tb_quarter_fold;
  logic        mirror;
  logic [17:0] phase, addr;
  int          checks = 0, failures = 0;

  quarter_fold dut (.mirror, .phase, .addr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic m, input logic [17:0] p);
    int expected;
    mirror = m;
    phase  = p;
    #1;
    expected = m ? (2**18 - 1 - int'(p)) : int'(p);
    checks++;
    if (int'(addr) != expected) begin
      failures++;
      $display("mismatch: mirror=%0b phase=%0d addr=%0d expected=%0d", m, p, addr, expected);
    end
  endtask

  initial begin
    foreach (int_corner[k]) begin
      check(1'b0, int_corner[k]);
      check(1'b1, int_corner[k]);
    end
    for (int n = 0; n < 4000; n++) check(1'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [17:0] int_corner [6] = '{18'd0, 18'd1, 18'd255, 18'd256,
                                             18'h1FFFF, 18'h3FFFF};
endmodule
