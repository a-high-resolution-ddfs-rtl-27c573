// tb_to_rom: self-checking test of the table of offsets.
//
// All 2048 words are read and compared, two edges after their address, with a
// reference table (tb/to_ref.hex, built separately from the centred-offset
// formula). The test also checks the structure of each segment: offsets rise
// with the position j, the first and last offset of a segment are negatives
// of each other, and every offset fits the signed 6-bit range.
module tb_to_rom;
  logic              clk = 1'b0;
  logic [10:0]       addr;
  logic signed [5:0] data;
  logic [5:0]        ref_tab [2048];
  logic signed [5:0] got [2048];
  int                checks = 0, failures = 0;

  to_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/to_ref.hex", ref_tab);
    for (int i = 0; i < 2048 + 1; i++) begin
      addr = 11'(i);
      @(posedge clk);
      #1;
      if (i >= 1) begin
        got[i-1] = data;
        checks++;
        if (data !== $signed(ref_tab[i-1])) begin
          failures++;
          $display("word %0d: got %0d expected %0d", i - 1, data, $signed(ref_tab[i-1]));
        end
      end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (got[s*256] != -got[s*256 + 255]) begin
        failures++;
        $display("segment %0d: ends %0d and %0d not symmetric", s, got[s*256], got[s*256+255]);
      end
      for (int j = 1; j < 256; j++) begin
        checks++;
        if (got[s*256 + j] < got[s*256 + j - 1]) begin
          failures++;
          $display("segment %0d: offset falls at j=%0d", s, j);
        end
      end
      // the slope of sine falls from segment to segment
      if (s > 0) begin
        checks++;
        if (got[s*256] < got[(s-1)*256]) begin
          failures++;
          $display("segment %0d: slope larger than in segment %0d", s, s - 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
