// tb_seg7_display: checks the four-digit multiplexed hex display.
//
// With CLK_HZ = 4000 and SCAN_HZ = 1000 each digit is lit for 4 clocks.
// For random 16-bit values the bench watches a full scan and checks that
// exactly one digit is enabled at a time, that each enabled digit shows the
// right nibble (expected segments listed here by letter, a..g), that every
// digit is visited, and that each stays lit for 4 clocks.
module tb_seg7_display;
  logic        clk = 0, rst;
  logic [15:0] value;
  logic [6:0]  seg_n;
  logic        dp_n;
  logic [3:0]  an_n;
  int          checks = 0, failures = 0;

  seg7_display #(.CLK_HZ(4000), .SCAN_HZ(1000)) dut (
    .clk(clk), .rst(rst), .value(value), .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] segs(logic [3:0] h);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    logic [6:0] r = '0;
    for (int i = 0; i < lit[h].len(); i++) r[lit[h][i] - "a"] = 1'b1;
    return r;
  endfunction

  initial begin
    rst = 1; value = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (300) begin
      bit [3:0] seen;
      value = $urandom;
      repeat (20) @(posedge clk);   // let the new value reach all digits
      seen = 0;
      repeat (32) begin
        int d;
        @(posedge clk); #1;
        d = -1;
        for (int i = 0; i < 4; i++) if (!an_n[i]) d = i;
        checks++;
        if ($countones(~an_n) != 1) begin failures++; $display("FAIL anodes %b", an_n); continue; end
        seen[d] = 1'b1;
        checks++;
        if (seg_n !== ~segs(value[4*d +: 4]) || dp_n !== 1'b1) begin
          failures++;
          $display("FAIL digit %0d of %h: seg_n %b", d, value, seg_n);
        end
      end
      checks++;
      if (seen != 4'b1111) begin failures++; $display("FAIL digits visited %b", seen); end
    end
    // Dwell time: count the cycles digit 0 stays enabled.
    begin
      int n = 0;
      @(negedge an_n[0]);
      #1;
      while (!an_n[0]) begin n++; @(posedge clk); #1; end
      checks++;
      if (n != 4) begin failures++; $display("FAIL dwell %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
