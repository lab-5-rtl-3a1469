// seg7_display: shows a 16-bit value as four hexadecimal digits on a
// multiplexed four-digit seven-segment display.
//
// The display shares one set of segment lines among four digits; a refresh
// counter enables one digit at a time (`an_n`, active low, digit 3 = most
// significant nibble) and drives its pattern on `seg_n` (active low,
// bit 0 = segment a ... bit 6 = segment g).  Each digit is lit for
// CLK_HZ/SCAN_HZ clock cycles, so the whole display refreshes at SCAN_HZ/4.
// The decimal point is kept dark.  Outputs are registered; `rst`
// (synchronous) starts the scan at digit 0.
// That PR is shown on the four-character display is the specification's;
// the active-low pins, the scan rate and the hex glyphs are this design's
// choices for a common-anode board display.
module seg7_display #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 1000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] value,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  output logic [3:0]  an_n
);

  localparam int unsigned DIV   = (CLK_HZ / SCAN_HZ > 0) ? CLK_HZ / SCAN_HZ : 1;
  localparam int unsigned CNT_W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CNT_W-1:0] cnt;
  logic [1:0]       digit;
  logic [3:0]       nib;

  // Segment patterns, active high, {g,f,e,d,c,b,a}.
  function automatic logic [6:0] hex7(input logic [3:0] h);
    case (h)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      default: return 7'b1110001;  // F
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt == CNT_W'(DIV - 1)) begin
      cnt   <= '0;
      digit <= digit + 2'd1;
    end else begin
      cnt   <= cnt + 1'b1;
    end
  end

  assign nib = value[4*digit +: 4];

  always_ff @(posedge clk) begin
    if (rst) begin
      seg_n <= '1;
      an_n  <= '1;
    end else begin
      seg_n <= ~hex7(nib);
      an_n  <= ~(4'b0001 << digit);
    end
  end

  assign dp_n = 1'b1;

endmodule
