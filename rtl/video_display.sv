// video_display: text-mode VGA view of the uP1 registers.
//
// The 640x480 screen is a grid of 40 x 30 character cells, each an 8x8
// glyph drawn at double size (16x16 pixels).  Rows 0 and 1 show the two
// name strings NAME1 and NAME2.  Rows 3 to 10 show one register each, name
// at column 1 and value from column 6:
//     PC  2 hex digits      IR  4 hex digits     MAR 2 hex digits
//     MDR 4 hex digits      AC  4 hex digits     PR  4 hex digits
//     Z   1 binary digit    CLK 1 binary digit
// The logic only observes the processor; nothing here drives it.
//
// For every pixel the cell (x/16, y/16) selects a character code, the
// character generator returns the glyph row (y/2 mod 8), and bit x/2 mod 8
// of it gives the pixel.  That result and the sync inputs are registered
// together on the pixel enable, so `rgb`, `hs` and `vs` all lag the raster
// counters by one pixel and stay aligned.  Text is white on blue; outside
// the visible area the colour outputs are 0.
// The list of registers shown, the hex/binary forms and the two name lines
// follow the specification; the layout, font size and colours are this
// design's own.
module video_display #(
  parameter int unsigned  NAME_LEN = 20,
  parameter logic [8*NAME_LEN-1:0] NAME1 = "UP1 COMPUTER        ",
  parameter logic [8*NAME_LEN-1:0] NAME2 = "VIDEO REGISTER VIEW "
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_ce,
  input  logic [9:0]  x,
  input  logic [9:0]  y,
  input  logic        hs_in,
  input  logic        vs_in,
  input  logic        video_on,
  input  logic [7:0]  pc,
  input  logic [15:0] ir,
  input  logic [7:0]  mar,
  input  logic [15:0] mdr,
  input  logic [15:0] ac,
  input  logic [15:0] pr,
  input  logic        z,
  input  logic        cpu_clk,
  output logic [2:0]  rgb,
  output logic        hs,
  output logic        vs
);

  localparam int unsigned VALUE_COL = 6;

  logic [5:0]  col;
  logic [5:0]  row;
  logic [7:0]  code;
  logic [7:0]  glyph_row;
  logic        pixel;

  assign col = x[9:4];
  assign row = y[9:4];

  function automatic logic [7:0] hex_char(input logic [3:0] n);
    return (n < 4'd10) ? 8'h30 + 8'(n) : 8'h41 + 8'(n) - 8'd10;
  endfunction

  // Character at cell (row, col).
  always_comb begin
    logic [23:0] label;
    logic [15:0] value;
    int unsigned digits;   // 0: row has no value
    logic        binary;
    int          k;

    label  = "   ";
    value  = '0;
    digits = 0;
    binary = 1'b0;
    code   = 8'h20;
    k      = 0;

    case (row)
      6'd3:  begin label = "PC ";  value = {8'h00, pc};  digits = 2; end
      6'd4:  begin label = "IR ";  value = ir;           digits = 4; end
      6'd5:  begin label = "MAR";  value = {8'h00, mar}; digits = 2; end
      6'd6:  begin label = "MDR";  value = mdr;          digits = 4; end
      6'd7:  begin label = "AC ";  value = ac;           digits = 4; end
      6'd8:  begin label = "PR ";  value = pr;           digits = 4; end
      6'd9:  begin label = "Z  ";  value = {15'd0, z};   digits = 1; binary = 1'b1; end
      6'd10: begin label = "CLK";  value = {15'd0, cpu_clk}; digits = 1; binary = 1'b1; end
      default: ;
    endcase

    if (row == 6'd0 || row == 6'd1) begin
      if (col >= 6'd1 && 32'(col) <= NAME_LEN) begin
        k    = int'(col) - 1;
        code = (row == 6'd0) ? NAME1[8*(NAME_LEN-1-k) +: 8] : NAME2[8*(NAME_LEN-1-k) +: 8];
      end
    end else if (digits != 0) begin
      if (col >= 6'd1 && col <= 6'd3) begin
        k    = int'(col) - 1;
        code = label[8*(2-k) +: 8];
      end else if (32'(col) >= VALUE_COL && 32'(col) < VALUE_COL + digits) begin
        k    = int'(col) - int'(VALUE_COL);          // 0 = most significant
        code = binary ? (value[0] ? 8'h31 : 8'h30)
                      : hex_char(value[4*(int'(digits)-1-k) +: 4]);
      end
    end
  end

  char_rom u_font (
    .code   (code),
    .row    (y[3:1]),
    .pixels (glyph_row)
  );

  assign pixel = glyph_row[3'd7 - x[3:1]];

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb <= '0;
      hs  <= 1'b1;
      vs  <= 1'b1;
    end else if (pix_ce) begin
      rgb <= !video_on ? 3'b000 : (pixel ? 3'b111 : 3'b001);
      hs  <= hs_in;
      vs  <= vs_in;
    end
  end

endmodule
