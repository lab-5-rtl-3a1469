// char_rom: character generator for the register display.
//
// Given a character code (ASCII) and a row 0..7 of its 8x8 cell, returns
// the eight pixels of that row, bit 7 = leftmost pixel.  Glyphs are 5x7
// dot-matrix shapes placed in columns 1..5 and rows 0..6 of the cell, so
// row 7 and columns 0, 6, 7 are the gap between characters.  The set covers
// what the display shows: space, 0-9, A-Z, ':' and '-'; any other code is
// blank.  Each glyph is stored as five column bytes (bit 0 = top row), the
// usual layout of 5x7 LCD fonts.  Purely combinational (a ROM read).
// The font itself is this design's own; the specification names only the
// text to be shown.
module char_rom (
  input  logic [7:0] code,
  input  logic [2:0] row,
  output logic [7:0] pixels
);

  logic [39:0] glyph;   // {col0, col1, col2, col3, col4}

  always_comb begin
    case (code)
      8'h30: glyph = 40'h3E_51_49_45_3E;  // 0
      8'h31: glyph = 40'h00_42_7F_40_00;  // 1
      8'h32: glyph = 40'h42_61_51_49_46;  // 2
      8'h33: glyph = 40'h21_41_45_4B_31;  // 3
      8'h34: glyph = 40'h18_14_12_7F_10;  // 4
      8'h35: glyph = 40'h27_45_45_45_39;  // 5
      8'h36: glyph = 40'h3C_4A_49_49_30;  // 6
      8'h37: glyph = 40'h01_71_09_05_03;  // 7
      8'h38: glyph = 40'h36_49_49_49_36;  // 8
      8'h39: glyph = 40'h06_49_49_29_1E;  // 9
      8'h3A: glyph = 40'h00_36_36_00_00;  // :
      8'h2D: glyph = 40'h08_08_08_08_08;  // -
      8'h41: glyph = 40'h7E_11_11_11_7E;  // A
      8'h42: glyph = 40'h7F_49_49_49_36;  // B
      8'h43: glyph = 40'h3E_41_41_41_22;  // C
      8'h44: glyph = 40'h7F_41_41_22_1C;  // D
      8'h45: glyph = 40'h7F_49_49_49_41;  // E
      8'h46: glyph = 40'h7F_09_09_09_01;  // F
      8'h47: glyph = 40'h3E_41_49_49_7A;  // G
      8'h48: glyph = 40'h7F_08_08_08_7F;  // H
      8'h49: glyph = 40'h00_41_7F_41_00;  // I
      8'h4A: glyph = 40'h20_40_41_3F_01;  // J
      8'h4B: glyph = 40'h7F_08_14_22_41;  // K
      8'h4C: glyph = 40'h7F_40_40_40_40;  // L
      8'h4D: glyph = 40'h7F_02_0C_02_7F;  // M
      8'h4E: glyph = 40'h7F_04_08_10_7F;  // N
      8'h4F: glyph = 40'h3E_41_41_41_3E;  // O
      8'h50: glyph = 40'h7F_09_09_09_06;  // P
      8'h51: glyph = 40'h3E_41_51_21_5E;  // Q
      8'h52: glyph = 40'h7F_09_19_29_46;  // R
      8'h53: glyph = 40'h46_49_49_49_31;  // S
      8'h54: glyph = 40'h01_01_7F_01_01;  // T
      8'h55: glyph = 40'h3F_40_40_40_3F;  // U
      8'h56: glyph = 40'h1F_20_40_20_1F;  // V
      8'h57: glyph = 40'h3F_40_38_40_3F;  // W
      8'h58: glyph = 40'h63_14_08_14_63;  // X
      8'h59: glyph = 40'h07_08_70_08_07;  // Y
      8'h5A: glyph = 40'h61_51_49_45_43;  // Z
      default: glyph = '0;                // space and anything else
    endcase

    // Column c of the glyph is byte (4 - c) of `glyph`; pixel column c + 1.
    pixels = '0;
    for (int c = 0; c < 5; c++) begin
      pixels[6 - c] = glyph[8 * (4 - c) + 32'(row)];
    end
  end

endmodule
