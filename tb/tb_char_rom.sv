// tb_char_rom: checks the character generator.
//
// Six glyphs are compared pixel by pixel with pictures drawn here ('#' =
// lit).  For the whole set (0-9, A-Z) the bench checks that every glyph is
// non-blank, that no two glyphs are equal, and that row 7 and columns 0,
// 6 and 7 (the gaps between characters) are always dark.  Space and codes
// outside the set must be blank.
module tb_char_rom;
  logic [7:0] code;
  logic [2:0] row;
  logic [7:0] pixels;
  int         checks = 0, failures = 0;

  char_rom dut (.code(code), .row(row), .pixels(pixels));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_glyph(input logic [7:0] c, output logic [55:0] g);
    code = c;
    for (int r = 0; r < 7; r++) begin
      row = 3'(r);
      #1;
      g[8*r +: 8] = pixels;
    end
  endtask

  task automatic picture(logic [7:0] c, string rows [7]);
    logic [55:0] g;
    read_glyph(c, g);
    for (int r = 0; r < 7; r++) begin
      for (int col = 0; col < 5; col++) begin
        checks++;
        if (g[8*r + 6 - col] !== (rows[r][col] == "#")) begin
          failures++;
          $display("FAIL glyph '%c' row %0d col %0d", c, r, col);
        end
      end
    end
  endtask

  initial begin
    logic [55:0] set [$];
    picture("0", '{".###.", "#...#", "#..##", "#.#.#", "##..#", "#...#", ".###."});
    picture("1", '{"..#..", ".##..", "..#..", "..#..", "..#..", "..#..", ".###."});
    picture("A", '{".###.", "#...#", "#...#", "#...#", "#####", "#...#", "#...#"});
    picture("C", '{".###.", "#...#", "#....", "#....", "#....", "#...#", ".###."});
    picture("H", '{"#...#", "#...#", "#...#", "#####", "#...#", "#...#", "#...#"});
    picture("P", '{"####.", "#...#", "#...#", "####.", "#....", "#....", "#...."});
    for (int c = 0; c < 256; c++) begin
      logic [55:0] g;
      bit in_set;
      read_glyph(8'(c), g);
      in_set = (c >= 8'h30 && c <= 8'h39) || (c >= 8'h41 && c <= 8'h5A);
      code = 8'(c); row = 3'd7; #1;
      checks++;
      if (pixels !== 8'h00) begin failures++; $display("FAIL row 7 of %h", c); end
      for (int r = 0; r < 7; r++) begin
        checks++;
        if ((g[8*r +: 8] & 8'b1000_0011) != 0) begin failures++; $display("FAIL gap of %h", c); end
      end
      if (in_set) begin
        checks++;
        if (g == 0) begin failures++; $display("FAIL glyph %h blank", c); end
        foreach (set[i]) begin
          checks++;
          if (set[i] == g) begin failures++; $display("FAIL glyph %h repeats another", c); end
        end
        set.push_back(g);
      end else if (c != 8'h3A && c != 8'h2D) begin
        checks++;
        if (g != 0) begin failures++; $display("FAIL code %h not blank", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
