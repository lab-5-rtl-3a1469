// tb_video_display: renders the text area of the register display and
// reads the characters back.
//
// The bench scans x = 0..639, y = 0..175 (text rows 0 to 10) with a pixel
// enable every clock, stores the colour that comes out one pixel later,
// then, for every 16x16 cell, checks that each glyph pixel is drawn as a
// 2x2 block and that the 8x8 picture equals the glyph (from a separate
// character generator) of the character expected there: the two name
// lines, then PC, IR, MAR, MDR, AC, PR in hex and Z, CLK in binary.  It
// checks the colours (white text, blue background, black outside the
// visible area) and that the syncs come out one pixel late.  Two sets of
// register values are shown, one after the other.
module tb_video_display;
  logic        clk = 0, rst, pix_ce, hs_in, vs_in, video_on;
  logic [9:0]  x, y;
  logic [7:0]  pc, mar;
  logic [15:0] ir, mdr, ac, pr;
  logic        z, cpu_clk;
  logic [2:0]  rgb;
  logic        hs, vs;
  logic [7:0]  ref_code;
  logic [2:0]  ref_row;
  logic [7:0]  ref_pixels;
  logic [2:0]  frame [176][640];
  int          checks = 0, failures = 0;

  video_display dut (.clk(clk), .rst(rst), .pix_ce(pix_ce), .x(x), .y(y), .hs_in(hs_in),
                     .vs_in(vs_in), .video_on(video_on), .pc(pc), .ir(ir), .mar(mar),
                     .mdr(mdr), .ac(ac), .pr(pr), .z(z), .cpu_clk(cpu_clk), .rgb(rgb),
                     .hs(hs), .vs(vs));
  char_rom u_ref (.code(ref_code), .row(ref_row), .pixels(ref_pixels));

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string hex(logic [15:0] v, int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, $sformatf("%h", v[4*i +: 4])};
    return s.toupper();
  endfunction

  function automatic string pad(string s, int n);
    while (s.len() < n) s = {s, " "};
    return s;
  endfunction

  task automatic render();
    logic hs_prev, vs_prev;
    @(negedge clk);
    pix_ce = 1; video_on = 1;
    for (int yy = 0; yy < 176; yy++) begin
      for (int xx = 0; xx < 640; xx++) begin
        x = 10'(xx); y = 10'(yy);
        hs_in = $urandom_range(1); vs_in = $urandom_range(1);
        hs_prev = hs_in; vs_prev = vs_in;
        @(posedge clk); #1;
        frame[yy][xx] = rgb;
        if (xx % 97 == 0) begin
          checks++;
          if (hs !== hs_prev || vs !== vs_prev) begin failures++; $display("FAIL sync delay"); end
        end
        @(negedge clk);
      end
    end
  endtask

  task automatic read_back(string lines [11]);
    for (int r = 0; r < 11; r++) begin
      for (int c = 0; c < 40; c++) begin
        logic [7:0] ch;
        ch = (c < lines[r].len()) ? lines[r][c] : " ";
        ref_code = ch;
        for (int py = 0; py < 8; py++) begin
          ref_row = 3'(py); #1;
          for (int px = 0; px < 8; px++) begin
            logic [2:0] want;
            want = ref_pixels[7 - px] ? 3'b111 : 3'b001;
            for (int d = 0; d < 4; d++) begin
              checks++;
              if (frame[16*r + 2*py + d/2][16*c + 2*px + d%2] !== want) begin
                failures++;
                if (failures < 20)
                  $display("FAIL row %0d col %0d ('%c') pixel (%0d,%0d)", r, c, ch, px, py);
              end
            end
          end
        end
      end
    end
  endtask

  initial begin
    string lines [11];
    rst = 1; pix_ce = 0; video_on = 0; x = 0; y = 0; hs_in = 1; vs_in = 1;
    pc = 8'h3C; ir = 16'h0B16; mar = 8'h81; mdr = 16'hBEEF; ac = 16'h7FFF; pr = 16'h2AC5;
    z = 1; cpu_clk = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 2; t++) begin
      lines[0]  = " UP1 COMPUTER";
      lines[1]  = " VIDEO REGISTER VIEW";
      lines[2]  = "";
      lines[3]  = {" PC   ", hex(16'(pc), 2)};
      lines[4]  = {" IR   ", hex(ir, 4)};
      lines[5]  = {" MAR  ", hex(16'(mar), 2)};
      lines[6]  = {" MDR  ", hex(mdr, 4)};
      lines[7]  = {" AC   ", hex(ac, 4)};
      lines[8]  = {" PR   ", hex(pr, 4)};
      lines[9]  = {" Z    ", z ? "1" : "0"};
      lines[10] = {" CLK  ", cpu_clk ? "1" : "0"};
      render();
      read_back(lines);
      pc = 8'hD2; ir = 16'h0981; mar = 8'h07; mdr = 16'h0964; ac = 16'hA5F0; pr = 16'h6FF1;
      z = 0; cpu_clk = 1;
    end
    // Outside the visible area the colour is black.
    video_on = 0; x = 10'd700; y = 10'd20;
    @(posedge clk); #1;
    checks++;
    if (rgb !== 3'b000) begin failures++; $display("FAIL blanking colour %b", rgb); end
    // Without a pixel enable the outputs hold.
    pix_ce = 0; video_on = 1; x = 10'd20; y = 10'd20;
    @(posedge clk); #1;
    checks++;
    if (rgb !== 3'b000) begin failures++; $display("FAIL output moved without pixel enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
