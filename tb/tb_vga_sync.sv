// tb_vga_sync: checks the VGA raster timing at the default 640x480 60 Hz
// settings over two full frames.
//
// The bench counts pixel enables itself and derives the expected column
// (count mod 800) and line (count / 800 mod 525).  Each pixel it checks the
// counters, hs low exactly for columns 656-751, vs low exactly for lines
// 490-491, video_on for the 640x480 visible area, a pixel enable every
// second clock and one frame_end per 420000 pixels.
module tb_vga_sync;
  logic       clk = 0, rst;
  logic       pix_ce, hs, vs, video_on, frame_end;
  logic [9:0] x, y;
  int         checks = 0, failures = 0;
  int         p, xe, ye, since, frames, vis;

  vga_sync dut (.clk(clk), .rst(rst), .pix_ce(pix_ce), .x(x), .y(y), .hs(hs), .vs(vs),
                .video_on(video_on), .frame_end(frame_end));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pixel %0d (x=%0d y=%0d)", msg, p, x, y);
    end
  endtask

  initial begin
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    p = 0; since = 0; frames = 0; vis = 0;
    while (p < 2 * 800 * 525) begin
      @(negedge clk);
      since++;
      if (pix_ce) begin
        xe = p % 800;
        ye = (p / 800) % 525;
        check(since == 2 || p == 0, "pixel enable period");
        since = 0;
        check(x == 10'(xe) && y == 10'(ye), "counters");
        check(hs == !(xe >= 656 && xe < 752), "hsync");
        check(vs == !(ye >= 490 && ye < 492), "vsync");
        check(video_on == (xe < 640 && ye < 480), "video_on");
        check(frame_end == (xe == 799 && ye == 524), "frame_end");
        if (video_on) vis++;
        if (frame_end) frames++;
        p++;
      end else begin
        check(!frame_end, "frame_end only with pixel enable");
      end
    end
    check(frames == 2, "two frames");
    check(vis == 2 * 640 * 480, "visible pixel count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
