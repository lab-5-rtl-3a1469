// vga_sync: VGA raster timing for the register display.
//
// A pixel enable `pix_ce` is made by dividing `clk` by PIX_DIV (50 MHz / 2
// = 25 MHz pixel rate).  On each pixel enable the horizontal counter `x`
// steps through H_VISIBLE + H_FRONT + H_SYNC + H_BACK pixels, and at the end
// of a line the vertical counter `y` steps through the lines the same way.
// `hs` and `vs` are low during their sync pulses; `video_on` is high while
// (x, y) lies in the visible area.  Outputs are registered counters or
// functions of them; `rst` (synchronous) starts at (0, 0).
// The specification only asks for a VGA monitor output; the 640x480 60 Hz
// timing with negative sync pulses is this design's choice.
module vga_sync #(
  parameter int unsigned PIX_DIV   = 2,
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic       pix_ce,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       hs,
  output logic       vs,
  output logic       video_on,
  output logic       frame_end
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;
  localparam int unsigned DIV_W   = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  logic [DIV_W-1:0] div;
  logic             line_end;

  always_ff @(posedge clk) begin
    if (rst || div == DIV_W'(PIX_DIV - 1)) div <= '0;
    else                                   div <= div + 1'b1;
  end

  assign pix_ce    = !rst && (div == DIV_W'(PIX_DIV - 1));
  assign line_end  = (x == 10'(H_TOTAL - 1));
  assign frame_end = pix_ce && line_end && (y == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0;
      y <= '0;
    end else if (pix_ce) begin
      if (line_end) begin
        x <= '0;
        y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 10'd1;
      end else begin
        x <= x + 10'd1;
      end
    end
  end

  assign hs = !((x >= 10'(H_VISIBLE + H_FRONT)) && (x < 10'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vs = !((y >= 10'(V_VISIBLE + V_FRONT)) && (y < 10'(V_VISIBLE + V_FRONT + V_SYNC)));
  assign video_on = (x < 10'(H_VISIBLE)) && (y < 10'(V_VISIBLE));

endmodule
