// up1_system: the uP1 computer on an FPGA board, with a seven-segment and a
// VGA view of the running processor.
//
// Everything runs from the 50 MHz board clock `clk`.  clk_divider turns it
// into the processor clock enable: about 1 Hz with `sw7` = 0, so every step
// can be read off the monitor, and FAST_HZ with `sw7` = 1, so the Fibonacci
// numbers written to the PR port flow by on the seven-segment digits.  The
// processor (up1_cpu) runs the Fibonacci program held in its ROM.  PR is
// shown as four hex digits by seg7_display and, with PC, IR, MAR, MDR, AC,
// Z and the processor clock level, as text on a VGA monitor by vga_sync and
// video_display.  The display logic only reads processor signals.
//
// `rst` is synchronous and active high.  BYPASS_DIV makes the processor
// advance on every board clock, for simulation.  The PR value is also a
// port, for test benches and for wiring to other board outputs.
module up1_system
  import up1_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned SLOW_HZ    = 1,
  parameter int unsigned FAST_HZ    = 100,
  parameter bit          BYPASS_DIV = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sw7,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  output logic [3:0]  an_n,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic [2:0]  vga_rgb,
  output logic [15:0] pr
);

  logic   cpu_ce, cpu_clk;
  addr_t  pc, mar;
  word_t  ir, mdr, ac;
  logic   flag_n, flag_z, mem_we;
  state_e state;

  logic       pix_ce, hs_raw, vs_raw, video_on, frame_end;
  logic [9:0] x, y;

  clk_divider #(
    .CLK_HZ  (CLK_HZ),
    .SLOW_HZ (SLOW_HZ),
    .FAST_HZ (FAST_HZ),
    .BYPASS  (BYPASS_DIV)
  ) u_div (
    .clk      (clk),
    .rst      (rst),
    .sel_fast (sw7),
    .ce       (cpu_ce),
    .sys_clk  (cpu_clk)
  );

  up1_cpu u_cpu (
    .clk    (clk),
    .rst    (rst),
    .ce     (cpu_ce),
    .pc     (pc),
    .ir     (ir),
    .mar    (mar),
    .mdr    (mdr),
    .ac     (ac),
    .pr     (pr),
    .flag_n (flag_n),
    .flag_z (flag_z),
    .state  (state),
    .mem_we (mem_we)
  );

  seg7_display #(.CLK_HZ(CLK_HZ)) u_seg (
    .clk   (clk),
    .rst   (rst),
    .value (pr),
    .seg_n (seg_n),
    .dp_n  (dp_n),
    .an_n  (an_n)
  );

  vga_sync u_sync (
    .clk       (clk),
    .rst       (rst),
    .pix_ce    (pix_ce),
    .x         (x),
    .y         (y),
    .hs        (hs_raw),
    .vs        (vs_raw),
    .video_on  (video_on),
    .frame_end (frame_end)
  );

  video_display u_video (
    .clk      (clk),
    .rst      (rst),
    .pix_ce   (pix_ce),
    .x        (x),
    .y        (y),
    .hs_in    (hs_raw),
    .vs_in    (vs_raw),
    .video_on (video_on),
    .pc       (pc),
    .ir       (ir),
    .mar      (mar),
    .mdr      (mdr),
    .ac       (ac),
    .pr       (pr),
    .z        (flag_z),
    .cpu_clk  (cpu_clk),
    .rgb      (vga_rgb),
    .hs       (vga_hs),
    .vs       (vga_vs)
  );

endmodule
