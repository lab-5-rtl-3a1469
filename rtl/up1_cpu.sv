// up1_cpu: the uP1 processor: control unit, datapath and memory system.
//
// The control unit sequences each instruction through fetch, decode and
// execute; the datapath holds PC, MAR, IR, AC and the N/Z flags around the
// ALU; the memory system holds the program ROM (0x00-0x7F), the data RAM
// (0x80-0xFF) and the PR output port (a write to 0xFF).  MAR is the address
// bus, AC the write-data bus and the memory read MUX output the data bus
// (shown as MDR on the video display).
//
// One processor clock is one rising edge of `clk` with `ce` high; the
// control unit's state and all registers advance only then.  `rst` is
// synchronous and starts execution at address 0.  The internal registers are
// brought out for the video display, which only observes them.
module up1_cpu
  import up1_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  output addr_t  pc,
  output word_t  ir,
  output addr_t  mar,
  output word_t  mdr,
  output word_t  ac,
  output word_t  pr,
  output logic   flag_n,
  output logic   flag_z,
  output state_e state,
  output logic   mem_we
);

  ctrl_t ctrl;

  up1_control u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .ce     (ce),
    .opcode (ir[15:8]),
    .flag_z (flag_z),
    .ctrl   (ctrl),
    .state  (state)
  );

  up1_datapath u_dp (
    .clk       (clk),
    .rst       (rst),
    .ce        (ce),
    .ctrl      (ctrl),
    .mem_rdata (mdr),
    .mar       (mar),
    .ac        (ac),
    .pc        (pc),
    .ir        (ir),
    .flag_n    (flag_n),
    .flag_z    (flag_z)
  );

  up1_memory u_mem (
    .clk   (clk),
    .rst   (rst),
    .ce    (ce),
    .addr  (mar),
    .we    (ctrl.mem_we),
    .wdata (ac),
    .rdata (mdr),
    .pr    (pr)
  );

  assign mem_we = ctrl.mem_we;

endmodule
