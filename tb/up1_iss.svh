// up1_iss.svh: package up1_iss_pkg, an instruction-level reference model of the uP1 for test
// benches.  It keeps its own copy of memory and registers, executes one
// instruction per call of step(), and reports what the instruction did, so
// a bench can compare the RTL with it after every instruction.  It uses the
// instruction semantics directly (signed saturation for Adds/Subs, flags
// from AC for ALU/Lw/Ldi only, direct jumps), not the RTL's structure.
`ifndef UP1_ISS_SVH
`define UP1_ISS_SVH
package up1_iss_pkg;

  typedef struct {
    logic [15:0] mem [256];
    logic [7:0]  pc;
    logic [15:0] ac;
    logic        z;
    logic        n;
    logic [15:0] pr;
  } iss_t;

  typedef struct {
    logic [7:0]  op;
    int          cycles;     // clock cycles the instruction should take
    bit          pr_write;   // wrote the PR port
    bit          saturated;  // Adds/Subs clamped its result
    bit          jumped;     // Jmp, or Jmpz taken
    bit          rom_write;  // Sw to the ROM half (ignored)
  } event_t;

  function automatic logic [15:0] sat(int r);
    if (r > 32767)  return 16'h7FFF;
    if (r < -32768) return 16'h8000;
    return 16'(r);
  endfunction

  function automatic void reset(ref iss_t s);
    s.pc = 0; s.ac = 0; s.z = 0; s.n = 0; s.pr = 0;
  endfunction

  function automatic event_t step(ref iss_t s);
    event_t      e;
    logic [7:0]  a;
    logic [15:0] w, m, r;
    bit          ld;
    int          sr;
    w = s.mem[s.pc];
    s.pc++;
    a = w[7:0];
    m = s.mem[a];
    e = '{op: w[15:8], cycles: 3, pr_write: 0, saturated: 0, jumped: 0, rom_write: 0};
    ld = 1;
    r = s.ac;
    case (w[15:8])
      8'h01: r = s.ac + m;
      8'h02: begin sr = int'($signed(s.ac)) + int'($signed(m)); r = sat(sr);
               e.saturated = (r != 16'(s.ac + m)); end
      8'h03: r = s.ac - m;
      8'h04: begin sr = int'($signed(s.ac)) - int'($signed(m)); r = sat(sr);
               e.saturated = (r != 16'(s.ac - m)); end
      8'h05: r = s.ac & m;
      8'h06: r = ~s.ac;
      8'h07: r = m;
      8'h08: begin r = s.mem[s.pc]; s.pc++; end
      8'h09: begin
        ld = 0;
        if (a[7]) s.mem[a] = s.ac; else e.rom_write = 1;
        if (a == 8'hFF) begin s.pr = s.ac; e.pr_write = 1; end
      end
      8'h0A: begin ld = 0; s.pc = a; e.jumped = 1; e.cycles = 2; end
      8'h0B: begin ld = 0; e.cycles = 2; if (s.z) begin s.pc = a; e.jumped = 1; end end
      default: begin ld = 0; e.cycles = 2; end
    endcase
    if (ld) begin s.ac = r; s.z = (r == 0); s.n = r[15]; end
    return e;
  endfunction

endpackage
`endif
