// tb_up1_datapath: drives random control words, clock enables and memory
// data into the uP1 datapath and compares PC, MAR, IR, AC and the N/Z flags
// every cycle with a register-level model kept here (PC load has priority
// over PC increment; flags load only with AC).
module tb_up1_datapath;
  import up1_pkg::*;

  logic  clk = 0, rst, ce;
  ctrl_t ctrl;
  word_t mem_rdata, ac, ir;
  addr_t mar, pc;
  logic  flag_n, flag_z;

  addr_t m_pc, m_mar;
  word_t m_ir, m_ac;
  logic  m_n, m_z;
  int    checks = 0, failures = 0;
  int    n_acld = 0, n_zset = 0, n_pcld = 0, n_marpc = 0;

  up1_datapath dut (.clk(clk), .rst(rst), .ce(ce), .ctrl(ctrl), .mem_rdata(mem_rdata),
                    .mar(mar), .ac(ac), .pc(pc), .ir(ir), .flag_n(flag_n), .flag_z(flag_z));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t alu(alu_op_e o, word_t a, word_t b);
    int r;
    case (o)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_ADDS: begin r = int'($signed(a)) + int'($signed(b));
                  return (r > 32767) ? 16'h7FFF : (r < -32768) ? 16'h8000 : word_t'(r); end
      ALU_SUBS: begin r = int'($signed(a)) - int'($signed(b));
                  return (r > 32767) ? 16'h7FFF : (r < -32768) ? 16'h8000 : word_t'(r); end
      ALU_AND:  return a & b;
      ALU_COM:  return ~a;
      default:  return b;
    endcase
  endfunction

  task automatic compare();
    checks++;
    if (pc !== m_pc || mar !== m_mar || ir !== m_ir || ac !== m_ac || flag_n !== m_n || flag_z !== m_z) begin
      failures++;
      $display("FAIL pc=%h/%h mar=%h/%h ir=%h/%h ac=%h/%h n=%b/%b z=%b/%b",
               pc, m_pc, mar, m_mar, ir, m_ir, ac, m_ac, flag_n, m_n, flag_z, m_z);
    end
  endtask

  initial begin
    word_t y;
    rst = 1; ce = 1; ctrl = '0; mem_rdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    m_pc = 0; m_mar = 0; m_ir = 0; m_ac = 0; m_n = 0; m_z = 0;
    compare();
    repeat (5000) begin
      @(negedge clk);
      ctrl         = ctrl_t'($urandom);
      ctrl.alu_op  = alu_op_e'($urandom_range(6));
      mem_rdata    = ($urandom_range(3) == 0) ? word_t'(m_ac) : word_t'($urandom);
      ce           = ($urandom_range(4) != 0);
      @(posedge clk);
      if (ce) begin
        y = alu(ctrl.alu_op, m_ac, mem_rdata);
        if (ctrl.mar_ld) begin m_mar = ctrl.mar_sel ? m_ir[7:0] : m_pc; if (!ctrl.mar_sel) n_marpc++; end
        if (ctrl.pc_ld) begin m_pc = m_ir[7:0]; n_pcld++; end
        else if (ctrl.pc_inc) m_pc = m_pc + 1;
        if (ctrl.ir_ld) m_ir = mem_rdata;
        if (ctrl.ac_ld) begin
          m_ac = y; m_n = y[15]; m_z = (y == 0); n_acld++;
          if (m_z) n_zset++;
        end
      end
      #1 compare();
    end
    checks++;
    if (n_acld < 100 || n_zset < 10 || n_pcld < 100 || n_marpc < 100) begin
      failures++; $display("FAIL coverage %0d %0d %0d %0d", n_acld, n_zset, n_pcld, n_marpc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
