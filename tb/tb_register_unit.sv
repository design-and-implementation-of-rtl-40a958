// tb_register_unit: self-checking testbench of the register unit.
// Applies random clear/load/increment strobes, bus values and ALU results
// for many cycles and compares all six registers and the ZAC/ZDR flags with
// a reference model kept in this file: clear before load before increment,
// AC loading from the ALU result, the others from the bus (AR and PC taking
// its low 12 bits), PC reset to 2 and the rest to zero.
module tb_register_unit;
  import cpu_pkg::*;

  logic        clk = 1'b0, rst;
  ru_ctl_t     ctl;
  logic [15:0] bus, alu_result;
  logic [11:0] ar, pc, m_ar, m_pc;
  logic [15:0] ac, dr, tr, ir, m_ac, m_dr, m_tr, m_ir;
  logic        zac, zdr;
  int checks = 0, failures = 0;

  register_unit #(.DW(16), .AW(12), .RESET_PC(12'd2)) dut (
    .clk, .rst, .ctl, .bus, .alu_result, .ar, .pc, .ac, .dr, .tr, .ir, .zac, .zdr
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] step(input logic [15:0] q, input reg_ctl_t c,
                                       input logic [15:0] d);
    if (c.clr)      return '0;
    else if (c.ld)  return d;
    else if (c.inc) return q + 16'd1;
    return q;
  endfunction

  task automatic compare();
    checks++;
    if (ar !== m_ar || pc !== m_pc || ac !== m_ac || dr !== m_dr ||
        tr !== m_tr || ir !== m_ir || zac !== (m_ac == 0) || zdr !== (m_dr == 0)) begin
      failures++;
      $display("FAIL ar=%h/%h pc=%h/%h ac=%h/%h dr=%h/%h tr=%h/%h ir=%h/%h zac=%b zdr=%b",
               ar, m_ar, pc, m_pc, ac, m_ac, dr, m_dr, tr, m_tr, ir, m_ir, zac, zdr);
    end
  endtask

  initial begin
    ctl = '0; bus = '0; alu_result = '0; rst = 1'b1;
    @(posedge clk); #1;
    m_ar = 0; m_pc = 12'd2; m_ac = 0; m_dr = 0; m_tr = 0; m_ir = 0;
    // IR has no reset in the unit; load it to a known value first.
    rst = 1'b0; ctl.ir_ld = 1'b1; bus = 16'h0000;
    @(posedge clk); #1;
    compare();
    for (int n = 0; n < 3000; n++) begin
      ctl = ru_ctl_t'($urandom);
      // Make every strobe rarer so registers also hold and count.
      if ($urandom_range(0, 1) == 0) begin
        ctl.ar.clr = 1'b0; ctl.pc.clr = 1'b0; ctl.ac.clr = 1'b0;
        ctl.dr.clr = 1'b0; ctl.tr.clr = 1'b0;
      end
      bus = 16'($urandom);
      alu_result = ($urandom_range(0, 3) == 0) ? 16'h0000 : 16'($urandom);
      @(posedge clk);
      m_ar = step({4'h0, m_ar}, ctl.ar, bus)[11:0];
      m_pc = step({4'h0, m_pc}, ctl.pc, bus)[11:0];
      m_ac = step(m_ac, ctl.ac, alu_result);
      m_dr = step(m_dr, ctl.dr, bus);
      m_tr = step(m_tr, ctl.tr, bus);
      if (ctl.ir_ld) m_ir = bus;
      #1;
      compare();
    end
    // Reset returns PC to the start address.
    rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (pc !== 12'd2 || ac !== 16'h0 || ar !== 12'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
