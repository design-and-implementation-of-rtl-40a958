// tb_control_logic: self-checking testbench of the combinational control
// logic. Drives random one-hot T and D, random IR words and random flags,
// and compares the outputs with equations written here from the
// instruction definitions: the memory-write, AR, PC, DR, TR, IR and AC
// strobes, the bus source of each step, the ALU operation, the flag
// updates, the end-of-instruction clear, and that nothing is active while
// halted.
module tb_control_logic;
  import cpu_pkg::*;

  logic [15:0] t, ir;
  logic [7:0]  d;
  logic        r, e, ien, halted, intr_pend, zac, zdr, ac_msb;
  ru_ctl_t     ru;
  bus_sel_e    bus_sel;
  alu_op_e     alu_op;
  logic        mem_rd, mem_wr, sc_clr, e_ld_alu, e_cmp, e_clr;
  logic        ien_set, ien_clr, r_set, r_clr, halt_set;
  int checks = 0, failures = 0;

  control_logic dut (.t, .d, .ir, .r, .e, .ien, .halted, .intr_pend, .zac, .zdr,
                     .ac_msb, .ru, .bus_sel, .alu_op, .mem_rd, .mem_wr, .sc_clr,
                     .e_ld_alu, .e_cmp, .e_clr, .ien_set, .ien_clr, .r_set,
                     .r_clr, .halt_set);

  task automatic chk(input string what, input logic got, input logic exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s t=%h d=%h ir=%h r=%b: got %b exp %b", what, t, d, ir, r, got, exp_v);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int    ts, ds;
      logic  run, T[16], D[8], I, rinst, pinst, skip;
      bus_sel_e exp_bus;
      ts = $urandom_range(0, 15);
      if (n % 3 != 0) ts = $urandom_range(0, 6);
      ds = $urandom_range(0, 7);
      t = 16'h0001 << ts;
      d = 8'h01 << ds;
      ir = 16'($urandom);
      ir[14:12] = 3'(ds);
      if (ds == 7 && $urandom_range(0, 1) == 0) ir[11:0] = 12'h001 << $urandom_range(0, 11);
      r = ($urandom_range(0, 3) == 0) && ts < 3;
      e = 1'($urandom); ien = 1'($urandom); intr_pend = 1'($urandom);
      halted = ($urandom_range(0, 9) == 0);
      zdr = 1'($urandom); ac_msb = 1'($urandom); zac = 1'($urandom);
      #1;
      run = !halted;
      for (int k = 0; k < 16; k++) T[k] = run && (k == ts);
      for (int k = 0; k < 8; k++)  D[k] = (k == ds);
      I = ir[15];
      rinst = D[7] && !I && T[3];
      pinst = D[7] && I && T[3];
      skip  = (ir[4] && !ac_msb) || (ir[3] && ac_msb) || (ir[2] && zac) || (ir[1] && !e);

      chk("mem_write", mem_wr, (D[3] && T[4]) || (D[5] && T[4]) || (D[6] && T[6]) || (r && T[1]));
      chk("clr_ar", ru.ar.clr, r && T[0]);
      chk("ld_ar", ru.ar.ld, (!r && (T[0] || T[2])) || (!D[7] && I && T[3]));
      chk("inc_ar", ru.ar.inc, D[5] && T[4]);
      chk("ld_pc", ru.pc.ld, (D[4] && T[4]) || (D[5] && T[5]));
      chk("clr_pc", ru.pc.clr, r && T[1]);
      chk("inc_pc", ru.pc.inc, (!r && T[1]) || (r && T[2]) || (D[6] && T[6] && zdr) || (rinst && skip));
      chk("clr_dr", ru.dr.clr, 1'b0);
      chk("ld_dr", ru.dr.ld, (D[0] || D[1] || D[2] || D[6]) && T[4]);
      chk("inc_dr", ru.dr.inc, D[6] && T[5]);
      chk("ld_tr", ru.tr.ld, r && T[0]);
      chk("ld_ir", ru.ir_ld, !r && T[1]);
      chk("clr_ac", ru.ac.clr, rinst && ir[11]);
      chk("ld_ac", ru.ac.ld, ((D[0] || D[1] || D[2]) && T[5]) || (rinst && (ir[9] || ir[7] || ir[6])));
      chk("inc_ac", ru.ac.inc, rinst && ir[5]);
      chk("halt", halt_set, rinst && ir[0]);
      chk("ion", ien_set, pinst && ir[7]);
      chk("iof", ien_clr, (pinst && ir[6]) || (r && T[2]));
      chk("e_cmp", e_cmp, rinst && ir[8]);
      chk("e_clr", e_clr, rinst && ir[10]);
      chk("r_set", r_set, run && ts > 2 && ien && intr_pend && !r);
      chk("r_clr", r_clr, r && T[2]);
      chk("sc_clr", sc_clr, ((D[0] || D[1] || D[2]) && T[5]) || ((D[3] || D[4]) && T[4]) ||
                             (D[5] && T[5]) || (D[6] && T[6]) || (D[7] && T[3]) || (r && T[2]));

      // bus source of each step
      exp_bus = BUS_NONE;
      if (T[0]) exp_bus = BUS_PC;
      else if (T[1]) exp_bus = r ? BUS_TR : BUS_MEM;
      else if (T[2] && !r) exp_bus = BUS_IR;
      else if (T[3] && !D[7] && I) exp_bus = BUS_MEM;
      else if (T[4] && (D[0] || D[1] || D[2] || D[6])) exp_bus = BUS_MEM;
      else if (T[4] && D[3]) exp_bus = BUS_AC;
      else if (T[4] && D[4]) exp_bus = BUS_AR;
      else if (T[4] && D[5]) exp_bus = BUS_PC;
      else if (T[5] && D[5]) exp_bus = BUS_AR;
      else if (T[6] && D[6]) exp_bus = BUS_DR;
      checks++;
      if (bus_sel !== exp_bus) begin
        failures++;
        $display("FAIL bus t=%h d=%h r=%b got %0d exp %0d", t, d, r, bus_sel, exp_bus);
      end
      chk("mem_rd", mem_rd, exp_bus == BUS_MEM);

      // ALU operation where the accumulator loads
      if (T[5] && D[0]) chk("alu and", alu_op == ALU_AND, 1'b1);
      if (T[5] && D[1]) chk("alu add", alu_op == ALU_ADD && e_ld_alu, 1'b1);
      if (T[5] && D[2]) chk("alu dr", alu_op == ALU_DR, 1'b1);
      if (rinst && ir[9]) chk("alu cma", alu_op == ALU_CMA, 1'b1);
      if (rinst && !ir[9] && ir[7]) chk("alu cir", alu_op == ALU_CIR && e_ld_alu, 1'b1);
      if (rinst && !ir[9] && !ir[7] && ir[6]) chk("alu cil", alu_op == ALU_CIL && e_ld_alu, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
