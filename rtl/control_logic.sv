// control_logic: the combinational part of the hardwired control unit.
//
// From the timing signals T0..T15, the decoded opcode D0..D7, the
// instruction register and the flags it produces, in the same clock cycle,
// every control signal of the machine: the register strobes, the shared-bus
// source, the ALU operation, memory read and write, the updates of the
// carry flag E, the interrupt-enable flag IEN, the interrupt-cycle flag R
// and the halt flag, and the clear of the sequence counter.
//
// Micro-operation schedule (R' = normal cycle, R = interrupt cycle,
// I = IR(15)):
//   R'T0  AR <- PC                 RT0  AR <- 0, TR <- PC
//   R'T1  IR <- M[AR], PC <- PC+1  RT1  M[AR] <- TR, PC <- 0
//   R'T2  AR <- IR(11:0)           RT2  PC <- PC+1, IEN <- 0, R <- 0, SC <- 0
//   D7'I T3  AR <- M[AR] (indirect)
//   AND/ADD/LDA  T4 DR <- M[AR]; T5 AC <- AC op DR (ADD: E <- carry), SC <- 0
//   STA  T4 M[AR] <- AC, SC <- 0          BUN  T4 PC <- AR, SC <- 0
//   BSA  T4 M[AR] <- PC, AR <- AR+1; T5 PC <- AR, SC <- 0
//   ISZ  T4 DR <- M[AR]; T5 DR <- DR+1; T6 M[AR] <- DR, if DR = 0 PC <- PC+1,
//        SC <- 0
//   D7 I' T3  register reference, one action per IR(11:0) bit, SC <- 0
//   D7 I  T3  ION / IOF, SC <- 0
// An interrupt cycle is requested (R <- 1) in any step other than T0..T2
// while IEN is set and an interrupt is pending. The memory-write, AR, PC
// and DR terms are the ones the design description gives; the rest of the
// schedule is derived from its instruction table and register list. While
// halted every output is inactive. Bits of a register-reference word are
// acted on together; when several of them drive the same ALU or E, the
// priority is CMA, CIR, CIL for the ALU and ALU carry, CME, CLE for E (an
// implementation choice: the description defines single-bit words only).
module control_logic
  import cpu_pkg::*;
(
  input  logic [15:0] t,
  input  logic [7:0]  d,
  input  logic [15:0] ir,
  input  logic        r,          // interrupt-cycle flag
  input  logic        e,          // carry flag
  input  logic        ien,        // interrupt enable
  input  logic        halted,
  input  logic        intr_pend,  // interrupt request waiting
  input  logic        zac,
  input  logic        zdr,
  input  logic        ac_msb,
  output ru_ctl_t     ru,
  output bus_sel_e    bus_sel,
  output alu_op_e     alu_op,
  output logic        mem_rd,
  output logic        mem_wr,
  output logic        sc_clr,
  output logic        e_ld_alu,   // E <- ALU carry out
  output logic        e_cmp,      // E <- not E
  output logic        e_clr,      // E <- 0
  output logic        ien_set,
  output logic        ien_clr,
  output logic        r_set,
  output logic        r_clr,
  output logic        halt_set
);

  logic       run, ind, r_inst, p_inst, nr;
  logic [15:0] tt;
  logic [7:0]  dd;
  logic [11:0] b;

  always_comb begin
    run    = ~halted;
    tt     = run ? t : '0;
    dd     = d;
    b      = ir[11:0];
    ind    = ir[15];
    nr     = ~r;
    r_inst = dd[OP_REG] & ~ind & tt[3];
    p_inst = dd[OP_REG] &  ind & tt[3];

    // Bus source.
    bus_sel = BUS_NONE;
    if (tt[0])                                       bus_sel = BUS_PC;
    if (nr & tt[1])                                  bus_sel = BUS_MEM;
    if (r  & tt[1])                                  bus_sel = BUS_TR;
    if (nr & tt[2])                                  bus_sel = BUS_IR;
    if (~dd[OP_REG] & ind & tt[3])                        bus_sel = BUS_MEM;
    if ((dd[OP_AND] | dd[OP_ADD] | dd[OP_LDA] | dd[OP_ISZ]) & tt[4])     bus_sel = BUS_MEM;
    if (dd[OP_STA] & tt[4])                               bus_sel = BUS_AC;
    if ((dd[OP_BUN] & tt[4]) | (dd[OP_BSA] & tt[5]))           bus_sel = BUS_AR;
    if (dd[OP_BSA] & tt[4])                               bus_sel = BUS_PC;
    if (dd[OP_ISZ] & tt[6])                               bus_sel = BUS_DR;

    mem_rd = (bus_sel == BUS_MEM);
    mem_wr = (dd[OP_STA] & tt[4]) | (dd[OP_BSA] & tt[4]) | (dd[OP_ISZ] & tt[6]) | (r & tt[1]);

    // AR
    ru.ar.clr = r & tt[0];
    ru.ar.ld  = (nr & tt[0]) | (nr & tt[2]) | (~dd[OP_REG] & ind & tt[3]);
    ru.ar.inc = dd[OP_BSA] & tt[4];

    // PC
    ru.pc.clr = r & tt[1];
    ru.pc.ld  = (dd[OP_BUN] & tt[4]) | (dd[OP_BSA] & tt[5]);
    ru.pc.inc = (nr & tt[1]) | (r & tt[2]) | (dd[OP_ISZ] & tt[6] & zdr)
              | (r_inst & ((b[B_SPA] & ~ac_msb) | (b[B_SNA] & ac_msb)
                           | (b[B_SZA] & zac) | (b[B_SZE] & ~e)));

    // DR
    ru.dr.clr = 1'b0;
    ru.dr.ld  = (dd[OP_AND] | dd[OP_ADD] | dd[OP_LDA] | dd[OP_ISZ]) & tt[4];
    ru.dr.inc = dd[OP_ISZ] & tt[5];

    // TR
    ru.tr.clr = 1'b0;
    ru.tr.ld  = r & tt[0];
    ru.tr.inc = 1'b0;

    // IR
    ru.ir_ld = nr & tt[1];

    // AC and ALU
    alu_op = ALU_DR;
    if (dd[OP_AND] & tt[5]) alu_op = ALU_AND;
    if (dd[OP_ADD] & tt[5]) alu_op = ALU_ADD;
    if (dd[OP_LDA] & tt[5]) alu_op = ALU_DR;
    if (r_inst) begin
      if      (b[B_CMA]) alu_op = ALU_CMA;
      else if (b[B_CIR]) alu_op = ALU_CIR;
      else if (b[B_CIL]) alu_op = ALU_CIL;
    end
    ru.ac.clr = r_inst & b[B_CLA];
    ru.ac.ld  = ((dd[OP_AND] | dd[OP_ADD] | dd[OP_LDA]) & tt[5])
              | (r_inst & (b[B_CMA] | b[B_CIR] | b[B_CIL]));
    ru.ac.inc = r_inst & b[B_INC];

    // Flags
    e_ld_alu = (dd[OP_ADD] & tt[5]) | (r_inst & ~b[B_CMA] & (b[B_CIR] | b[B_CIL]));
    e_cmp    = r_inst & b[B_CME];
    e_clr    = r_inst & b[B_CLE];
    ien_set  = p_inst & b[B_ION];
    ien_clr  = (p_inst & b[B_IOF]) | (r & tt[2]);
    r_set    = run & ~t[0] & ~t[1] & ~t[2] & ien & intr_pend & nr;
    r_clr    = r & tt[2];
    halt_set = r_inst & b[B_HLT];

    // End of instruction
    sc_clr = ((dd[OP_AND] | dd[OP_ADD] | dd[OP_LDA]) & tt[5]) | (dd[OP_STA] & tt[4]) | (dd[OP_BUN] & tt[4])
           | (dd[OP_BSA] & tt[5]) | (dd[OP_ISZ] & tt[6]) | (dd[OP_REG] & tt[3]) | (r & tt[2]);
  end

endmodule
