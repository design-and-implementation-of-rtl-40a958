// register_unit: the internal registers of the microprocessor and their
// zero flags.
//
// Holds the 12-bit address register AR and program counter PC and the
// 16-bit accumulator AC, data register DR, temporary register TR and
// instruction register IR. AR, PC, DR, TR and IR load from the shared bus
// (AR and PC take its low 12 bits); AC loads from the ALU result. Every
// register except IR has clear, load and increment strobes; IR only loads.
// ZAC and ZDR are combinational flags that are high when AC and DR are zero.
// All updates happen on the rising clock edge. The registers, their widths,
// strobes, load sources and flags follow the design description. The
// synchronous reset, which sets PC to RESET_PC and clears the rest, is this
// implementation's choice; RESET_PC = 2 is the description's start address
// (the first two words are the interrupt vector table).
module register_unit
  import cpu_pkg::*;
#(
  parameter int unsigned  DW       = 16,
  parameter int unsigned  AW       = 12,
  parameter logic [AW-1:0] RESET_PC = 12'd2
) (
  input  logic          clk,
  input  logic          rst,
  input  ru_ctl_t       ctl,
  input  logic [DW-1:0] bus,
  input  logic [DW-1:0] alu_result,
  output logic [AW-1:0] ar,
  output logic [AW-1:0] pc,
  output logic [DW-1:0] ac,
  output logic [DW-1:0] dr,
  output logic [DW-1:0] tr,
  output logic [DW-1:0] ir,
  output logic          zac,
  output logic          zdr
);

  cpu_reg #(.W(AW)) u_ar (
    .clk, .rst, .clr(ctl.ar.clr), .ld(ctl.ar.ld), .inc(ctl.ar.inc),
    .d(bus[AW-1:0]), .q(ar)
  );

  cpu_reg #(.W(AW), .RST_VAL(RESET_PC)) u_pc (
    .clk, .rst, .clr(ctl.pc.clr), .ld(ctl.pc.ld), .inc(ctl.pc.inc),
    .d(bus[AW-1:0]), .q(pc)
  );

  cpu_reg #(.W(DW)) u_ac (
    .clk, .rst, .clr(ctl.ac.clr), .ld(ctl.ac.ld), .inc(ctl.ac.inc),
    .d(alu_result), .q(ac)
  );

  cpu_reg #(.W(DW)) u_dr (
    .clk, .rst, .clr(ctl.dr.clr), .ld(ctl.dr.ld), .inc(ctl.dr.inc),
    .d(bus), .q(dr)
  );

  cpu_reg #(.W(DW)) u_tr (
    .clk, .rst, .clr(ctl.tr.clr), .ld(ctl.tr.ld), .inc(ctl.tr.inc),
    .d(bus), .q(tr)
  );

  cpu_reg #(.W(DW)) u_ir (
    .clk, .rst, .clr(1'b0), .ld(ctl.ir_ld), .inc(1'b0),
    .d(bus), .q(ir)
  );

  assign zac = (ac == '0);
  assign zdr = (dr == '0);

endmodule
