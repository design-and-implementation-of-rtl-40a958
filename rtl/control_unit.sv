// control_unit: hardwired control unit of the microprocessor.
//
// Built from the three parts of the design description: the opcode decoder
// (IR(14:12) -> D0..D7), the sequence counter (one-hot T0..T15) and the
// combinational control logic. It also holds the flags that the control
// logic updates: the carry flag E (fed to the ALU as carry in), the
// interrupt-enable flag IEN (set by ION, cleared by IOF), the
// interrupt-cycle flag R and the halt flag S, whose inverse is the READY
// output.
//
// Interrupts: a one-cycle pulse on intr is remembered in intr_pend only if
// IEN is set at that edge; a request that arrives while IEN is clear is
// dropped. While a request is pending the control logic sets R in a step
// past T2, the current instruction completes and the interrupt cycle then
// saves PC at address 0 and continues at address 1. Remembering the pulse
// until the instruction boundary is this implementation's choice.
//
// All flags clear on the synchronous reset. Timing: outputs are
// combinational from the registered T, IR and flags of the current cycle.
module control_unit
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        intr,
  input  logic [15:0] ir,
  input  logic        zac,
  input  logic        zdr,
  input  logic        ac_msb,
  input  logic        alu_cout,
  output ru_ctl_t     ru,
  output bus_sel_e    bus_sel,
  output alu_op_e     alu_op,
  output logic        alu_cin,
  output logic        mem_rd,
  output logic        mem_wr,
  output logic        ready
);

  logic [7:0]  d;
  logic [15:0] t;
  logic        e, ien, r, s, intr_pend;
  logic        sc_clr, e_ld_alu, e_cmp, e_clr;
  logic        ien_set, ien_clr, r_set, r_clr, halt_set;

  opcode_decoder u_dec (.opcode(ir[14:12]), .d(d));

  sequence_counter u_sc (.clk, .rst, .clr(sc_clr), .hold(s), .t(t));

  control_logic u_logic (
    .t, .d, .ir, .r, .e, .ien, .halted(s), .intr_pend, .zac, .zdr, .ac_msb,
    .ru, .bus_sel, .alu_op, .mem_rd, .mem_wr, .sc_clr, .e_ld_alu, .e_cmp,
    .e_clr, .ien_set, .ien_clr, .r_set, .r_clr, .halt_set
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      e         <= 1'b0;
      ien       <= 1'b0;
      r         <= 1'b0;
      s         <= 1'b0;
      intr_pend <= 1'b0;
    end else begin
      if      (e_ld_alu) e <= alu_cout;
      else if (e_cmp)    e <= ~e;
      else if (e_clr)    e <= 1'b0;

      if      (ien_set) ien <= 1'b1;
      else if (ien_clr) ien <= 1'b0;

      if      (r_set) r <= 1'b1;
      else if (r_clr) r <= 1'b0;

      if (halt_set) s <= 1'b1;

      intr_pend <= ien & ~ien_clr & ~r_set & (intr | intr_pend);
    end
  end

  assign alu_cin = e;
  assign ready   = ~s;

endmodule
