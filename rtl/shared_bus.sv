// shared_bus: the common 16-bit bus of the microprocessor.
//
// A 3-bit select from the control unit chooses which of seven sources drives
// the bus: 001 AR, 010 PC, 011 DR, 100 AC, 101 IR, 110 TR, 111 memory data.
// AR and PC are 12 bits wide and are zero-extended. The codes and sources
// follow the design description. There the unused code 000 leaves the bus
// in high impedance; here the bus is a plain multiplexer and code 000
// drives zero, so that no tristate net is needed. Purely combinational.
module shared_bus
  import cpu_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 12
) (
  input  bus_sel_e      sel,
  input  logic [AW-1:0] ar,
  input  logic [AW-1:0] pc,
  input  logic [DW-1:0] dr,
  input  logic [DW-1:0] ac,
  input  logic [DW-1:0] ir,
  input  logic [DW-1:0] tr,
  input  logic [DW-1:0] mem,
  output logic [DW-1:0] bus
);

  always_comb begin
    unique case (sel)
      BUS_AR:  bus = DW'(ar);
      BUS_PC:  bus = DW'(pc);
      BUS_DR:  bus = dr;
      BUS_AC:  bus = ac;
      BUS_IR:  bus = ir;
      BUS_TR:  bus = tr;
      BUS_MEM: bus = mem;
      default: bus = '0;
    endcase
  end

endmodule
