// microprocessor: top level of a simple, extendable 16-bit accumulator CPU.
//
// The processor is built from four units: the register unit (AR, PC, AC,
// DR, TR, IR and the ZAC/ZDR flags), the ALU, the shared bus that moves one
// register or the memory word per cycle, and the hardwired control unit.
// It runs the 22-instruction set: seven memory-reference instructions with
// direct or indirect addressing (AND, ADD, LDA, STA, BUN, BSA, ISZ), twelve
// register-reference instructions plus NOP, and ION, IOF and HLT. After
// reset it starts at address RESET_PC; a pulse on intr while interrupts are
// enabled stores the return address at address 0 and runs the instruction
// at address 1.
//
// Memory interface: address is AR. Reads are asynchronous: the memory must
// present M[address] on data_in in the same cycle in which re is high, and
// the CPU samples it at the next rising edge. A write happens at the rising
// edge that ends a cycle in which we is high, with data_out, which always
// carries the shared bus. display always shows the accumulator. The port
// names and the separate data_in/data_out and display ports follow the
// signal names of the original simulation traces; the asynchronous read is
// this implementation's choice. ready is high while the processor runs and
// low after HLT until the next reset. reset is
// synchronous and active high. Each instruction takes 3 fetch/decode steps,
// one step for the indirect address and 1 to 3 execute steps: 4 cycles for
// register-reference and control instructions, 5 for STA and BUN, 6 for
// AND, ADD, LDA and BSA, 7 for ISZ; the interrupt cycle takes 3.
module microprocessor
  import cpu_pkg::*;
#(
  parameter logic [11:0] RESET_PC = 12'd2
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        intr,
  output logic [11:0] address,
  input  logic [15:0] data_in,
  output logic [15:0] data_out,
  output logic        re,
  output logic        we,
  output logic [15:0] display,
  output logic        ready
);

  ru_ctl_t     ru;
  bus_sel_e    bus_sel;
  alu_op_e     alu_op;
  logic [11:0] ar, pc;
  logic [15:0] ac, dr, tr, ir, bus, alu_result;
  logic        zac, zdr, alu_cin, alu_cout;

  register_unit #(.DW(DATA_W), .AW(ADDR_W), .RESET_PC(RESET_PC)) u_ru (
    .clk, .rst(reset), .ctl(ru), .bus, .alu_result,
    .ar, .pc, .ac, .dr, .tr, .ir, .zac, .zdr
  );

  alu #(.W(DATA_W)) u_alu (
    .ac, .dr, .cin(alu_cin), .op(alu_op), .result(alu_result), .cout(alu_cout)
  );

  shared_bus #(.DW(DATA_W), .AW(ADDR_W)) u_bus (
    .sel(bus_sel), .ar, .pc, .dr, .ac, .ir, .tr, .mem(data_in), .bus
  );

  control_unit u_cu (
    .clk, .rst(reset), .intr, .ir, .zac, .zdr, .ac_msb(ac[15]),
    .alu_cout, .ru, .bus_sel, .alu_op, .alu_cin, .mem_rd(re), .mem_wr(we), .ready
  );

  assign address  = ar;
  assign data_out = bus;
  assign display  = ac;

endmodule
