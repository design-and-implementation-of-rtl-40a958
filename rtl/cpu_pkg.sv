// cpu_pkg: types and constants shared by the blocks of the 16-bit
// accumulator microprocessor.
//
// The machine has a 16-bit data word and a 12-bit address. The shared bus
// is steered by a 3-bit source code (AR, PC, DR, AC, IR, TR, memory) and the
// ALU by a 3-bit operation code; both encodings are the ones the design
// description assigns. The register-unit control bundle (clear, load and
// increment per register) is collected in one struct so that the control
// unit and the register unit agree on it by construction; the grouping into
// a struct is this implementation's choice.
package cpu_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ADDR_W = 12;

  // Shared-bus source select (code 000 selects no source and reads as zero).
  typedef enum logic [2:0] {
    BUS_NONE = 3'b000,
    BUS_AR   = 3'b001,
    BUS_PC   = 3'b010,
    BUS_DR   = 3'b011,
    BUS_AC   = 3'b100,
    BUS_IR   = 3'b101,
    BUS_TR   = 3'b110,
    BUS_MEM  = 3'b111
  } bus_sel_e;

  // ALU operation select.
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,  // AC and DR
    ALU_ADD = 3'b001,  // AC + DR, carry out to E
    ALU_DR  = 3'b010,  // pass DR (load)
    ALU_CMA = 3'b011,  // not AC
    ALU_CIL = 3'b100,  // circulate left through E
    ALU_CIR = 3'b101   // circulate right through E
  } alu_op_e;

  // Memory-reference opcodes, IR(14:12).
  localparam logic [2:0] OP_AND = 3'd0;
  localparam logic [2:0] OP_ADD = 3'd1;
  localparam logic [2:0] OP_LDA = 3'd2;
  localparam logic [2:0] OP_STA = 3'd3;
  localparam logic [2:0] OP_BUN = 3'd4;
  localparam logic [2:0] OP_BSA = 3'd5;
  localparam logic [2:0] OP_ISZ = 3'd6;
  localparam logic [2:0] OP_REG = 3'd7;  // register reference / control

  // Bit positions of IR(11:0) for register-reference instructions
  // (IR(15:12) = 0111).
  localparam int unsigned B_CLA = 11;
  localparam int unsigned B_CLE = 10;
  localparam int unsigned B_CMA = 9;
  localparam int unsigned B_CME = 8;
  localparam int unsigned B_CIR = 7;
  localparam int unsigned B_CIL = 6;
  localparam int unsigned B_INC = 5;
  localparam int unsigned B_SPA = 4;
  localparam int unsigned B_SNA = 3;
  localparam int unsigned B_SZA = 2;
  localparam int unsigned B_SZE = 1;
  localparam int unsigned B_HLT = 0;
  // Processor-control instructions (IR(15:12) = 1111).
  localparam int unsigned B_ION = 7;
  localparam int unsigned B_IOF = 6;

  // Clear / load / increment strobes of one register.
  typedef struct packed {
    logic clr;
    logic ld;
    logic inc;
  } reg_ctl_t;

  // All register-unit strobes driven by the control unit.
  typedef struct packed {
    reg_ctl_t ar;
    reg_ctl_t pc;
    reg_ctl_t ac;
    reg_ctl_t dr;
    reg_ctl_t tr;
    logic     ir_ld;
  } ru_ctl_t;

endpackage
