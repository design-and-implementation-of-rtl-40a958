// alu: combinational arithmetic and logic unit of the microprocessor.
//
// Operands are the accumulator (ac) and the data register (dr); the result
// goes back to the accumulator and cout goes to the carry flag E. A 3-bit
// select picks one of six operations, with the codes of the design
// description:
//   000 AC and DR        001 AC + DR (cout = carry)   010 DR
//   011 not AC           100 circulate left  {AC(14:0), cin}, cout = AC(15)
//   101 circulate right  {cin, AC(15:1)}, cout = AC(0)
// Unused codes give zero. For the operations that do not produce a carry,
// cout returns cin so that loading E from it leaves E unchanged; that
// choice is this implementation's. Purely combinational, no clock.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] ac,
  input  logic [W-1:0] dr,
  input  logic         cin,
  input  alu_op_e      op,
  output logic [W-1:0] result,
  output logic         cout
);

  logic [W:0] sum;
  assign sum = {1'b0, ac} + {1'b0, dr};

  always_comb begin
    result = '0;
    cout   = cin;
    unique case (op)
      ALU_AND: result = ac & dr;
      ALU_ADD: begin
        result = sum[W-1:0];
        cout   = sum[W];
      end
      ALU_DR:  result = dr;
      ALU_CMA: result = ~ac;
      ALU_CIL: begin
        result = {ac[W-2:0], cin};
        cout   = ac[W-1];
      end
      ALU_CIR: begin
        result = {cin, ac[W-1:1]};
        cout   = ac[0];
      end
      default: result = '0;
    endcase
  end

endmodule
