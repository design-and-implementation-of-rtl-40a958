// opcode_decoder: the opcode decoder of the control unit.
//
// Decodes the three opcode bits IR(14:12) into the one-hot signals D0..D7:
// exactly one bit of d is high, bit k for opcode k. D0..D6 select the seven
// memory-reference instructions and D7 the register-reference and
// processor-control group. This follows the design description.
// Combinational.
module opcode_decoder (
  input  logic [2:0] opcode,
  output logic [7:0] d
);

  always_comb begin
    d = '0;
    d[opcode] = 1'b1;
  end

endmodule
