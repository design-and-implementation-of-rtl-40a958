// sequence_counter: timing generator of the control unit.
//
// A 16-bit one-hot register T that rotates left by one place each clock, so
// that exactly one of T0..T15 marks the current step of the fetch, decode
// and execute sequence. A high clr at a clock edge returns it to T0
// (0001h). Reset loads 8000h (T15), so the first step after reset is T0.
// While hold is high the register keeps its value; this stops the machine
// after a halt. The ring-shift structure, the clear value and the reset
// value follow the design description; hold and the synchronous reset are
// this implementation's choices.
module sequence_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        hold,
  output logic [15:0] t
);

  always_ff @(posedge clk) begin
    if (rst)       t <= 16'h8000;
    else if (hold) t <= t;
    else if (clr)  t <= 16'h0001;
    else           t <= {t[14:0], t[15]};
  end

endmodule
