// cpu_reg: one register of the register unit with synchronous clear, load
// and increment strobes.
//
// On a rising clock edge the register is cleared when clr is high, else
// loaded from d when ld is high, else incremented when inc is high, else it
// holds; this priority is the one the design description gives for the
// accumulator and is applied to every register here. rst is a synchronous
// reset to RST_VAL (the reset itself is this implementation's choice).
module cpu_reg #(
  parameter int unsigned W       = 16,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         ld,
  input  logic         inc,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)      q <= RST_VAL;
    else if (clr) q <= '0;
    else if (ld)  q <= d;
    else if (inc) q <= q + 1'b1;
  end

endmodule
