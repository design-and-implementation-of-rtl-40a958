// mem_model: behavioural model of the processor's program and data memory,
// for simulation only (the memory is not part of the processor).
// 2**AW words of DW bits. Reads are asynchronous: rdata shows ram[addr] at
// all times (rd only marks the access). A write stores wdata at addr on the
// rising clock edge when wr is high. Testbenches fill and inspect ram
// directly by hierarchical reference.
module mem_model #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          rd,
  input  logic          wr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] ram [2**AW];
  int unsigned   reads = 0, writes = 0;

  assign rdata = ram[addr];

  always @(posedge clk) begin
    if (wr) begin
      ram[addr] <= wdata;
      writes++;
    end
    if (rd) reads++;
  end
endmodule
