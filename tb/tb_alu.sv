// tb_alu: self-checking testbench of the ALU.
// Applies every operation code, including the unused ones, to random and
// corner-case operands and compares result and carry out with a reference
// computed here from the instruction definitions (AND, ADD with carry,
// transfer of DR, complement, circulate left and right through the carry).
module tb_alu;
  import cpu_pkg::*;

  logic [15:0] ac, dr, result;
  logic        cin, cout;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu #(.W(16)) dut (.ac, .dr, .cin, .op, .result, .cout);

  task automatic check_one(input logic [2:0] code, input logic [15:0] a,
                           input logic [15:0] b, input logic c);
    logic [15:0] exp_r;
    logic        exp_c;
    logic [16:0] s;
    ac = a; dr = b; cin = c; op = alu_op_e'(code);
    #1;
    s = {1'b0, a} + {1'b0, b};
    exp_c = c;
    case (code)
      3'd0: exp_r = a & b;
      3'd1: begin exp_r = s[15:0]; exp_c = s[16]; end
      3'd2: exp_r = b;
      3'd3: exp_r = ~a;
      3'd4: begin exp_r = {a[14:0], c}; exp_c = a[15]; end
      3'd5: begin exp_r = {c, a[15:1]}; exp_c = a[0]; end
      default: exp_r = 16'h0000;
    endcase
    checks++;
    if (result !== exp_r || cout !== exp_c) begin
      failures++;
      $display("FAIL op=%0d ac=%h dr=%h cin=%b: got %h/%b exp %h/%b",
               code, a, b, c, result, cout, exp_r, exp_c);
    end
  endtask

  initial begin
    // Corner cases, including the worked 32-bit addition of the design
    // description (low words 0007 + FFFF give 0006 with carry 1).
    check_one(3'd1, 16'h0007, 16'hFFFF, 1'b0);
    if (result !== 16'h0006 || cout !== 1'b1) failures++;
    checks++;
    check_one(3'd4, 16'hFFFE, 16'h0000, 1'b0);  // CIL FFFE -> FFFC, E=1
    if (result !== 16'hFFFC || cout !== 1'b1) failures++;
    checks++;
    check_one(3'd5, 16'hFFFC, 16'h0000, 1'b0);  // CIR FFFC -> 7FFE, E=0
    if (result !== 16'h7FFE || cout !== 1'b0) failures++;
    checks++;
    for (int k = 0; k < 8; k++) begin
      check_one(k[2:0], 16'hFFFF, 16'hFFFF, 1'b1);
      check_one(k[2:0], 16'h0000, 16'h0000, 1'b0);
      check_one(k[2:0], 16'h8001, 16'h7FFF, 1'b1);
    end
    for (int n = 0; n < 2000; n++)
      check_one(3'($urandom_range(0, 7)), 16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
