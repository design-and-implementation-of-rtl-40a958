// tb_shared_bus: self-checking testbench of the shared-bus multiplexer.
// Drives distinct random values on all seven sources and checks, for every
// select code, that the bus carries the source the code names (AR and PC
// zero-extended, code 000 giving zero).
module tb_shared_bus;
  import cpu_pkg::*;

  logic [11:0] ar, pc;
  logic [15:0] dr, ac, ir, tr, mem, bus, exp_v;
  bus_sel_e    sel;
  int checks = 0, failures = 0;

  shared_bus #(.DW(16), .AW(12)) dut (.sel, .ar, .pc, .dr, .ac, .ir, .tr, .mem, .bus);

  initial begin
    for (int n = 0; n < 200; n++) begin
      ar = 12'($urandom); pc = 12'($urandom); dr = 16'($urandom);
      ac = 16'($urandom); ir = 16'($urandom); tr = 16'($urandom);
      mem = 16'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = bus_sel_e'(s[2:0]);
        #1;
        case (s)
          1: exp_v = {4'h0, ar};
          2: exp_v = {4'h0, pc};
          3: exp_v = dr;
          4: exp_v = ac;
          5: exp_v = ir;
          6: exp_v = tr;
          7: exp_v = mem;
          default: exp_v = 16'h0000;
        endcase
        checks++;
        if (bus !== exp_v) begin
          failures++;
          $display("FAIL sel=%0d bus=%h exp=%h", s, bus, exp_v);
        end
      end
    end
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
