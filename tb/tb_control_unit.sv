// tb_control_unit: self-checking testbench of the hardwired control unit
// (decoder, sequence counter, control logic and flags) on its own.
// The testbench plays the instruction register: at every T0 it presents the
// next instruction word. It checks the number of clock cycles each kind of
// instruction takes (4 register/control, 5 STA and BUN, 6 AND, ADD, LDA,
// BSA and indirect variants alike, 7 ISZ), the carry flag updates (CLE,
// CME, carry from ADD), ION/IOF, the entry into the three-cycle interrupt
// cycle and its bus and memory actions, the dropping of a request while
// interrupts are off, and that HLT drops READY and freezes the unit.
// Only the unit's ports are observed: the start of an instruction (T0) is
// recognised by its fetch micro-operation AR <- PC, the interrupt cycle by
// AR <- 0, TR <- PC.
module tb_control_unit;
  import cpu_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, intr = 1'b0;
  logic [15:0] ir;
  logic        zac, zdr, ac_msb, alu_cout;
  ru_ctl_t     ru;
  bus_sel_e    bus_sel;
  alu_op_e     alu_op;
  logic        alu_cin, mem_rd, mem_wr, ready;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst, .intr, .ir, .zac, .zdr, .ac_msb, .alu_cout,
                    .ru, .bus_sel, .alu_op, .alu_cin, .mem_rd, .mem_wr, .ready);

  always #5 clk = ~clk;

  logic fetch_t0, int_t0;
  assign fetch_t0 = ru.ar.ld && !ru.ar.clr && bus_sel == BUS_PC && !ru.tr.ld;
  assign int_t0   = ru.ar.clr && ru.tr.ld && bus_sel == BUS_PC;

  task automatic chk(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // Run one instruction starting at T0; returns its length in cycles.
  task automatic exec(input logic [15:0] w, output int cycles);
    ir = w;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!fetch_t0 && !int_t0 && cycles < 40);
  endtask

  function automatic int steps(input logic [15:0] w);
    case (w[14:12])
      3'd0, 3'd1, 3'd2, 3'd5: return 6;
      3'd3, 3'd4:             return 5;
      3'd6:                   return 7;
      default:                return 4;
    endcase
  endfunction

  initial begin
    int c;
    logic [15:0] w;
    ir = 16'h7000; zac = 0; zdr = 0; ac_msb = 0; alu_cout = 0;
    @(posedge clk); #1;
    chk("reset step idle", (ru == '0 && bus_sel == BUS_NONE && !mem_wr) ? 1 : 0, 1);
    rst = 0;
    @(posedge clk); #1;
    chk("T0 after reset", fetch_t0, 1);
    @(posedge clk); #1;
    chk("T1 reads instruction", (ru.ir_ld && mem_rd && ru.pc.inc) ? 1 : 0, 1);
    @(posedge clk); #1;
    chk("T2 AR from IR", (ru.ar.ld && bus_sel == BUS_IR) ? 1 : 0, 1);
    @(posedge clk); #1;
    @(posedge clk); #1;
    chk("T0 after NOP", fetch_t0, 1);
    chk("ready", ready, 1);

    // instruction lengths, direct and indirect
    for (int n = 0; n < 200; n++) begin
      w = 16'($urandom);
      if (w[14:12] == 3'd7) w[11:0] = 12'h020;   // INC (or an unused I/O word)
      exec(w, c);
      chk($sformatf("length of %h", w), c, steps(w));
    end

    // carry flag
    exec(16'h7400, c); chk("CLE", alu_cin, 0);
    exec(16'h7100, c); chk("CME", alu_cin, 1);
    exec(16'h7100, c); chk("CME again", alu_cin, 0);
    alu_cout = 1;
    exec(16'h1123, c); chk("ADD carry to E", alu_cin, 1);
    alu_cout = 0;
    exec(16'h7080, c); chk("CIR takes E from ALU", alu_cin, 0);

    // interrupts off: request dropped
    exec(16'hF040, c); chk("IOF length", c, 4);
    fork
      exec(16'h7020, c);
      begin @(posedge clk); #1 intr = 1; @(posedge clk); #1 intr = 0; end
    join
    chk("no interrupt cycle while off", int_t0, 0);
    exec(16'h7020, c); chk("still no interrupt", int_t0, 0);

    // interrupts on: the request is taken at the end of the instruction
    exec(16'hF080, c); chk("ION length", c, 4);
    fork
      exec(16'h2050, c);
      begin @(posedge clk); #1 intr = 1; @(posedge clk); #1 intr = 0; end
    join
    chk("LDA still 6 cycles", c, 6);
    chk("interrupt cycle entered", int_t0, 1);
    chk("RT0 clears AR", ru.ar.clr, 1);
    chk("RT0 loads TR from PC", (ru.tr.ld && bus_sel == BUS_PC) ? 1 : 0, 1);
    @(posedge clk); #1;
    chk("RT1 writes TR to memory", (mem_wr && bus_sel == BUS_TR) ? 1 : 0, 1);
    chk("RT1 clears PC", ru.pc.clr, 1);
    @(posedge clk); #1;
    chk("RT2 increments PC", ru.pc.inc, 1);
    @(posedge clk); #1;
    chk("back to fetch", int_t0, 0);
    chk("fetch after interrupt", fetch_t0, 1);
    // IEN was cleared on entry: a new request is dropped
    fork
      exec(16'h7020, c);
      begin @(posedge clk); #1 intr = 1; @(posedge clk); #1 intr = 0; end
    join
    chk("interrupts disabled after entry", int_t0, 0);
    exec(16'h7020, c); chk("still disabled", int_t0, 0);

    // skip on zero DR for ISZ
    zdr = 1;
    ir = 16'h6010;
    repeat (6) @(posedge clk);
    #1 chk("ISZ T6 writes", mem_wr, 1);
    chk("ISZ skip", ru.pc.inc, 1);
    @(posedge clk); #1;
    zdr = 0;

    // halt
    ir = 16'h7001;
    repeat (3) @(posedge clk);
    #1 chk("running until HLT T3", ready, 1);
    @(posedge clk); #1;
    chk("halted after 4 cycles", ready, 0);
    repeat (5) begin
      @(posedge clk); #1;
      chk("frozen while halted", (ru == '0 && bus_sel == BUS_NONE && !mem_wr && !mem_rd) ? 1 : 0, 1);
    end
    // reset leaves the halted state
    rst = 1; @(posedge clk); #1 rst = 0;
    chk("ready after reset", ready, 1);
    @(posedge clk); #1;
    chk("fetch after reset", fetch_t0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
