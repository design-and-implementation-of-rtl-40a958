// tb_microprocessor: end-to-end testbench of the whole processor at its
// default parameters, with a behavioural memory. It observes the
// processor's ports only.
//
// Runs, each from reset:
//  1. the 32-bit addition program (0000_0007 + 0400_FFFF = 0401_0006, the
//     display port passing through 0007, 0006, 0000, 0001, 0401),
//  2. the bit set/reset program (FFFE -> 7FFF, the display port passing
//     through FFFE, FFFC, 7FFE, 3FFF, 7FFF),
//  3. the ten-number summation loop, moved up by two words so that it
//     starts at the reset address (indirect ADD, two ISZ counters, BUN),
//  4. an interrupt program: a request while interrupts are off is dropped,
//     a request after ION enters the interrupt cycle, the service routine
//     counts with ISZ, re-enables and returns with BUN I 0; a request during
//     the service routine (interrupts off again) is dropped too,
//  5. random programs of all instructions but HLT (forward jumps only, so
//     they end).
// Programs 1, 2, 3 and 5 are checked in lockstep against an instruction-set
// model kept in this file: every memory access (fetch, indirect read,
// operand read, write) must match the model's in order, address and data,
// and at every instruction fetch the display port (the accumulator) must
// equal the model's accumulator. The clock cycles of programs 1 to 4 are
// checked against the step counts of each instruction. Each mechanism
// (indirect addressing, skip, subroutine call, ISZ, carry, circulate,
// ION/IOF, interrupt cycle, dropped request, halt) is counted, and one that
// never occurs counts a failure.
module tb_microprocessor;
  import cpu_pkg::*;

  logic        clk = 1'b0, reset = 1'b1, intr = 1'b0;
  logic [11:0] address;
  logic [15:0] data_in, data_out;
  logic        re, we, ready;
  logic [15:0] display;
  int checks = 0, failures = 0;

  microprocessor dut (.clk, .reset, .intr, .address, .data_in, .data_out,
                      .re, .we, .display, .ready);

  mem_model #(.AW(12), .DW(16)) mem (.clk, .addr(address), .wdata(data_out),
                                     .rd(re), .wr(we), .rdata(data_in));

  always #5 clk = ~clk;

  // ------------------------------------------------------------------
  // Mechanism counters
  int n_indirect = 0, n_skip = 0, n_bsa = 0, n_isz = 0, n_carry = 0;
  int n_circ = 0, n_int_cycle = 0, n_dropped = 0, n_halt = 0;
  int n_ion = 0, n_iof = 0;

  // ------------------------------------------------------------------
  // Helpers
  task automatic clear_mem();
    for (int a = 0; a < 4096; a++) mem.ram[a] = 16'h0000;
  endtask

  task automatic load(input int base, input logic [15:0] words[]);
    foreach (words[k]) mem.ram[base + k] = words[k];
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  // Steps of one instruction: 3 fetch/decode steps, T3, execute steps.
  function automatic int steps(input logic [15:0] w);
    case (w[14:12])
      3'd0, 3'd1, 3'd2, 3'd5: return 6;
      3'd3, 3'd4:             return 5;
      3'd6:                   return 7;
      default:                return 4;
    endcase
  endfunction

  // ------------------------------------------------------------------
  // Instruction-set reference model; each step queues the memory accesses
  // the instruction must make.
  typedef struct packed {
    logic        wr;
    logic        fetch;
    logic [11:0] addr;
    logic [15:0] data;
    logic [15:0] ac;     // accumulator before the instruction (fetch only)
  } access_t;

  access_t     expq[$];
  logic [15:0] m_mem [4096];
  logic [11:0] m_pc;
  logic [15:0] m_ac;
  logic        m_e, m_ien, m_halt;
  bit          lockstep = 0;

  function automatic access_t acc(input logic wr, input logic fetch,
                                  input logic [11:0] a, input logic [15:0] d);
    acc.wr = wr; acc.fetch = fetch; acc.addr = a; acc.data = d; acc.ac = m_ac;
  endfunction

  task automatic iss_step();
    logic [15:0] w, v;
    logic [11:0] ea;
    logic [16:0] s;
    logic        old_e;
    logic [15:0] old_ac;
    w = m_mem[m_pc];
    expq.push_back(acc(1'b0, 1'b1, m_pc, w));
    m_pc = m_pc + 1;
    if (w[14:12] != 3'd7) begin
      if (w[15]) begin
        expq.push_back(acc(1'b0, 1'b0, w[11:0], m_mem[w[11:0]]));
        ea = m_mem[w[11:0]][11:0];
        n_indirect++;
      end else begin
        ea = w[11:0];
      end
      case (w[14:12])
        3'd0, 3'd1, 3'd2: begin
          expq.push_back(acc(1'b0, 1'b0, ea, m_mem[ea]));
          if (w[14:12] == 3'd0) m_ac = m_ac & m_mem[ea];
          else if (w[14:12] == 3'd2) m_ac = m_mem[ea];
          else begin
            s = {1'b0, m_ac} + {1'b0, m_mem[ea]};
            m_ac = s[15:0]; m_e = s[16];
            if (s[16]) n_carry++;
          end
        end
        3'd3: begin
          m_mem[ea] = m_ac;
          expq.push_back(acc(1'b1, 1'b0, ea, m_ac));
        end
        3'd4: m_pc = ea;
        3'd5: begin
          m_mem[ea] = {4'h0, m_pc};
          expq.push_back(acc(1'b1, 1'b0, ea, {4'h0, m_pc}));
          m_pc = ea + 1;
          n_bsa++;
        end
        default: begin
          expq.push_back(acc(1'b0, 1'b0, ea, m_mem[ea]));
          v = m_mem[ea] + 1;
          m_mem[ea] = v;
          expq.push_back(acc(1'b1, 1'b0, ea, v));
          n_isz++;
          if (v == 0) begin m_pc = m_pc + 1; n_skip++; end
        end
      endcase
    end else if (!w[15]) begin
      old_e = m_e; old_ac = m_ac;
      if (w[B_CLA]) m_ac = 0;
      else if (w[B_CMA]) m_ac = ~old_ac;
      else if (w[B_CIR]) begin m_ac = {old_e, old_ac[15:1]}; m_e = old_ac[0]; n_circ++; end
      else if (w[B_CIL]) begin m_ac = {old_ac[14:0], old_e}; m_e = old_ac[15]; n_circ++; end
      else if (w[B_INC]) m_ac = old_ac + 1;
      if (!(w[B_CMA] == 0 && (w[B_CIR] || w[B_CIL]))) begin
        if (w[B_CME]) m_e = ~old_e;
        else if (w[B_CLE]) m_e = 0;
      end
      if ((w[B_SPA] && !old_ac[15]) || (w[B_SNA] && old_ac[15]) ||
          (w[B_SZA] && old_ac == 0) || (w[B_SZE] && !old_e)) begin
        m_pc = m_pc + 1;
        n_skip++;
      end
      if (w[B_HLT]) m_halt = 1;
    end else begin
      if (w[B_ION]) begin m_ien = 1; n_ion++; end
      else if (w[B_IOF]) begin m_ien = 0; n_iof++; end
    end
  endtask

  // Compare every memory access of the processor with the model's.
  always @(posedge clk) begin
    if (!reset && ready && (re || we)) begin
      if (we && address == 12'h000) n_int_cycle++;
      if (lockstep) begin
        access_t e_acc;
        if (expq.size() == 0) iss_step();
        e_acc = expq.pop_front();
        checks++;
        if (we !== e_acc.wr || address !== e_acc.addr ||
            (we ? data_out : data_in) !== e_acc.data) begin
          failures++;
          $display("FAIL access: %s %h data %h, expected %s %h data %h",
                   we ? "write" : "read", address, we ? data_out : data_in,
                   e_acc.wr ? "write" : "read", e_acc.addr, e_acc.data);
        end
        if (e_acc.fetch) begin
          checks++;
          if (display !== e_acc.ac) begin
            failures++;
            $display("FAIL accumulator before %h: %h expected %h", e_acc.data, display, e_acc.ac);
          end
        end
      end
    end
  end

  always @(negedge ready) if (!reset) n_halt++;

  // Reset, then run until HLT; returns the clock edges from the release of
  // reset to the edge that halts the processor.
  task automatic run(input int limit, input bit with_model, output int cycles);
    if (with_model) begin
      for (int a = 0; a < 4096; a++) m_mem[a] = mem.ram[a];
      m_pc = 12'd2; m_ac = 0; m_e = 0; m_ien = 0; m_halt = 0;
      expq.delete();
    end
    lockstep = with_model;
    reset = 1'b1;
    @(posedge clk); @(posedge clk);
    #1 reset = 1'b0;
    cycles = 0;
    while (ready && cycles < limit) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    lockstep = 0;
    if (ready) begin
      failures++;
      $display("FAIL program did not halt in %0d cycles", limit);
    end
    if (with_model) begin
      check("model reached HLT", {31'd0, m_halt}, 1);
      check("no access missing", expq.size(), 0);
      check("final accumulator", {16'h0, display}, {16'h0, m_ac});
      for (int a = 0; a < 'h200; a++)
        if (mem.ram[a] !== m_mem[a]) begin
          failures++;
          $display("FAIL memory %h: %h expected %h", a, mem.ram[a], m_mem[a]);
        end
      checks++;
    end
  endtask

  // Random program of single-action instructions with forward jumps only.
  localparam int PROG_LEN = 80;
  task automatic gen_random();
    logic [15:0] w;
    int kind, tgt;
    clear_mem();
    for (int a = 'h80; a < 'h90; a++) mem.ram[a] = 16'(12'h100 + $urandom_range(0, 31));
    for (int a = 'h100; a < 'h120; a++)
      mem.ram[a] = ($urandom_range(0, 3) == 0) ? 16'hFFFF : 16'($urandom);
    for (int a = 2; a < 2 + PROG_LEN; a++) begin
      kind = $urandom_range(0, 9);
      if (kind < 4) begin
        // AND, ADD, LDA, STA or ISZ, direct or indirect
        case ($urandom_range(0, 4))
          0: w[14:12] = 3'd0;
          1: w[14:12] = 3'd1;
          2: w[14:12] = 3'd2;
          3: w[14:12] = 3'd3;
          default: w[14:12] = 3'd6;
        endcase
        w[15] = 1'($urandom);
        w[11:0] = w[15] ? 12'(12'h80 + $urandom_range(0, 15))
                        : 12'(12'h100 + $urandom_range(0, 31));
      end else if (kind == 4) begin
        // BUN or BSA, forward
        tgt = a + $urandom_range(2, 6);
        if (tgt > PROG_LEN) tgt = PROG_LEN;
        w = {1'b0, ($urandom_range(0, 1) == 0) ? 3'd4 : 3'd5, 12'(tgt)};
        if (tgt <= a) w = 16'h7000;
      end else if (kind < 9) begin
        // one register-reference operation (CLA .. SZE) or NOP
        w = 16'h7000 | (16'h0002 << $urandom_range(0, 10));
        if ($urandom_range(0, 11) == 0) w = 16'h7000;
      end else begin
        w = ($urandom_range(0, 1) == 0) ? 16'hF080 : 16'hF040;
      end
      mem.ram[a] = w;
    end
    for (int a = 2 + PROG_LEN; a < 2 + PROG_LEN + 8; a++) mem.ram[a] = 16'h7001;
  endtask

  // ------------------------------------------------------------------
  logic [15:0] disp_trace[$];
  bit          trace_on = 0;
  always @(display) if (trace_on && !reset) disp_trace.push_back(display);

  initial begin
    int cyc, exp_cyc, pulses;
    logic [15:0] prog[];

    // 1. 32-bit addition
    clear_mem();
    prog = '{16'h7400, 16'h2040, 16'h1050, 16'h3060, 16'h7800, 16'h7040,
             16'h1041, 16'h1051, 16'h3061, 16'h7001};
    load(2, prog);
    mem.ram['h40] = 16'h0007; mem.ram['h41] = 16'h0000;
    mem.ram['h50] = 16'hFFFF; mem.ram['h51] = 16'h0400;
    disp_trace.delete();
    trace_on = 1;
    run(1000, 1, cyc);
    trace_on = 0;
    check("add32 display changes", disp_trace.size(), 5);
    if (disp_trace.size() == 5) begin
      check("add32 display 1", {16'h0, disp_trace[0]}, 32'h0007);
      check("add32 display 2", {16'h0, disp_trace[1]}, 32'h0006);
      check("add32 display 3", {16'h0, disp_trace[2]}, 32'h0000);
      check("add32 display 4", {16'h0, disp_trace[3]}, 32'h0001);
      check("add32 display 5", {16'h0, disp_trace[4]}, 32'h0401);
    end
    exp_cyc = 1;
    foreach (prog[k]) exp_cyc += steps(prog[k]);
    check("add32 low word", {16'h0, mem.ram['h60]}, 32'h0006);
    check("add32 high word", {16'h0, mem.ram['h61]}, 32'h0401);
    check("add32 cycles", cyc, exp_cyc);

    // 2. bit set / reset
    clear_mem();
    prog = '{16'h7400, 16'h2020, 16'h7040, 16'h7400, 16'h7080, 16'h7080,
             16'h7400, 16'h7100, 16'h7040, 16'h7001};
    load(2, prog);
    mem.ram['h20] = 16'hFFFE;
    disp_trace.delete();
    trace_on = 1;
    run(1000, 1, cyc);
    trace_on = 0;
    exp_cyc = 1;
    foreach (prog[k]) exp_cyc += steps(prog[k]);
    check("bitset result", {16'h0, display}, 32'h7FFF);
    check("bitset cycles", cyc, exp_cyc);
    check("bitset display changes", disp_trace.size(), 5);
    if (disp_trace.size() == 5) begin
      check("bitset display 1", {16'h0, disp_trace[0]}, 32'hFFFE);
      check("bitset display 2", {16'h0, disp_trace[1]}, 32'hFFFC);
      check("bitset display 3", {16'h0, disp_trace[2]}, 32'h7FFE);
      check("bitset display 4", {16'h0, disp_trace[3]}, 32'h3FFF);
      check("bitset display 5", {16'h0, disp_trace[4]}, 32'h7FFF);
    end

    // 3. summation of ten numbers, relocated to start at address 2
    clear_mem();
    prog = '{16'h7800, 16'h900A, 16'h600A, 16'h6009, 16'h4003, 16'h300B,
             16'h7001, 16'hFFF6, 16'h000B};
    load(2, prog);
    for (int k = 0; k < 10; k++) mem.ram[11 + k] = 16'(k + 1);
    run(2000, 1, cyc);
    // CLA, 10 x (ADD I, ISZ, ISZ), 9 x BUN, STA, HLT
    exp_cyc = 1 + 4 + 10 * (6 + 7 + 7) + 9 * 5 + 5 + 4;
    check("sum counter", {16'h0, mem.ram[9]}, 32'h0000);
    check("sum pointer", {16'h0, mem.ram[10]}, 32'h0015);
    check("sum result", {16'h0, mem.ram[11]}, 32'h0037);
    check("sum cycles", cyc, exp_cyc);

    // 4. interrupts
    clear_mem();
    mem.ram[1] = 16'h4050;                        // vector: BUN 050
    prog = '{16'hF080, 16'h7800, 16'h7020, 16'h7020, 16'h7020, 16'h7020,
             16'h7020, 16'h3060, 16'h7001};
    load(2, prog);
    mem.ram['h50] = 16'h6062;                     // ISZ 062
    mem.ram['h51] = 16'hF080;                     // ION
    mem.ram['h52] = 16'hC000;                     // BUN I 000
    n_int_cycle = 0;
    pulses = 0;
    fork
      run(1000, 0, cyc);
      begin
        // before ION: dropped; after ION: taken; inside the service
        // routine (IEN cleared on entry): dropped
        @(negedge reset);
        repeat (2) @(posedge clk);
        #1 intr = 1'b1; @(posedge clk); #1 intr = 1'b0;
        repeat (12) @(posedge clk);
        #1 intr = 1'b1; @(posedge clk); #1 intr = 1'b0;
        repeat (14) @(posedge clk);
        #1 intr = 1'b1; @(posedge clk); #1 intr = 1'b0;
        pulses = 3;
      end
    join
    n_dropped = pulses - n_int_cycle;
    // main program, interrupt cycle, BUN 050 at the vector, ISZ, ION, BUN I 0
    exp_cyc = 1 + (4 + 4 + 5 * 4 + 5 + 4) + 3 + 5 + (7 + 4 + 5);
    check("int main result", {16'h0, mem.ram['h60]}, 32'h0005);
    check("int service count", {16'h0, mem.ram['h62]}, 32'h0001);
    checks++;
    if (mem.ram[0] < 16'd5 || mem.ram[0] > 16'd9) begin
      failures++;
      $display("FAIL return address %h", mem.ram[0]);
    end
    check("int cycles", cyc, exp_cyc);
    check("one interrupt cycle", n_int_cycle, 1);
    check("two requests dropped", n_dropped, 2);

    // 5. random programs against the instruction-set model
    for (int p = 0; p < 25; p++) begin
      gen_random();
      run(4000, 1, cyc);
    end

    // mechanisms
    check("indirect addressing seen", {31'd0, n_indirect > 0}, 1);
    check("skip seen", {31'd0, n_skip > 0}, 1);
    check("BSA seen", {31'd0, n_bsa > 0}, 1);
    check("ISZ seen", {31'd0, n_isz > 0}, 1);
    check("ADD carry seen", {31'd0, n_carry > 0}, 1);
    check("circulate seen", {31'd0, n_circ > 0}, 1);
    check("ION seen", {31'd0, n_ion > 0}, 1);
    check("IOF seen", {31'd0, n_iof > 0}, 1);
    check("halt seen", {31'd0, n_halt > 0}, 1);
    $display("mechanisms: indirect=%0d skip=%0d bsa=%0d isz=%0d carry=%0d circ=%0d int=%0d dropped=%0d ion=%0d iof=%0d halt=%0d",
             n_indirect, n_skip, n_bsa, n_isz, n_carry, n_circ, n_int_cycle,
             n_dropped, n_ion, n_iof, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
