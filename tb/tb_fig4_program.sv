// tb_fig4_program: runs the ten-number summation program exactly as its
// memory image is published, which places the program at address 0, so the
// processor is built here with a start address of 0 instead of 2.
//
// Image before (address: word): 0 CLA 7800, 1 ADD I 8 9008, 2 ISZ 8 6008,
// 3 ISZ 7 6007, 4 BUN 1 4001, 5 STA 9 3009, 6 HLT 7001, 7 FFF6 (count -10),
// 8 0009 (pointer), 9..18 the numbers 1..10.
// Expected after: 7 0000, 8 0013, 9 0037 (= 55), program words unchanged.
// The run length is checked against the per-instruction step counts. Over
// the first fifteen clock cycles after reset, the sequence of values on the
// address bus must be 000, 800 (the low bits of CLA, loaded into AR at T2),
// 001, 008, 009, 002, 008 and the display (accumulator) must go from 0000
// to 0001, as in the published trace of this run; only the order of values
// is compared, not the cycle of each change.
module tb_fig4_program;
  logic        clk = 1'b0, reset = 1'b1, intr = 1'b0;
  logic [11:0] address;
  logic [15:0] data_in, data_out;
  logic        re, we, ready;
  logic [15:0] display;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic [11:0] addr_seq[$];
  logic [15:0] disp_seq[$];

  localparam logic [11:0] ADDR_EXP [7] = '{12'h000, 12'h800, 12'h001, 12'h008,
                                           12'h009, 12'h002, 12'h008};

  localparam logic [15:0] BEFORE [10] = '{16'h7800, 16'h9008, 16'h6008, 16'h6007,
      16'h4001, 16'h3009, 16'h7001, 16'hFFF6, 16'h0009, 16'h0001};
  localparam logic [15:0] AFTER  [10] = '{16'h7800, 16'h9008, 16'h6008, 16'h6007,
      16'h4001, 16'h3009, 16'h7001, 16'h0000, 16'h0013, 16'h0037};

  microprocessor #(.RESET_PC(12'd0)) dut (.clk, .reset, .intr, .address, .data_in,
      .data_out, .re, .we, .display, .ready);

  mem_model #(.AW(12), .DW(16)) mem (.clk, .addr(address), .wdata(data_out),
                                     .rd(re), .wr(we), .rdata(data_in));

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 4096; a++) mem.ram[a] = 16'h0000;
    for (int a = 0; a < 10; a++) mem.ram[a] = BEFORE[a];
    for (int k = 2; k <= 10; k++) mem.ram[8 + k] = 16'(k);
    @(posedge clk); @(posedge clk);
    #1 reset = 1'b0;
    addr_seq.push_back(address);
    disp_seq.push_back(display);
    while (ready && cycles < 2000) begin
      @(posedge clk); #1;
      cycles++;
      if (cycles < 15) begin
        if (address != addr_seq[$]) addr_seq.push_back(address);
        if (display != disp_seq[$]) disp_seq.push_back(display);
      end
    end
    checks++;
    if (addr_seq.size() != 7) begin
      failures++;
      $display("FAIL %0d address values in the first cycles, expected 7", addr_seq.size());
    end else
      for (int k = 0; k < 7; k++)
        if (addr_seq[k] != ADDR_EXP[k]) begin
          failures++;
          $display("FAIL address value %0d: %h expected %h", k, addr_seq[k], ADDR_EXP[k]);
        end
    checks++;
    if (disp_seq.size() != 2 || disp_seq[0] != 16'h0000 || disp_seq[1] != 16'h0001) begin
      failures++;
      $display("FAIL display sequence in the first cycles");
    end
    for (int a = 0; a < 10; a++) begin
      checks++;
      if (mem.ram[a] !== AFTER[a]) begin
        failures++;
        $display("FAIL word %0d: %h expected %h", a, mem.ram[a], AFTER[a]);
      end
    end
    checks++;
    if (ready) begin
      failures++;
      $display("FAIL no halt");
    end
    // CLA, 10 x (ADD I, ISZ, ISZ), 9 x BUN, STA, HLT, plus the reset step
    checks++;
    if (cycles != 1 + 4 + 10 * (6 + 7 + 7) + 9 * 5 + 5 + 4) begin
      failures++;
      $display("FAIL cycles %0d", cycles);
    end
    $display("summation took %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
