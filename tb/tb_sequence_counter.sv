// tb_sequence_counter: self-checking testbench of the one-hot timing
// register. Checks the reset value 8000h (T15), T0 one clock after reset,
// a full rotation through T0..T15, the return to T0 on clr, and that hold
// freezes the register; a reference step index is kept independently.
module tb_sequence_counter;
  logic        clk = 1'b0, rst, clr, hold;
  logic [15:0] t;
  int          step;  // expected active step, 0..15
  int checks = 0, failures = 0;

  sequence_counter dut (.clk, .rst, .clr, .hold, .t);

  always #5 clk = ~clk;

  task automatic expect_step(input int s);
    checks++;
    if (t !== (16'h0001 << s)) begin
      failures++;
      $display("FAIL t=%h expected T%0d", t, s);
    end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; hold = 1'b0;
    @(posedge clk); #1;
    expect_step(15);
    rst = 1'b0;
    @(posedge clk); #1;
    expect_step(0);
    step = 0;
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1;
      step = (step + 1) % 16;
      expect_step(step);
    end
    for (int n = 0; n < 300; n++) begin
      clr  = ($urandom_range(0, 5) == 0);
      hold = ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      if (hold)     step = step;
      else if (clr) step = 0;
      else          step = (step + 1) % 16;
      expect_step(step);
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
