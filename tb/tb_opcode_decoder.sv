// tb_opcode_decoder: self-checking testbench of the opcode decoder.
// For each of the eight opcodes checks that exactly the matching D output
// is high.
module tb_opcode_decoder;
  logic [2:0] opcode;
  logic [7:0] d;
  int checks = 0, failures = 0;

  opcode_decoder dut (.opcode, .d);

  initial begin
    for (int k = 0; k < 8; k++) begin
      opcode = k[2:0];
      #1;
      checks++;
      if (d !== (8'h01 << k)) begin
        failures++;
        $display("FAIL opcode=%0d d=%b", k, d);
      end
      checks++;
      if ($countones(d) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
