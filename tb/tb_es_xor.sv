// tb_es_xor: all 16 input patterns of the 4-bit XOR against the parity.
module tb_es_xor;
  logic [3:0] es;
  logic xor_out;
  int checks = 0, failures = 0;

  es_xor #(.N(4)) dut (.es, .xor_out);

  initial begin
    for (int i = 0; i < 16; i++) begin
      es = 4'(i);
      #1;
      checks++;
      if (xor_out != 1'($countones(es) % 2)) begin
        failures++; $display("FAIL es=%b xor=%b", es, xor_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
