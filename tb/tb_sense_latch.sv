// tb_sense_latch: random node voltages; after each SEN rising edge the
// output must equal (VGL > VGR) and must hold while the inputs change
// with SEN low.
module tb_sense_latch;
  logic sen = 0, q;
  real vgl = 0.5, vgr = 0.5;
  int checks = 0, failures = 0;

  sense_latch dut (.sen, .vgl, .vgr, .q);

  initial begin
    for (int i = 0; i < 200; i++) begin
      bit e;
      vgl = real'($urandom % 1000) / 1000.0;
      vgr = real'($urandom % 1000) / 1000.0;
      e = vgl > vgr;
      #2 sen = 1;
      #3 checks++;
      if (q != e) begin failures++; $display("FAIL vgl=%f vgr=%f q=%b", vgl, vgr, q); end
      sen = 0;
      // inputs move, output must hold
      vgl = 1.0 - vgl; vgr = 1.0 - vgr;
      #2 checks++;
      if (q != e) begin failures++; $display("FAIL output did not hold"); end
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
