// tb_es_clock_driver: all four CLK1/CLK2 combinations, compared with the
// phase table (LR, HR, OFF, evaluation), plus the complementary pairs and
// the rule that equalization (S1) and evaluation (S2) never overlap.
module tb_es_clock_driver;
  logic clk1, clk2, s1, s1b, s2, s2b, s3, s3b, sen;
  int checks = 0, failures = 0;

  es_clock_driver dut (.clk1, .clk2, .s1, .s1b, .s2, .s2b, .s3, .s3b, .sen);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    // {clk1, clk2} -> expected {s1, s3, s2, sen}
    static logic [3:0] exp_tab [4] = '{4'b0000, 4'b0011, 4'b1000, 4'b1100};
    for (int i = 0; i < 4; i++) begin
      {clk1, clk2} = 2'(i);
      #1;
      check({s1, s3, s2, sen} == exp_tab[i], $sformatf("clk=%b got %b exp %b", 2'(i), {s1, s3, s2, sen}, exp_tab[i]));
      check(s1b == ~s1 && s2b == ~s2 && s3b == ~s3, "complementary pairs");
      check(!(s1 && s2), "equalization and evaluation overlap");
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
