// tb_vn_wait_flag: random frames with and without waiting flags. A
// reference model (one optional held flag) predicts, for every strobe with
// a valid flag, whether a pair is formed and which flags make it up; VF
// is compared after every clock.
module tb_vn_wait_flag;
  import vn8w_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, flag_valid = 0;
  flag7_t flag = '0, w1;
  logic pair_valid, vf;
  int checks = 0, failures = 0;

  vn_wait_flag dut (.clk, .rst_n, .en, .flag, .flag_valid, .w1, .pair_valid, .vf);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  bit     m_vf = 0;
  flag7_t m_flag = '0;
  int npairs = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom % 3 == 0);
      flag_valid = 1'($urandom % 2);
      flag = 3'($urandom % 7);
      #1;
      if (en && flag_valid && m_vf) begin
        check(pair_valid, "pair expected");
        check(w1 == m_flag, $sformatf("w1 %0d exp %0d", w1, m_flag));
        npairs++;
        m_vf = 0;
      end else begin
        check(!pair_valid, "unexpected pair");
        if (en && flag_valid) begin m_vf = 1; m_flag = flag; end
      end
      @(posedge clk); #1;
      check(vf == m_vf, $sformatf("vf %0d exp %0d", vf, m_vf));
    end
    check(npairs > 100, "enough pairs");
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
