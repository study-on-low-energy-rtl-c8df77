// tb_vn_wait_logic: exhaustive check of the Waiting Logic.
// All 49 pairs of base-7 flags are applied. The valid masks are compared
// with the expected 5/4/0-bit split (w2 < 4 or (w2 = 6, w1 < 4): 5 bits;
// w2 = 4, 5 or (w2 = 6, w1 = 4, 5): 4 bits; w1 = w2 = 6: none). The
// counts must be 32/16/1 and the valid codes of each length must all
// differ, which is the condition for unbiased output.
module tb_vn_wait_logic;
  import vn8w_pkg::*;

  flag7_t w1, w2;
  logic [4:0] dout, dvalid;
  int checks = 0, failures = 0;
  bit seen5 [32];
  bit seen4 [16];
  int n5 = 0, n4 = 0, n0 = 0;

  vn_wait_logic dut (.w1, .w2, .dout, .dvalid);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int a = 0; a < 7; a++) begin
      for (int b = 0; b < 7; b++) begin
        logic [4:0] exp_mask;
        w1 = 3'(a); w2 = 3'(b);
        #1;
        if (b < 4 || (b == 6 && a < 4))       exp_mask = 5'b11111;
        else if (b == 6 && a == 6)            exp_mask = 5'b00000;
        else                                  exp_mask = 5'b01111;
        check(dvalid == exp_mask, $sformatf("mask w1=%0d w2=%0d got %b", a, b, dvalid));
        if (dvalid == 5'b11111) begin
          check(!seen5[dout], $sformatf("dup 5-bit code %b", dout));
          seen5[dout] = 1; n5++;
        end else if (dvalid == 5'b01111) begin
          check(!seen4[dout[3:0]], $sformatf("dup 4-bit code %b", dout[3:0]));
          seen4[dout[3:0]] = 1; n4++;
        end else n0++;
      end
    end
    check(n5 == 32, $sformatf("n5=%0d", n5));
    check(n4 == 16, $sformatf("n4=%0d", n4));
    check(n0 == 1,  $sformatf("n0=%0d", n0));
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
