// tb_vn_sipo8: random bit stream into the SIPO. A reference queue of the
// bits sent is kept; at every strobe the parallel word must equal the last
// eight bits (oldest in word[7]), strobes must come exactly every eight
// clocks, and the word must stay stable between strobes.
module tb_vn_sipo8;
  logic clk = 0, rst_n = 0, din = 0;
  logic [7:0] word;
  logic wstb;
  int checks = 0, failures = 0;

  vn_sipo8 dut (.clk, .rst_n, .din, .word, .wstb);

  always #5 clk = ~clk;

  logic [7:0] hist;      // last 8 bits sent, newest in bit 0
  int sent = 0, last_stb = -1, cyc = 0, nstb = 0;
  logic [7:0] held;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      din = 1'($urandom);
    end
    repeat (4) @(posedge clk);
    check(nstb == 100, $sformatf("strobes %0d", nstb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample on the same edges as the DUT.
  always @(posedge clk) if (rst_n) begin
    #1;
    cyc++;
    hist = {hist[6:0], din};
    sent++;
  end

  // Strobe check: at the edge after a strobe cycle starts, word must hold
  // the 8 bits sent up to the previous edge.
  always @(posedge clk) if (rst_n) begin
    if (wstb) begin
      nstb++;
      check(word == hist, $sformatf("word %h exp %h", word, hist));
      check(sent % 8 == 0, $sformatf("strobe after %0d bits", sent));
      if (last_stb >= 0) check(cyc - last_stb == 8, $sformatf("strobe gap %0d", cyc - last_stb));
      last_stb = cyc;
      held = word;
    end else if (last_stb >= 0) begin
      check(word == held, "word changed between strobes");
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
