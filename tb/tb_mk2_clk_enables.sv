// Testbench for mk2_clk_enables: over 1000 Node clocks the /10 and /100
// pulses occur 100 and 10 times, 10 and 100 cycles apart; a Timestamp clock
// at one fifth of the Node clock gives one ts_tick per period.
module tb_mk2_clk_enables;
  logic clk = 0, rst_n = 0, ts_clk = 0;
  logic ts_tick, div10_tick, div100_tick;
  int checks = 0, failures = 0;
  int n10 = 0, n100 = 0, nts = 0, last10 = -1, last100 = -1, cyc = 0;
  int bad_gap = 0;

  mk2_clk_enables dut (.*);

  always #5 clk = ~clk;          // 10 ns Node clock
  always #25 ts_clk = ~ts_clk;   // 50 ns Timestamp clock

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (div10_tick) begin
      if (last10 >= 0 && cyc - last10 != 10) bad_gap++;
      last10 = cyc; n10++;
    end
    if (div100_tick) begin
      if (last100 >= 0 && cyc - last100 != 100) bad_gap++;
      last100 = cyc; n100++;
    end
    if (ts_tick) nts++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (1000) @(posedge clk);
    #1;
    check(n10, 100, "div10 pulses");
    check(n100, 10, "div100 pulses");
    check(bad_gap, 0, "pulse spacing");
    checks++;
    if (nts < 199 || nts > 201) begin
      failures++;
      $display("FAIL ts ticks %0d", nts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
