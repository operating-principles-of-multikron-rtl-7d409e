// Testbench for mk2_timestamp: counts ts_tick pulses, stops in test mode,
// loads and increments only in test mode, wraps at 2^56.
module tb_mk2_timestamp;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ts_tick = 0, test_mode = 0, load = 0, inc = 0;
  logic [TS_W-1:0] load_val = '0, ts;
  int checks = 0, failures = 0;

  mk2_timestamp dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [TS_W-1:0] exp, input string what);
    checks++;
    if (ts !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, ts, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(0, "reset");
    // 7 ticks spread out, one every third cycle
    for (int i = 0; i < 7; i++) begin
      ts_tick = 1; @(negedge clk); ts_tick = 0; repeat (2) @(negedge clk);
    end
    check(7, "seven ticks");
    load = 1; load_val = 56'h12_3456_789A_BCDE; @(negedge clk); load = 0;
    check(7, "load ignored outside test mode");
    test_mode = 1;
    ts_tick = 1; @(negedge clk); ts_tick = 0;
    check(7, "ticks ignored in test mode");
    load = 1; @(negedge clk); load = 0;
    check(56'h12_3456_789A_BCDE, "test load");
    inc = 1; @(negedge clk); inc = 0;
    check(56'h12_3456_789A_BCDF, "test increment");
    load = 1; load_val = '1; @(negedge clk); load = 0;
    test_mode = 0;
    ts_tick = 1; @(negedge clk); ts_tick = 0;
    check(0, "wrap at 2^56");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
