// Testbench for mk2_shadow_regs: copy captures all counters at one instant,
// a Resource-sample copy marks busy, a busy rank refuses copies, free
// releases it.
module tb_mk2_shadow_regs;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0;
  logic copy = 0, mark_busy = 0, free = 0, busy;
  logic [15:0][31:0] cnt, shadow;
  int checks = 0, failures = 0;

  mk2_shadow_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) for (int i = 0; i < 16; i++) cnt[i] <= cnt[i] + i + 1;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [511:0] got, input logic [511:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [15:0][31:0] snap;
  initial begin
    for (int i = 0; i < 16; i++) cnt[i] = 1000 * i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(busy, 0, "idle after reset");
    copy = 1; snap = cnt; @(negedge clk); copy = 0;
    check(shadow, snap, "read copy captures counters");
    check(busy, 0, "read copy does not mark busy");
    copy = 1; mark_busy = 1; snap = cnt; @(negedge clk); copy = 0; mark_busy = 0;
    check(shadow, snap, "sample copy captures counters");
    check(busy, 1, "sample copy marks busy");
    copy = 1; @(negedge clk); copy = 0;
    check(shadow, snap, "busy rank refuses a copy");
    free = 1; @(negedge clk); free = 0;
    check(busy, 0, "free releases");
    copy = 1; snap = cnt; @(negedge clk); copy = 0;
    check(shadow, snap, "copy after free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
