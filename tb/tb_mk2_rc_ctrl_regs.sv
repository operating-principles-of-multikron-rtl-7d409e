// Testbench for mk2_rc_ctrl_regs: reset values, zero-field-is-no-change on
// all three registers, enable/disable/clear-and-enable codes.
module tb_mk2_rc_ctrl_regs;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0;
  logic wr_enable = 0, wr_mode = 0, wr_clksel = 0;
  logic [63:0] wdata = 0, enable_rd;
  logic [15:0] enabled, clr;
  logic [15:0][3:0] mode, clksel;
  int checks = 0, failures = 0;
  logic [15:0] clr_seen;

  mk2_rc_ctrl_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) clr_seen |= clr;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    clr_seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clr_seen = 0;
    check(mode, 64'h4444_4444_4444_4444, "mode reset");
    check(clksel, 64'h4444_4444_4444_4444, "clksel reset");
    check(enable_rd, 64'h1111_1111_1111_1111, "enable reset (disabled)");
    wr_mode = 1; wdata = 64'h0000_0000_0000_0921; @(negedge clk); wr_mode = 0;
    check(mode, 64'h4444_4444_4444_4921, "mode zero fields unchanged");
    wr_clksel = 1; wdata = 64'h3000_0000_0000_0020; @(negedge clk); wr_clksel = 0;
    check(clksel, 64'h3444_4444_4444_4424, "clksel zero fields unchanged");
    wr_enable = 1; wdata = 64'h0000_0000_0000_3120; @(negedge clk); wr_enable = 0;
    check(enable_rd, 64'h1111_1111_1111_2121, "enable codes");
    check(enabled, 16'h000A, "enabled vector");
    @(negedge clk);
    check(clr_seen, 16'h0008, "clear pulse only for code 11");
    check(clr, 16'h0000, "clear is one cycle");
    sw_rst = 1; @(negedge clk); sw_rst = 0;
    check(mode, 64'h4444_4444_4444_4444, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
