// Testbench for mk2_source_regs: write all eight registers, then for each
// one-hot CPU ID pattern check the encoded ID and the selected register.
module tb_mk2_source_regs;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0, wr = 0;
  logic [2:0] widx = 0, cpu_id;
  logic [31:0] wdata = 0, sel_src;
  logic [7:0] cpu_lines = 0;
  logic [7:0][31:0] regs;
  int checks = 0, failures = 0;

  mk2_source_regs dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); wr = 1; widx = r[2:0]; wdata = 32'h0500_0000 + r * 32'h111;
    end
    @(negedge clk); wr = 0;
    for (int c = 0; c < 8; c++) begin
      cpu_lines = 8'(1 << c);
      #1;
      check(32'(cpu_id), c, "cpu id encoding");
      check(sel_src, 32'h0500_0000 + c * 32'h111, "selected source register");
    end
    cpu_lines = 8'b0010_0100; #1;
    check(32'(cpu_id), 2, "lowest active line wins");
    @(negedge clk); sw_rst = 1; @(negedge clk); sw_rst = 0;
    check(regs[2], 0, "software reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
