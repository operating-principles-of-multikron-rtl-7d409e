// Testbench for mk2_error_counter: counting, clear, test-mode load and
// increment, software reset, and wrap-around from 2^32-1 to 0.
module tb_mk2_error_counter;
  logic clk = 0, rst_n = 0;
  logic sw_rst = 0, count = 0, clear = 0, load = 0, test_inc = 0;
  logic [31:0] load_val = 0, value;
  int checks = 0, failures = 0;

  mk2_error_counter dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (value !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, value, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(0, "reset");
    count = 1; repeat (5) @(negedge clk); count = 0;
    check(5, "five counts");
    test_inc = 1; @(negedge clk); test_inc = 0;
    check(6, "test increment");
    clear = 1; count = 1; @(negedge clk); clear = 0; count = 0;
    check(0, "clear wins over count");
    load = 1; load_val = 32'hFFFF_FFFE; @(negedge clk); load = 0;
    check(32'hFFFF_FFFE, "load");
    count = 1; repeat (3) @(negedge clk); count = 0;
    check(1, "wrap around");
    sw_rst = 1; @(negedge clk); sw_rst = 0;
    check(0, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
