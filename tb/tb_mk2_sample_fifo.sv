// Testbench for mk2_sample_fifo: fill to full (DEPTH entries), refused push
// when full, order kept, simultaneous push and pop, empty flag.
module tb_mk2_sample_fifo;
  import mk2_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, sw_rst = 0, push = 0, pop = 0, empty, full;
  fifo_entry_t din, head;
  int checks = 0, failures = 0;

  mk2_sample_fifo #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [160:0] got, input logic [160:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic fifo_entry_t mk(input int n);
    return fifo_entry_t'({1'(n), {5{32'(n * 32'h0101_0101)}}});
  endfunction

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty, 1, "empty after reset");
    for (int i = 0; i < D; i++) begin
      push = 1; din = mk(i + 1); @(negedge clk);
    end
    push = 0;
    check(full, 1, "full after DEPTH pushes");
    push = 1; din = mk(99); @(negedge clk); push = 0;
    check(head, mk(1), "head is oldest");
    pop = 1; push = 1; din = mk(D + 1); @(negedge clk); pop = 0; push = 0;
    check(full, 1, "push+pop keeps count");
    for (int i = 2; i <= D + 1; i++) begin
      check(head, mk(i), "order");
      pop = 1; @(negedge clk); pop = 0;
    end
    check(empty, 1, "empty after draining; refused push was dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
