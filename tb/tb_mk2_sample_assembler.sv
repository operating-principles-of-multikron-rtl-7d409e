// Testbench for mk2_sample_assembler: field layout and header of Trace and
// Resource samples, overrun flags set by discards and cleared by the next
// sample taken.
module tb_mk2_sample_assembler;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0;
  logic take = 0, resource = 0, lost_fifo = 0, lost_shadow = 0;
  logic [2:0] cpu_id = 3'd5;
  logic [55:0] ts = 56'hA1_B2C3_D4E5_F607;
  logic [31:0] src = 32'h0007_0042;
  logic [63:0] user = 64'h0123_4567_89AB_CDEF;
  fifo_entry_t entry;
  logic fifo_ovr, shadow_ovr;
  int checks = 0, failures = 0;

  mk2_sample_assembler dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // header 101 11 0 0 0 = 0xB8
    check(entry, {1'b0, 8'hB8, ts, src, user}, "trace sample");
    resource = 1; #1;
    // header 101 10 0 0 0 = 0xB0
    check(entry, {1'b1, 8'hB0, ts, src, user}, "resource sample");
    lost_fifo = 1; @(negedge clk); lost_fifo = 0;
    check(entry[159:152], 8'hB2, "FIFO overrun flag in header");
    lost_shadow = 1; @(negedge clk); lost_shadow = 0;
    check(entry[159:152], 8'hB6, "both overrun flags");
    check({fifo_ovr, shadow_ovr}, 2'b11, "flag outputs");
    take = 1; @(negedge clk); take = 0;
    check(entry[159:152], 8'hB0, "flags cleared by taken sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
