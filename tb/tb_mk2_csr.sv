// Testbench for mk2_csr: set/clear pairs, write-0-is-no-change, status bits
// and their read positions, software reset.
module tb_mk2_csr;
  logic clk = 0, rst_n = 0, sw_rst = 0, wr = 0;
  logic [15:0] wdata = 0, rd;
  logic fifo_full = 0, shadow_full = 0, fifo_ovr = 0, shadow_ovr = 0;
  logic bit161 = 0, wait_state = 1;
  logic samp_en, wwait_en, rwait_en, mode32;
  int checks = 0, failures = 0;

  mk2_csr dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL %s: got %04h exp %04h", what, rd, exp);
    end
  endtask

  task automatic write(input logic [15:0] v);
    wr = 1; wdata = v; @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(16'h9000, "reset: 64-bit mode, 1 wait state");
    write(16'h0001);
    check(16'h9001, "sampling enabled");
    write(16'h0014);
    check(16'h9015, "both wait options on");
    write(16'h0000);
    check(16'h9015, "write of zero changes nothing");
    write(16'h4008);
    check(16'h5011, "32-bit mode on, write wait off");
    fifo_full = 1; shadow_full = 1; fifo_ovr = 1; shadow_ovr = 1; bit161 = 1;
    #1 check(16'h57D1, "status bits");
    write(16'h07FF);
    check(16'h57C0, "read-only bits not writable, disables");
    checks++;
    if (samp_en || wwait_en || rwait_en || !mode32) begin
      failures++; $display("FAIL control outputs");
    end
    write(16'h8000);
    sw_rst = 1; write(16'h4015); sw_rst = 0;
    check(16'h97C0, "software reset wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
