// Testbench for mk2_proc_if. A model of the core acknowledges after a
// chosen number of extra cycles and returns data derived from the address.
// Checked: the acknowledge latency for 0 and 1 wait states (pin sampled at
// reset) and for core-inserted waits, ACKB one cycle long, ACKB and data
// held by HOLDB, STARTB gating, write data and address passed to the core,
// the High Order 32 bit register in 32-bit mode on writes and reads.
module tb_mk2_proc_if;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0;
  logic readb = 1, writeb = 1, startb = 0, holdb = 1, ws_pin = 0;
  logic [6:0] addr = 0;
  logic [63:0] d_in = 0, d_out, core_wdata, core_rdata;
  logic d_oe, ackb, mode32 = 0, wait_state;
  logic core_req, core_we, core_done;
  logic [6:0] core_addr;
  int checks = 0, failures = 0;
  int core_delay = 0, req_cycles = 0;
  logic [63:0] last_wdata;
  logic [6:0]  last_addr;
  logic        last_we;

  mk2_proc_if dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core model
  assign core_done  = core_req && (req_cycles >= core_delay);
  assign core_rdata = {25'h0ABCDEF, core_addr, 25'h1234567, core_addr};
  always @(posedge clk) begin
    if (core_req) req_cycles <= req_cycles + 1; else req_cycles <= 0;
    if (core_req && core_done) begin
      last_wdata <= core_wdata; last_addr <= core_addr; last_we <= core_we;
    end
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // one access; returns cycles from request to ACKB low and ACK length
  task automatic access(input bit wr, input logic [6:0] a, input logic [63:0] d,
                        input int hold, output int lat, output int acklen,
                        output logic [63:0] rd);
    @(negedge clk);
    addr = a; d_in = d;
    if (wr) writeb = 0; else readb = 0;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
      readb = 1; writeb = 1;            // released before the acknowledge
      if (hold > 0) holdb = 0;
    end while (ackb && lat < 50);
    rd = d_out;
    acklen = 0;
    while (!ackb) begin
      if (!wr && !d_oe) fail("read data not driven during ACKB");
      if (!wr && d_out !== rd) fail("read data changed during ACKB");
      if (acklen == hold) holdb = 1;
      @(posedge clk); #1; acklen++;
    end
    if (d_oe) fail("data driven after ACKB");
  endtask

  int lat, al;
  logic [63:0] rd;
  initial begin
    // ---- reset with WAITSTATE = 0
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++; if (wait_state !== 0) fail("wait state pin");
    access(1, 7'd40, 64'h1111_2222_3333_4444, 0, lat, al, rd);
    checks++; if (lat != 2) fail($sformatf("0 WS write latency %0d", lat));
    checks++; if (al != 1) fail($sformatf("ACK length %0d", al));
    checks++; if (last_addr != 40 || !last_we || last_wdata != 64'h1111_2222_3333_4444) fail("write passed to core");
    access(0, 7'd9, 0, 0, lat, al, rd);
    checks++; if (rd !== {25'h0ABCDEF, 7'd9, 25'h1234567, 7'd9}) fail("read data");
    checks++; if (last_we) fail("read seen as write");
    // HOLDB stretches the acknowledge
    access(0, 7'd3, 0, 4, lat, al, rd);
    checks++; if (al != 5) fail($sformatf("held ACK length %0d", al));
    // core-inserted waits
    core_delay = 3;
    access(0, 7'd5, 0, 0, lat, al, rd);
    checks++; if (lat != 5) fail($sformatf("latency with 3 core waits %0d", lat));
    core_delay = 0;
    // STARTB high blocks the interaction
    startb = 1;
    @(negedge clk); readb = 0;
    repeat (5) @(posedge clk);
    checks++; if (!ackb || core_req) fail("STARTB did not inhibit");
    @(negedge clk); startb = 0;
    @(posedge clk); #1 readb = 1;
    while (ackb) @(posedge clk);
    @(posedge clk);
    // 32-bit mode: write high word first, then the low word
    mode32 = 1;
    access(1, 7'd7, 64'hFFFF_FFFF_CAFE_F00D, 0, lat, al, rd);
    checks++; if (core_req) fail("address 7 reached the core");
    access(1, 7'd33, 64'h0000_0000_1234_5678, 0, lat, al, rd);
    checks++; if (last_wdata !== 64'hCAFE_F00D_1234_5678) fail($sformatf("32-bit mode write %h", last_wdata));
    // a read leaves its upper half in the register
    access(0, 7'd11, 0, 0, lat, al, rd);
    access(0, 7'd7, 0, 0, lat, al, rd);
    checks++; if (rd[31:0] !== {25'h0ABCDEF, 7'd11}) fail($sformatf("high word after read %h", rd));
    // ---- reset with WAITSTATE = 1
    mode32 = 0;
    ws_pin = 1; rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; ws_pin = 0;
    @(posedge clk);
    checks++; if (wait_state !== 1) fail("wait state pin 1");
    access(1, 7'd41, 64'h5, 0, lat, al, rd);
    checks++; if (lat != 3) fail($sformatf("1 WS latency %0d", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
