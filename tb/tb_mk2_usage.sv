// Usage scenarios for the MultiKron II top level at default parameters:
//  1. software stop-watch: a clock-counting counter enabled at a start
//     event and disabled at an end event counts exactly the Node clocks
//     between the two Enable writes (less the one cycle spent clearing);
//  2. hardware stop-watch: a counter counting the Node clock only while its
//     external pin is high measures how long the pin was high;
//  3. virtual counters: two processes share counters 0..3; at each context
//     switch the outgoing process's counters are saved (one read-with-copy,
//     then reads-without-copy) and the incoming process's values written
//     back; each process ends with exactly its own event totals;
//  4. sustained tracing from eight processors, as fast as the bus allows,
//     with "wait on overrun": nothing is lost, samples arrive in order, and
//     once the FIFO is full the chip accepts one sample per 20 network
//     clocks (40 Node clocks), the network's rate;
//  5. the same burst with discarding: every lost sample is counted, and the
//     first sample after a loss carries the FIFO-overrun flag.
module tb_mk2_usage;
  import mk2_pkg::*;

  logic node_clk = 0, ts_clk = 0, resetb = 0, testb = 1, outdisb = 1, out_en;
  logic readb = 1, writeb = 1, startb = 0, holdb = 1, waitstate = 0;
  logic [6:0] addr = 0;
  logic [63:0] d_in = 0, d_out;
  logic d_oe, ackb;
  logic [7:0] cpu_id_lines = 8'h01;
  logic [15:0] x_pins = 0;
  logic netclk, odd_parity, eom, fifodab, netrdy = 1;
  logic [7:0] n_data;

  multikron2 dut (.*);

  always #5  node_clk = ~node_clk;
  always #15 ts_clk   = ~ts_clk;

  int checks = 0, failures = 0;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask
  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string s);
    checks++;
    if (got !== exp) fail($sformatf("%s: got %0d (%h) exp %0d (%h)", s, got, got, exp, exp));
  endtask

  time ack_time;
  task automatic bus(input bit w, input logic [6:0] a, input logic [63:0] d,
                     output logic [63:0] r);
    @(negedge node_clk);
    addr = a; d_in = d;
    if (w) writeb = 0; else readb = 0;
    @(posedge node_clk); #1;
    readb = 1; writeb = 1;
    while (ackb) begin @(posedge node_clk); #1; end
    ack_time = $time;
    r = d_out;
    while (!ackb) begin @(posedge node_clk); #1; end
  endtask
  logic [63:0] junk;
  task automatic wr(input logic [6:0] a, input logic [63:0] d); bus(1, a, d, junk); endtask
  task automatic rd(input logic [6:0] a, output logic [63:0] v); bus(0, a, 0, v); endtask

  // receiver: user data and header of every sample
  logic [63:0] rx_user[$];
  logic [7:0]  rx_head[$];
  byte unsigned msg[$];
  always @(posedge netclk) if (!fifodab) begin
    msg.push_back(n_data);
    if (eom) begin
      rx_head.push_back(msg[0]);
      rx_user.push_back({msg[12], msg[13], msg[14], msg[15], msg[16], msg[17], msg[18], msg[19]});
      msg.delete();
    end
  end

  logic [63:0] v;
  time t_start, t_end;
  logic [3:0][31:0] save_a, save_b;
  int tot_a[4], tot_b[4];
  int n_acc;
  time t_acc[$];

  initial begin
    repeat (6) @(posedge node_clk);
    resetb = 1;

    // ---------------- 1. software stop-watch
    wr(A_MODE,   64'h1);            // counter 0: internal clock
    wr(A_CLKSEL, 64'h1);            // ... the Node clock
    wr(A_ENABLE, 64'h3);            // clear and start
    t_start = ack_time;
    repeat (337) @(posedge node_clk);
    wr(A_ENABLE, 64'h1);            // stop
    t_end = ack_time;
    // the clear of "clear and enable" lands on the first enabled cycle, so
    // that cycle is not counted
    rd(7'd64, v);
    chk(v[31:0], (t_end - t_start) / 10 - 1, "software stop-watch");
    repeat (50) @(posedge node_clk);
    rd(7'd64, v);
    chk(v[31:0], (t_end - t_start) / 10 - 1, "stopped counter holds its value");

    // ---------------- 2. hardware stop-watch
    wr(A_MODE,   64'h30);           // counter 1: Node clock while X1 high
    wr(A_CLKSEL, 64'h10);
    wr(A_ENABLE, 64'h30);
    repeat (10) @(negedge node_clk);
    x_pins[1] = 1; repeat (123) @(negedge node_clk); x_pins[1] = 0;
    repeat (20) @(negedge node_clk);
    x_pins[1] = 1; repeat (77) @(negedge node_clk); x_pins[1] = 0;
    repeat (10) @(negedge node_clk);
    rd(7'd65, v);
    chk(v[31:0], 200, "hardware stop-watch: cycles with the pin high");
    wr(A_ENABLE, 64'h1111_1111_1111_1111);

    // ---------------- 3. virtual counters across context switches
    wr(A_MODE,   64'h2222);         // counters 0..3: software events
    wr(A_ENABLE, 64'h3333);
    save_a = '0; save_b = '0;
    foreach (tot_a[i]) begin tot_a[i] = 0; tot_b[i] = 0; end
    for (int slice = 0; slice < 6; slice++) begin
      bit is_a;
      is_a = (slice % 2 == 0);
      // restore the incoming process's counters
      for (int c = 0; c < 4; c++) wr(7'(64 + c), is_a ? save_a[c] : save_b[c]);
      // the process runs and counts its events
      for (int k = 0; k < 12; k++) begin
        int c;
        c = $urandom_range(0, 3);
        wr(7'(80 + c), 0);
        if (is_a) tot_a[c]++; else tot_b[c]++;
      end
      // save: one read-with-copy, then reads without copy
      rd(7'd64, v);
      if (is_a) save_a[0] = v[31:0]; else save_b[0] = v[31:0];
      for (int c = 1; c < 4; c++) begin
        rd(7'(80 + c), v);
        if (is_a) save_a[c] = v[31:0]; else save_b[c] = v[31:0];
      end
    end
    for (int c = 0; c < 4; c++) begin
      chk(save_a[c], tot_a[c], $sformatf("process A counter %0d", c));
      chk(save_b[c], tot_b[c], $sformatf("process B counter %0d", c));
    end
    wr(A_ENABLE, 64'h1111);

    // ---------------- 4. sustained tracing, waiting on overrun
    for (int i = 0; i < 8; i++) wr(7'(32 + i), 64'(i));
    wr(A_FILTER, 64'hFFFF);
    wr(A_CSR, 64'h5);               // sampling on, wait on overrun
    rx_user.delete(); rx_head.delete();
    for (int n = 0; n < 48; n++) begin
      cpu_id_lines = 8'(1 << (n % 8));
      wr(7'(96 + n % 16), 64'h5A00_0000_0000_0000 | 64'(n));
      t_acc.push_back(ack_time);
    end
    wait (rx_user.size() == 48);
    for (int n = 0; n < 48; n++) begin
      checks++;
      if (rx_user[n] !== (64'h5A00_0000_0000_0000 | 64'(n))) fail($sformatf("sample %0d out of order", n));
      if (rx_head[n][7:5] != 3'(n % 8)) fail($sformatf("sample %0d CPU ID", n));
    end
    rd(A_OVRCNT, v); chk(v[31:0], 0, "no sample lost while waiting");
    rd(A_WAITCNT, v);
    checks++; if (v[31:0] == 0) fail("the processor never waited");
    // steady state: the last 16 samples were accepted 40 Node clocks apart
    checks++;
    if ((t_acc[47] - t_acc[31]) / 10 != 16 * 2 * TRACE_BYTES)
      fail($sformatf("steady rate: %0d Node clocks for 16 samples", (t_acc[47] - t_acc[31]) / 10));

    // ---------------- 5. the same burst, discarding
    wr(A_CSR, 64'h8);               // discard on overrun
    wr(A_WAITCNT, 0);
    rx_user.delete(); rx_head.delete();
    for (int n = 0; n < 48; n++) wr(7'(96), 64'(1000 + n));
    repeat (3000) @(posedge node_clk);
    rd(A_OVRCNT, v);
    chk(v[31:0] + rx_user.size(), 48, "every sample either delivered or counted lost");
    checks++; if (v[31:0] == 0) fail("no overrun in a burst faster than the network");
    begin
      int flagged = 0;
      for (int n = 1; n < rx_user.size(); n++)
        if (rx_user[n] != rx_user[n-1] + 1) begin
          if (!rx_head[n][1]) fail($sformatf("gap before sample %0d without FIFO-overrun flag", n));
          flagged++;
        end
      checks++; if (flagged == 0) fail("no gap seen");
    end
    rd(A_WAITCNT, v); chk(v[31:0], 0, "no waits while discarding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
