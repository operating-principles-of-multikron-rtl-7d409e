// End-to-end testbench for the MultiKron II top level, at its default
// parameters. A processor model drives the bus pins (READB/WRITEB/STARTB,
// HOLDB, ACKB), a network model takes bytes off the collection port with a
// controllable NETRDY, and a scoreboard predicts every sample that must
// arrive: header (CPU ID, type, overrun flags), timestamp (between the
// values read before and after), source register, user data and, for
// Resource samples, the sixteen counter words. The test makes each
// mechanism of the chip happen and counts it: Trace and Resource samples,
// filtering, FIFO and shadow overruns (discard and wait), read-with-copy
// waits and erroneous reads, network stalls by read-without-copy, NETRDY
// back-pressure, every counting source, 64-bit pairs, saturation, HOLDB,
// wait states, 32-bit mode, test-mode commands and the software reset.
module tb_multikron2;
  import mk2_pkg::*;

  logic node_clk = 0, ts_clk = 0, resetb = 0, testb = 1, outdisb = 1, out_en;
  logic readb = 1, writeb = 1, startb = 0, holdb = 1, waitstate = 1;
  logic [6:0] addr = 0;
  logic [63:0] d_in = 0, d_out;
  logic d_oe, ackb;
  logic [7:0] cpu_id_lines = 8'h01;
  logic [15:0] x_pins = 0;
  logic netclk, odd_parity, eom, fifodab, netrdy = 1;
  logic [7:0] n_data;

  multikron2 dut (.*);

  always #5  node_clk = ~node_clk;   // Node clock, 10 time units
  always #20 ts_clk   = ~ts_clk;     // Timestamp clock at 1/4 Node clock

  int checks = 0, failures = 0;
  initial begin
    #3000000;
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
    if (got !== exp) fail($sformatf("%s: got %h exp %h", s, got, exp));
  endtask

  // ------------------------------------------------ mechanism counters
  typedef enum int {
    M_TRACE, M_RESOURCE, M_FILTERED, M_FIFO_OVR, M_SHD_OVR, M_FIFO_WAIT,
    M_SHD_WAIT, M_RCOPY_WAIT, M_RCOPY_BAD, M_NET_STALL, M_BACKPRESSURE,
    M_HOLD, M_WS1, M_MODE32, M_TEST_FIFO, M_ADVANCE, M_NET_DISABLE,
    M_SWRESET, M_SATURATE, M_PAIR64, M_SRC_CLK, M_SRC_SW, M_SRC_EXT,
    M_SRC_XEN, M_CLK_DIV10, M_CLK_DIV100, M_CLK_TS, M_NUM
  } mech_e;
  int mech[M_NUM];
  string mech_name[M_NUM] = '{"trace sample", "resource sample", "filtered trigger",
    "FIFO overrun", "shadow overrun", "wait for FIFO", "wait for shadow",
    "read-with-copy wait", "read-with-copy erroneous data", "network stall",
    "NETRDY back-pressure", "HOLDB", "one wait state", "32-bit mode",
    "direct FIFO write", "FIFO advance", "network disable", "software reset",
    "counter saturation", "64-bit pair", "clock source", "software source",
    "external edges", "clock gated by pin", "node clock /10", "node clock /100",
    "timestamp clock"};

  // ------------------------------------------------ processor model
  int last_lat;
  task automatic bus(input bit wr, input logic [6:0] a, input logic [63:0] d,
                     output logic [63:0] rd, input int hold = 0);
    int n;
    @(negedge node_clk);
    addr = a; d_in = d;
    if (wr) writeb = 0; else readb = 0;
    n = 0;
    @(posedge node_clk); #1;
    readb = 1; writeb = 1;
    if (hold > 0) holdb = 0;
    n = 1;
    while (ackb) begin
      @(posedge node_clk); #1; n++;
    end
    last_lat = n;
    rd = d_out;
    if (!wr && outdisb && !d_oe) fail("read data not driven");
    n = 0;
    while (!ackb) begin
      if (n == hold) holdb = 1;
      @(posedge node_clk); #1; n++;
    end
    if (hold > 0) begin
      mech[M_HOLD]++;
      chk(n, hold + 1, "ACKB held by HOLDB");
    end
  endtask
  logic [63:0] junk;
  task automatic wr(input logic [6:0] a, input logic [63:0] d);
    bus(1, a, d, junk);
  endtask
  task automatic rd(input logic [6:0] a, output logic [63:0] v);
    bus(0, a, 0, v);
  endtask

  // ------------------------------------------------ scoreboard
  typedef struct {
    bit          res;
    logic [2:0]  cpu;
    logic [1:0]  flags;     // {shadow, fifo}
    logic [55:0] ts_lo, ts_hi;
    logic [31:0] src;
    logic [63:0] user;
    logic [15:0][31:0] cnt;
  } exp_t;
  exp_t expq[$];
  logic [15:0][31:0] cur_cnt;   // counter values known to the testbench
  logic [7:0][31:0]  src_val;
  logic [1:0]        pend_flags = 0;
  int rx_samples = 0;

  function automatic logic [2:0] enc(input logic [7:0] l);
    for (int i = 0; i < 8; i++) if (l[i]) return 3'(i);
    return 0;
  endfunction

  logic [63:0] tsv;
  // a sample write that must be taken
  // high32: in 32-bit mode, the word loaded into the High Order register
  // right before the sample write
  task automatic sample(input bit res, input logic [3:0] lvl, input logic [63:0] user,
                        input bit use_high = 0);
    exp_t e;
    rd(A_TS, tsv);
    if (use_high) wr(A_HIGH32, {32'h0, user[63:32]});
    e.ts_lo = tsv[55:0];
    e.res = res; e.cpu = enc(cpu_id_lines); e.flags = pend_flags;
    e.src = src_val[e.cpu]; e.user = user; e.cnt = cur_cnt;
    wr(res ? 7'(112 + lvl) : 7'(96 + lvl), user);
    rd(A_TS, tsv);
    e.ts_hi = tsv[55:0];
    pend_flags = 0;
    expq.push_back(e);
  endtask

  // network receiver
  byte unsigned msg[$];
  always @(posedge netclk) begin
    if (!fifodab) begin
      if (odd_parity !== ~^n_data) fail("parity");
      msg.push_back(n_data);
      if (eom) begin
        check_msg();
        msg.delete();
      end
    end else if (!netrdy && dut.u_net.empty == 0) mech[M_BACKPRESSURE]++;
  end
  task automatic check_msg();
    exp_t e;
    logic [159:0] s;
    logic [7:0] h;
    checks++;
    if (expq.size() == 0) begin fail("unexpected sample"); return; end
    e = expq.pop_front();
    if (msg.size() != (e.res ? 84 : 20)) begin
      fail($sformatf("sample length %0d", msg.size())); return;
    end
    for (int i = 0; i < 20; i++) s[159 - 8*i -: 8] = msg[i];
    h = {e.cpu, e.res ? 2'b10 : 2'b11, e.flags, 1'b0};
    if (s[159:152] !== h) fail($sformatf("header %h exp %h", s[159:152], h));
    if (s[151:96] < e.ts_lo || s[151:96] > e.ts_hi) fail("timestamp out of range");
    if (s[95:64] !== e.src) fail($sformatf("source %h exp %h", s[95:64], e.src));
    if (s[63:0] !== e.user) fail($sformatf("user %h exp %h", s[63:0], e.user));
    if (e.res) for (int c = 0; c < 16; c++)
      if ({msg[20+4*c], msg[21+4*c], msg[22+4*c], msg[23+4*c]} !== e.cnt[c])
        fail($sformatf("counter %0d in sample", c));
    if (e.res) mech[M_RESOURCE]++; else mech[M_TRACE]++;
    rx_samples++;
  endtask

  always @(posedge node_clk) if (dut.u_net.stall) mech[M_NET_STALL]++;

  task automatic drain();
    int guard = 0;
    netrdy = 1;
    while ((expq.size() != 0 || !dut.u_net.empty) && guard < 20000) begin
      @(posedge node_clk); guard++;
    end
    chk(expq.size(), 0, "all expected samples received");
  endtask

  // read all counters at one instant into cur_cnt
  task automatic snapshot();
    logic [63:0] v;
    rd(7'd64, v); cur_cnt[0] = v[31:0];
    for (int c = 1; c < 16; c++) begin rd(7'(80 + c), v); cur_cnt[c] = v[31:0]; end
  endtask

  logic [63:0] v, v2;
  int t0, t1, cyc;
  initial begin
    cur_cnt = '0;
    // ---------- hardware reset with one wait state
    repeat (6) @(posedge node_clk);
    resetb = 1;
    rd(A_CSR, v);
    chk(v[15:0], 16'h9000, "CSR after reset (1 wait state)");
    chk(last_lat, 3, "latency with one wait state");
    mech[M_WS1]++;
    waitstate = 0; resetb = 0;
    repeat (6) @(posedge node_clk);
    resetb = 1;
    rd(A_CSR, v);
    chk(v[15:0], 16'h8000, "CSR after reset (0 wait states)");
    chk(last_lat, 2, "latency with no wait states");
    rd(A_TS, v);
    checks++; if (v[55:0] == 0 || v[63:56] != 8'hFF) fail("timestamp running");

    // ---------- set up: source registers, sampling, filter
    for (int i = 0; i < 8; i++) begin
      src_val[i] = 32'h0003_0000 + 32'(i * 17);
      wr(7'(32 + i), {32'hDEAD_BEEF, src_val[i]});
    end
    rd(7'd37, v); chk(v, {32'hFFFF_FFFF, src_val[5]}, "source register read");
    wr(A_CSR, 64'h1);
    wr(A_FILTER, 64'h00FF);
    // ---------- trace samples from several processors
    for (int i = 0; i < 4; i++) begin
      cpu_id_lines = 8'(1 << (2 * i + 1));
      sample(0, 4'(i), 64'hC0DE_0000_0000_0000 | 64'(i));
    end
    // filtered trigger: level 9 is off
    wr(7'd105, 64'h1234);
    mech[M_FILTERED]++;
    drain();
    chk(rx_samples, 4, "four trace samples received, filtered one dropped");

    // ---------- resource counters: every source
    // per counter (field i): c0 x edge, c1 clock, c2 sw, c3 clock gated by pin,
    // c4/c5 64-bit pair on clock, c6 clock, c7 clock, c8 clock
    wr(A_MODE,   64'h0000_0001_1109_3214);
    wr(A_CLKSEL, 64'h0000_0003_2401_1010);
    // c1 node clk, c3 node clk, c4 node clk, c6 TS, c7 /10, c8 /100
    wr(A_ENABLE, 64'h0000_0003_3303_3333);  // clear & enable c0..c8
    t0 = $time;
    fork
      for (int k = 0; k < 25; k++) begin
        @(negedge node_clk) x_pins[0] = 1; x_pins[3] = 1;
        repeat (3) @(negedge node_clk);
        x_pins[0] = 0;
        repeat (2) @(negedge node_clk);
        x_pins[3] = 0;
        repeat (2) @(negedge node_clk);
      end
      for (int k = 0; k < 13; k++) wr(7'd82, 0);   // software increments of c2
    join
    repeat (1500) @(posedge node_clk);
    wr(A_ENABLE, 64'h1111_1111_1111_1111);        // stop all
    t1 = $time;
    cyc = (t1 - t0) / 10;
    snapshot();
    chk(cur_cnt[0], 25, "external edges counted");                mech[M_SRC_EXT]++;
    chk(cur_cnt[2], 13, "software increments counted");           mech[M_SRC_SW]++;
    checks++; if (cur_cnt[3] < 125 || cur_cnt[3] > 128) fail($sformatf("gated clock count %0d", cur_cnt[3]));
    mech[M_SRC_XEN]++;
    checks++; if (cur_cnt[1] > cyc || cur_cnt[1] < cyc - 6) fail($sformatf("clock count %0d of %0d", cur_cnt[1], cyc));
    mech[M_SRC_CLK]++;
    chk({cur_cnt[5], cur_cnt[4]} - 64'(cur_cnt[1]), 0, "64-bit pair counts like a clock counter");
    checks++; if (cur_cnt[6] < cyc / 4 - 2 || cur_cnt[6] > cyc / 4 + 1) fail($sformatf("TS count %0d", cur_cnt[6]));
    mech[M_CLK_TS]++;
    checks++; if (cur_cnt[7] < cyc / 10 - 1 || cur_cnt[7] > cyc / 10 + 1) fail($sformatf("div10 count %0d", cur_cnt[7]));
    mech[M_CLK_DIV10]++;
    checks++; if (cur_cnt[8] < cyc / 100 - 1 || cur_cnt[8] > cyc / 100 + 1) fail($sformatf("div100 count %0d", cur_cnt[8]));
    mech[M_CLK_DIV100]++;
    // 64-bit carry and saturation
    wr(7'd68, 64'hFFFF_FFFE);  wr(7'd69, 64'h0000_0000);
    wr(A_MODE, 64'h0000_0000_000A_0000);             // c4: pair, software source
    wr(A_ENABLE, 64'h0000_0000_0002_0000);
    wr(7'd84, 0); wr(7'd84, 0); wr(7'd84, 0);
    rd(7'd68, v); rd(7'd85, v2);
    chk({v2[31:0], v[31:0]}, 64'h0000_0001_0000_0001, "64-bit carry");
    mech[M_PAIR64]++;
    wr(7'd66, 64'hFFFF_FFFF);
    wr(A_ENABLE, 64'h0000_0000_0000_0200);
    wr(7'd82, 0);
    rd(7'd66, v);
    chk(v[31:0], 32'hFFFF_FFFF, "32-bit counter saturates");
    mech[M_SATURATE]++;
    wr(A_ENABLE, 64'h1111_1111_1111_1111);
    snapshot();

    // ---------- Resource sample
    cpu_id_lines = 8'h40;
    sample(1, 4'd2, 64'hFEED_0000_0000_0001);
    drain();

    // ---------- overruns without waiting
    netrdy = 0;
    sample(1, 4'd0, 64'h2);                     // holds the shadow registers
    wr(7'd113, 64'h3);                          // shadow busy: discarded
    pend_flags[1] = 1; mech[M_SHD_OVR]++;
    // read-without-copy while busy stalls the network
    rd(7'd81, v); chk(v[31:0], cur_cnt[1], "read without copy while busy");
    // read-with-copy while busy and no read wait: shadow data, no copy
    wr(7'd65, 64'h777);                         // change counter 1
    rd(7'd65, v); chk(v[31:0], cur_cnt[1], "erroneous read-with-copy returns shadow");
    mech[M_RCOPY_BAD]++;
    // fill the FIFO: one resource entry is in it, DEPTH-1 more fit
    for (int i = 0; i < 7; i++) sample(0, 4'd1, 64'(100 + i));
    rd(A_CSR, v); chk(v[6], 1, "FIFO full flag");
    wr(7'd97, 64'h999);                         // FIFO full: discarded
    pend_flags[0] = 1; mech[M_FIFO_OVR]++;
    rd(A_OVRCNT, v); chk(v[31:0], 2, "overrun counter");
    rd(A_CSR, v); chk(v[9:8], 2'b01, "overrun status bit (shadow flag went out)");
    drain();
    cur_cnt[1] = 32'h777;
    sample(0, 4'd1, 64'h5);                     // carries both flags
    drain();

    // ---------- waiting for the FIFO and for the shadow registers
    wr(A_CSR, 64'h14);                          // wait on sample, wait on read
    netrdy = 0;
    snapshot();
    sample(1, 4'd0, 64'h10);
    for (int i = 0; i < 7; i++) sample(0, 4'd1, 64'(200 + i));
    fork
      sample(0, 4'd2, 64'h20);                  // waits for the FIFO
      begin repeat (100) @(posedge node_clk); netrdy = 1; end
    join
    mech[M_FIFO_WAIT]++;
    rd(A_WAITCNT, v);
    checks++; if (v[31:0] < 90) fail($sformatf("wait counter %0d", v[31:0]));
    rd(A_OVRCNT, v); chk(v[31:0], 2, "no overrun while waiting");
    drain();
    netrdy = 0;
    sample(1, 4'd0, 64'h30);
    fork
      sample(1, 4'd1, 64'h31);                  // waits for the shadow registers
      begin repeat (60) @(posedge node_clk); netrdy = 1; end
    join
    mech[M_SHD_WAIT]++;
    netrdy = 0;
    wr(A_WAITCNT, 0);
    fork
      begin
        rd(7'd70, v);                           // waits, then copies
        chk(v[31:0], cur_cnt[6], "read-with-copy after wait");
      end
      begin repeat (60) @(posedge node_clk); netrdy = 1; end
    join
    mech[M_RCOPY_WAIT]++;
    rd(A_WAITCNT, v);
    checks++; if (v[31:0] < 20) fail($sformatf("read wait counted %0d", v[31:0]));
    drain();

    // ---------- 32-bit mode and HOLDB
    wr(A_CSR, 64'h4000);
    wr(A_HIGH32, 64'h0000_0000_ABCD_0123);
    bus(1, 7'd67, 64'hFFFF_FFFF_0000_0042, v);  // upper pins ignored
    cur_cnt[3] = 32'h42;
    wr(A_FILTER, 64'hFFFF);
    rd(7'd67, v); chk(v[31:0], 32'h42, "32-bit mode register write");
    sample(0, 4'd15, 64'hABCD_0123_5555_6666, 1); // upper half from the register
    mech[M_MODE32]++;
    bus(0, A_TS, 0, v, 3);                      // read held 3 extra cycles
    rd(A_HIGH32, v2);
    chk(v2[31:0], v[63:32], "upper read half left in the high register");
    wr(A_CSR, 64'h8000);
    drain();

    // ---------- test mode
    testb = 0;
    wr(A_NET_DIS, 0); mech[M_NET_DISABLE]++;
    wr(A_TS, 64'h00AB_CDEF_0000_0000);
    rd(A_TS, v); chk(v[55:0], 56'hAB_CDEF_0000_0000, "timestamp written in test mode");
    wr(7'd26, 64'h2468_ACE0);
    mech[M_TEST_FIFO]++;
    rd(7'd25, v); chk(v[31:0], 32'h2468_ACE0, "FIFO group A");
    rd(7'd29, v); chk(v[31:0], 32'h2468_ACE0, "FIFO group E");
    t0 = rx_samples;
    repeat (100) @(posedge node_clk);
    chk({msg.size(), rx_samples}, {32'd0, 32'(t0)}, "nothing sent while network disabled");
    chk(dut.u_fifo.empty, 0, "entry waits in the FIFO");
    wr(A_ADVANCE, 0); mech[M_ADVANCE]++;
    chk(dut.u_fifo.empty, 1, "advance removed the entry");
    wr(A_NET_EN, 0);
    testb = 1;

    // ---------- software reset
    rd(A_TS, v);
    wr(A_SWRESET, 0); mech[M_SWRESET]++;
    rd(A_CSR, v2); chk(v2[15:0], 16'h8000, "CSR after software reset");
    rd(A_TS, v2);
    checks++; if (v2[55:0] <= v[55:0]) fail("software reset changed the timestamp");
    rd(A_FILTER, v2); chk(v2[15:0], 0, "filter after software reset");

    // ---------- outputs disabled
    outdisb = 0;
    bus(0, A_CSR, 0, v);
    chk({out_en, d_oe}, 0, "OUTDISB removes the output enables");
    outdisb = 1;

    // ---------- every mechanism happened
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism never exercised: %s", mech_name[m]));
      else $display("mechanism %-30s %0d", mech_name[m], mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
