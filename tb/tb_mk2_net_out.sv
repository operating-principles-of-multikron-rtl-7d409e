// Testbench for mk2_net_out. A queue stands in for the sample FIFO; a
// receiver takes a byte on each rising NETCLK edge with FIFODAB low. The
// received stream is checked byte for byte against the queued Trace and
// Resource samples (header first, counters after), with odd parity and
// EOM on each sample's last byte. Checked rates: with NETRDY held high a
// Resource sample takes 84 consecutive network clocks (168 Node clocks)
// and NETCLK is Node clock / 2. NETRDY low must hold bytes back; a stall
// must hold the output for one network clock.
module tb_mk2_net_out;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0;
  logic net_en = 1, netrdy = 1, stall = 0, restart = 0;
  fifo_entry_t head;
  logic empty, pop, free_shadow, netclk, parity, eom, fifodab;
  logic [7:0] n_data;
  logic [15:0][31:0] shadow;
  int checks = 0, failures = 0;

  mk2_net_out dut (.*);

  fifo_entry_t q[$];
  byte unsigned exp_bytes[$];
  bit          exp_eom[$];
  int frees = 0;

  assign empty = (q.size() == 0);
  assign head  = empty ? fifo_entry_t'('0) : q[0];

  always #5 clk = ~clk;
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pop) void'(q.pop_front());
    if (free_shadow) frees++;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // receiver
  int run = 0, max_run = 0, rx = 0;
  always @(posedge netclk) begin
    if (!fifodab) begin
      logic [7:0] e;
      checks++;
      if (exp_bytes.size() == 0) fail("unexpected byte");
      else begin
        e = exp_bytes.pop_front();
        if (n_data !== e || eom !== exp_eom.pop_front() || parity !== ~^n_data) begin
          fail($sformatf("byte %0d: got %h eom %b par %b exp %h", rx, n_data, eom, parity, e));
        end
      end
      rx++;
      run++;
      if (run > max_run) max_run = run;
    end else run = 0;
  end

  task automatic enqueue(input bit res, input int seed);
    fifo_entry_t en;
    en.resource = res;
    for (int i = 0; i < 5; i++) en.sample[32*i +: 32] = 32'(seed * 32'h0102_0304 + i);
    q.push_back(en);
    for (int i = 0; i < 20; i++) begin
      exp_bytes.push_back(en.sample[159 - 8*i -: 8]);
      exp_eom.push_back(!res && i == 19);
    end
    if (res) for (int c = 0; c < 16; c++) for (int b = 0; b < 4; b++) begin
      exp_bytes.push_back(shadow[c][31 - 8*b -: 8]);
      exp_eom.push_back(c == 15 && b == 3);
    end
  endtask

  int t0, nclk_edges, idle;
  initial begin
    for (int c = 0; c < 16; c++) shadow[c] = $urandom();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // NETCLK is half the Node clock
    nclk_edges = 0;
    fork
      repeat (20) @(posedge clk);
      forever @(posedge netclk) nclk_edges++;
    join_any
    disable fork;
    checks++;
    if (nclk_edges != 10) fail($sformatf("netclk edges %0d in 20 node clocks", nclk_edges));
    // one Resource sample, NETRDY high: 84 consecutive network clocks
    max_run = 0;
    enqueue(1, 1);
    t0 = $time;
    wait (exp_bytes.size() == 0);
    @(posedge clk);
    checks++;
    if (max_run != RES_BYTES) fail($sformatf("resource burst %0d bytes", max_run));
    checks++;
    if (($time - t0) / 10 > 2 * RES_BYTES + 4) fail($sformatf("resource sample took %0d node clocks", ($time - t0) / 10));
    checks++;
    if (frees != 1) fail("shadow not freed once");
    // several samples with a random NETRDY
    fork
      begin
        for (int i = 0; i < 6; i++) enqueue(i % 3 == 2, i + 10);
        wait (exp_bytes.size() == 0);
      end
      begin
        while (exp_bytes.size() != 0) begin
          @(posedge netclk) netrdy <= ($urandom_range(0, 2) != 0);
        end
      end
    join
    netrdy = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (frees != 3) fail($sformatf("frees %0d", frees));
    // NETRDY low holds everything back
    netrdy = 0;
    enqueue(0, 77);
    repeat (40) @(posedge clk);
    checks++;
    if (exp_bytes.size() != 20) fail("byte sent while NETRDY low");
    netrdy = 1;
    // a stall holds the output for one network clock
    wait (exp_bytes.size() == 15);
    @(negedge clk) stall = 1;
    @(negedge clk) stall = 0;
    idle = 0;
    fork
      wait (exp_bytes.size() == 0);
      forever @(posedge netclk) if (fifodab) idle++;
    join_any
    disable fork;
    checks++;
    if (idle != 1) fail($sformatf("stall cost %0d network clocks, expected 1", idle));
    wait (exp_bytes.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) fail("queue not drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
