// Testbench for mk2_resource_counters. A reference model in the testbench
// computes every counter's expected value cycle by cycle from the same
// configuration and inputs; the test covers every counting source, every
// clock choice, enable, clear, processor write, software increment,
// saturation of 32- and 64-bit counters, 64-bit pairing and test mode.
module tb_mk2_resource_counters;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, sw_rst = 0, test_mode = 0;
  logic [15:0] enabled = 0, clr = 0, x_pins = 0;
  logic [15:0][3:0] mode, clksel;
  logic div10_tick = 0, div100_tick = 0, ts_tick = 0;
  logic wr = 0, inc = 0;
  logic [3:0] idx = 0;
  logic [31:0] wdata = 0;
  logic [15:0][31:0] cnt;
  int checks = 0, failures = 0;

  mk2_resource_counters dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model (same cycle semantics)
  logic [15:0] xs1 = 0, xs2 = 0, xs3 = 0;
  logic [15:0][31:0] m;
  function automatic bit clk_src(input logic [3:0] c);
    case (c[2:0])
      3'b001, 3'b101: return 1;
      3'b010, 3'b110: return div10_tick;
      3'b011, 3'b111: return div100_tick;
      3'b100:         return ts_tick;
      default:        return 0;
    endcase
  endfunction
  function automatic bit hw(input int i, input int cfg);
    case (mode[cfg][2:0])
      3'b001, 3'b101: return clk_src(clksel[cfg]);
      3'b011, 3'b111: return clk_src(clksel[cfg]) && xs2[cfg];
      3'b100:         return xs2[cfg] && !xs3[cfg];
      default:        return 0;
    endcase
  endfunction
  always @(posedge clk) begin
    logic [15:0][31:0] n;
    n = m;
    for (int p = 0; p < 8; p++) begin
      int e, o;
      e = 2 * p; o = e + 1;
      if (mode[e][3]) begin
        bit ev;
        logic [63:0] v;
        ev = (!test_mode && enabled[e] && hw(e, e)) ||
             (inc && (idx == e || idx == o) &&
              (test_mode || (enabled[e] && mode[e][2:0] inside {3'b010, 3'b110})));
        v = {m[o], m[e]};
        if (clr[e]) v = 0;
        else if (wr && idx == e) v[31:0] = wdata;
        else if (wr && idx == o) v[63:32] = wdata;
        else if (ev && v != '1) v = v + 1;
        {n[o], n[e]} = v;
      end else begin
        for (int i = e; i <= o; i++) begin
          bit ev;
          ev = (!test_mode && enabled[i] && hw(i, i)) ||
               (inc && idx == i &&
                (test_mode || (enabled[i] && mode[i][2:0] inside {3'b010, 3'b110})));
          if (clr[i]) n[i] = 0;
          else if (wr && idx == i) n[i] = wdata;
          else if (ev && m[i] != '1) n[i] = m[i] + 1;
        end
      end
    end
    m <= n;
    xs1 <= x_pins; xs2 <= xs1; xs3 <= xs2;
  end

  task automatic compare(input string what);
    checks++;
    if (cnt !== m) begin
      failures++;
      for (int i = 0; i < 16; i++)
        if (cnt[i] !== m[i]) $display("FAIL %s: counter %0d got %h exp %h", what, i, cnt[i], m[i]);
    end
  endtask

  // ---------------- stimulus
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    div10_tick  <= (cyc % 10) == 0;
    div100_tick <= (cyc % 100) == 0;
    ts_tick     <= (cyc % 7) == 0;
    x_pins      <= x_pins ^ 16'($urandom_range(0, 65535) & $urandom_range(0, 65535));
  end

  initial begin
    m = '0;
    // counter: mode / clock select
    mode = '0; clksel = '0;
    mode[0]  = 4'h1; clksel[0]  = 4'h1;  // Node clock
    mode[1]  = 4'h1; clksel[1]  = 4'h2;  // Node clock / 10
    mode[2]  = 4'h1; clksel[2]  = 4'h3;  // Node clock / 100
    mode[3]  = 4'h1; clksel[3]  = 4'h4;  // Timestamp clock
    mode[4]  = 4'h2; clksel[4]  = 4'h4;  // software
    mode[5]  = 4'h4; clksel[5]  = 4'h4;  // external edges
    mode[6]  = 4'h3; clksel[6]  = 4'h1;  // Node clock while pin high
    mode[7]  = 4'h0; clksel[7]  = 4'h1;  // no source
    mode[8]  = 4'h9; clksel[8]  = 4'h1;  // 64-bit pair on Node clock
    mode[9]  = 4'h2; clksel[9]  = 4'h4;  //   (odd half: own fields ignored)
    mode[10] = 4'hC; clksel[10] = 4'h4;  // 64-bit pair on external edges
    mode[11] = 4'h1; clksel[11] = 4'h1;
    mode[12] = 4'h5; clksel[12] = 4'h6;  // aliases 101 / 110
    mode[13] = 4'h6; clksel[13] = 4'h7;  // alias 110 (software)
    mode[14] = 4'h7; clksel[14] = 4'h5;  // alias 111 / 101
    mode[15] = 4'hA; clksel[15] = 4'h4;  // double bit on odd counter: ignored
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    enabled = 16'hFFFF;
    repeat (500) begin
      @(negedge clk);
      inc = ($urandom_range(0, 3) == 0);
      idx = 4'($urandom_range(0, 15));
      compare("free counting");
    end
    inc = 0;
    // clear and write
    @(negedge clk); clr = 16'h0101;
    @(negedge clk); clr = 0; wr = 1; idx = 5; wdata = 32'hFFFF_FFF0;
    @(negedge clk); wr = 1; idx = 8; wdata = 32'hFFFF_FFFE;
    @(negedge clk); wr = 1; idx = 9; wdata = 32'hFFFF_FFFF;
    @(negedge clk); wr = 1; idx = 0; wdata = 32'hFFFF_FFF8;
    @(negedge clk); wr = 0;
    repeat (300) begin
      @(negedge clk);
      inc = ($urandom_range(0, 1) == 0);
      idx = 4'($urandom_range(4, 5));
      compare("saturation");
    end
    inc = 0;
    checks++;
    if (cnt[0] != 32'hFFFF_FFFF || {cnt[9], cnt[8]} != 64'hFFFF_FFFF_FFFF_FFFF ||
        cnt[5] != 32'hFFFF_FFFF) begin
      failures++;
      $display("FAIL saturation not reached");
    end
    // disable half of them
    enabled = 16'h5555;
    repeat (200) begin
      @(negedge clk);
      compare("partly disabled");
    end
    // test mode: hardware counting stops, increments always count
    test_mode = 1;
    @(negedge clk); wr = 1; idx = 3; wdata = 100;
    @(negedge clk); wr = 0;
    repeat (100) begin
      @(negedge clk);
      inc = ($urandom_range(0, 1) == 0);
      idx = 4'($urandom_range(0, 15));
      compare("test mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
