// mk2_resource_counters: the sixteen 32-bit resource counters.
//
// Each counter picks its counting source from its Mode field: an internal
// clock chosen by its Clock Select field (Node clock, Node clock / 10,
// Node clock / 100 or the Timestamp clock, all as one-cycle enable pulses),
// software increments (processor write to address 80+j), rising edges of
// its private external pin X[j], or the internal clock counted only while
// X[j] is high. A counter counts only while enabled. Counters saturate at
// all ones instead of wrapping. When the even counter of a pair has its
// double-precision bit set the pair {odd, even} becomes one 64-bit counter
// driven by the even counter's source, clock, pin and enable; the even
// counter holds the low word.
//
// The processor can write any counter (address 64+j) at any time. In test
// mode hardware counting stops and a software increment always counts.
// External pins pass a two-flop synchronizer, so edges are seen 2-3 Node
// clocks late and pins must change no faster than every other Node clock.
// A clear pulse from the Enable register (code 11) zeroes the counter, and
// for a double-precision pair the even counter's clear zeroes both halves.
// Priority: clear, then processor write, then count.
// Design choices: low word in the even counter, increments to either
// address of a pair step the pair, software increments need the counter
// enabled outside test mode, the synchronizer.
module mk2_resource_counters
  import mk2_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sw_rst,
  input  logic                   test_mode,
  input  logic [NUM_RC-1:0]      enabled,
  input  logic [NUM_RC-1:0]      clr,
  input  logic [NUM_RC-1:0][3:0] mode,
  input  logic [NUM_RC-1:0][3:0] clksel,
  input  logic [NUM_RC-1:0]      x_pins,
  input  logic                   div10_tick,
  input  logic                   div100_tick,
  input  logic                   ts_tick,
  input  logic                   wr,
  input  logic                   inc,
  input  logic [3:0]             idx,
  input  logic [RC_W-1:0]        wdata,
  output logic [NUM_RC-1:0][RC_W-1:0] cnt
);
  logic [NUM_RC-1:0] x_s1, x_s2, x_s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {x_s1, x_s2, x_s3} <= '0;
    else begin
      x_s1 <= x_pins;
      x_s2 <= x_s1;
      x_s3 <= x_s2;
    end
  end

  // Hardware count event for counter i as configured by its own fields
  function automatic logic hw_event(input logic [2:0] m, input logic [2:0] c,
                                    input logic x_lvl, input logic x_rise,
                                    input logic d10, input logic d100,
                                    input logic tst);
    logic clk_ev;
    unique case (c[1:0])
      2'b01:   clk_ev = 1'b1;
      2'b10:   clk_ev = d10;
      2'b11:   clk_ev = d100;
      default: clk_ev = c[2] ? tst : 1'b0;
    endcase
    unique case (m[1:0])
      2'b01:   return clk_ev;
      2'b11:   return clk_ev && x_lvl;
      2'b00:   return m[2] && x_rise;
      default: return 1'b0;          // software source
    endcase
  endfunction

  logic [NUM_RC-1:0] ev;    // count this cycle
  always_comb begin
    for (int i = 0; i < NUM_RC; i++) begin
      logic sw_ok;
      sw_ok = test_mode || (enabled[i] && mode[i][1:0] == 2'b10);
      ev[i] = (!test_mode && enabled[i] &&
               hw_event(mode[i][2:0], clksel[i][2:0], x_s2[i], x_s2[i] && !x_s3[i],
                        div10_tick, div100_tick, ts_tick))
            || (inc && sw_ok && (idx == i[3:0]));
    end
  end

  for (genvar p = 0; p < NUM_RC / 2; p++) begin : g_pair
    localparam int unsigned E = 2 * p;
    localparam int unsigned O = 2 * p + 1;
    logic        dbl;        // pair works as one 64-bit counter
    logic        pair_inc;   // 64-bit count event
    logic [63:0] pair;
    assign dbl      = mode[E][3];
    assign pair     = {cnt[O], cnt[E]};
    assign pair_inc = ev[E] || (inc && (idx == 4'(O)) &&
                      (test_mode || (enabled[E] && mode[E][1:0] == 2'b10)));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[E] <= '0;
        cnt[O] <= '0;
      end else if (sw_rst) begin
        cnt[E] <= '0;
        cnt[O] <= '0;
      end else if (dbl) begin
        // double precision pair, the even counter's settings rule
        if (clr[E]) begin
          cnt[E] <= '0;
          cnt[O] <= '0;
        end else if (wr && idx == 4'(E)) begin
          cnt[E] <= wdata;
        end else if (wr && idx == 4'(O)) begin
          cnt[O] <= wdata;
        end else if (pair_inc && !(&pair)) begin
          {cnt[O], cnt[E]} <= pair + 64'd1;
        end
      end else begin
        if (clr[E])                        cnt[E] <= '0;
        else if (wr && idx == 4'(E))       cnt[E] <= wdata;
        else if (ev[E] && !(&cnt[E]))      cnt[E] <= cnt[E] + 1'b1;
        if (clr[O])                        cnt[O] <= '0;
        else if (wr && idx == 4'(O))       cnt[O] <= wdata;
        else if (ev[O] && !(&cnt[O]))      cnt[O] <= cnt[O] + 1'b1;
      end
    end
  end
endmodule
