// mk2_clk_enables: count-enable pulses derived from the two chip clocks.
//
// Everything inside the chip runs on the Node clock. The Timestamp clock is
// a slower, independent clock (at most one third of the Node clock), so it
// is brought in through a two-flop synchronizer and its rising edges become
// one-Node-cycle pulses (ts_tick). The resource counters can also count
// 1/10 and 1/100 of the Node clock; these are produced here as one-cycle
// pulses from a modulo-10 counter and a second modulo-10 counter stepped by
// the first. The synchronizer and the pulse form of the divided clocks are
// this design's choice; the divide ratios and the 1/3 limit are the
// published ones (the limit leaves room for the synchronizer).
// Latency: ts_tick follows a Timestamp clock rising edge by 2-3 Node clocks.
module mk2_clk_enables (
  input  logic clk,          // Node clock
  input  logic rst_n,
  input  logic ts_clk,       // Timestamp clock (asynchronous)
  output logic ts_tick,      // one pulse per Timestamp clock rising edge
  output logic div10_tick,   // one pulse every 10 Node clocks
  output logic div100_tick   // one pulse every 100 Node clocks
);
  logic [2:0] ts_sync;
  logic [3:0] cnt10;
  logic [3:0] cnt100;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ts_sync <= '0;
    else        ts_sync <= {ts_sync[1:0], ts_clk};
  end
  assign ts_tick = ts_sync[1] && !ts_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt10  <= '0;
      cnt100 <= '0;
    end else begin
      cnt10 <= (cnt10 == 4'd9) ? 4'd0 : cnt10 + 4'd1;
      if (cnt10 == 4'd9) cnt100 <= (cnt100 == 4'd9) ? 4'd0 : cnt100 + 4'd1;
    end
  end
  assign div10_tick  = (cnt10 == 4'd9);
  assign div100_tick = (cnt10 == 4'd9) && (cnt100 == 4'd9);
endmodule
