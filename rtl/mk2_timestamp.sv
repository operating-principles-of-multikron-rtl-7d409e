// mk2_timestamp: the 56-bit Timestamp counter.
//
// Counts Timestamp clock edges (ts_tick pulses in the Node clock domain).
// Only the hardware reset clears it; a software reset leaves it alone so that
// the timestamps of all chips in a machine, reset together and fed a common
// Timestamp clock, stay aligned. In test mode it stops counting and may
// instead be loaded (address 2) or stepped (address 16) by the processor.
// The counter wraps at 2^56, an epoch of over a century at 10 MHz.
// Stopping the count in test mode follows the TESTB pin description
// ("disables all counters"); load has priority over increment.
module mk2_timestamp
  import mk2_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,      // hardware reset only
  input  logic            ts_tick,
  input  logic            test_mode,
  input  logic            load,
  input  logic [TS_W-1:0] load_val,
  input  logic            inc,
  output logic [TS_W-1:0] ts
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ts <= '0;
    else if (test_mode && load)      ts <= load_val;
    else if (test_mode && inc)       ts <= ts + 1'b1;
    else if (!test_mode && ts_tick)  ts <= ts + 1'b1;
  end
endmodule
