// mk2_error_counter: 32-bit wrap-around error tally.
//
// Used twice: as the Wait Error Counter (one count per Node clock in which
// an acknowledge is held back for a full FIFO or busy shadow registers) and
// as the Overrun Error Counter (one count per discarded sample). A
// processor write outside test mode clears it; in test mode a write loads
// the written value and a separate command increments it. On reaching 2^32
// it wraps to zero and goes on counting. A clear or load in the same cycle
// as a count wins.
module mk2_error_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sw_rst,
  input  logic        count,     // hardware event
  input  logic        clear,     // processor write, normal mode
  input  logic        load,      // processor write, test mode
  input  logic [31:0] load_val,
  input  logic        test_inc,  // processor increment, test mode
  output logic [31:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  value <= '0;
    else if (sw_rst || clear)    value <= '0;
    else if (load)               value <= load_val;
    else if (count || test_inc)  value <= value + 32'd1;
  end
endmodule
