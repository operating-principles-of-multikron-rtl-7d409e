// mk2_sample_fifo: the on-chip sample FIFO.
//
// Holds complete samples (161-bit entries: the 160-bit Trace part plus the
// Resource flag) between the moment a sample is taken and the moment the
// network has sent it. The head entry is always visible on `head`; the
// network reads it byte by byte and pops it after the last byte. The
// processor can read the head at any time in 32-bit groups without popping
// it. The depth is not published ("small"); DEPTH = 8 is this design's
// choice. Push when full and pop when empty are ignored; the controller
// never issues them. A push and a pop in the same cycle are both done,
// also when the FIFO is full.
module mk2_sample_fifo
  import mk2_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sw_rst,
  input  logic        push,
  input  fifo_entry_t din,
  input  logic        pop,
  output fifo_entry_t head,
  output logic        empty,
  output logic        full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fifo_entry_t       mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic [AW:0]       count;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign head  = mem[rd_ptr];

  wire do_pop  = pop && !empty;
  wire do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (sw_rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= nxt(wr_ptr);
      if (do_pop)  rd_ptr <= nxt(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      count <= (AW+1)'(DEPTH));
`endif
endmodule
