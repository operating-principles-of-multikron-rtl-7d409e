// mk2_net_out: byte-serial output to the data collection network.
//
// The chip drives its own network clock NETCLK at half the Node clock. On
// every falling edge of NETCLK (a Node clock edge with NETCLK high) the unit
// decides whether to present a byte: it needs the network enabled, a
// sample at the FIFO head, NETRDY high and no pending processor use of the
// shadow data bus. If so it drives the next byte on N[7:0] with its odd
// parity bit and the end-of-message flag (last byte of the sample), and
// pulls FIFODAB low; the external network FIFO takes the byte on the next
// rising edge of NETCLK. Otherwise FIFODAB stays high.
//
// A sample is sent header first, then the timestamp, source address and
// user data, most significant byte first: 20 bytes for a Trace sample. A
// Resource sample continues with the 16 shadowed counters, counter 0 first,
// each most significant byte first: 84 bytes, 84 network clocks (168 Node
// clocks) when the network never stalls. After the last byte the FIFO entry
// is popped and, for a Resource sample, the shadow registers are freed.
//
// `stall` (a processor read-without-copy while the shadow registers are
// busy) holds the output off for two Node clocks, one network clock.
// `restart` (test-mode FIFO advance) restarts at the first byte of the next
// entry. Sampling NETRDY at the falling NETCLK edge, counter and byte
// order within the counter block, and the stall mechanics are this
// design's choices.
module mk2_net_out
  import mk2_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sw_rst,
  input  logic                        net_en,
  input  logic                        netrdy,
  input  logic                        stall,
  input  logic                        restart,
  input  fifo_entry_t                 head,
  input  logic                        empty,
  input  logic [NUM_RC-1:0][RC_W-1:0] shadow,
  output logic                        pop,
  output logic                        free_shadow,
  output logic                        netclk,
  output logic [7:0]                  n_data,
  output logic                        parity,
  output logic                        eom,
  output logic                        fifodab
);
  logic [6:0] idx;          // byte index within the sample
  logic [1:0] stall_cnt;
  logic [7:0] byte_v;
  logic       last;
  logic       send;
  logic [5:0] r;            // byte index within the counter block

  always_comb begin
    r = 6'(idx - 7'(TRACE_BYTES));
    if (idx < 7'(TRACE_BYTES)) byte_v = head.sample[SAMPLE_W - 8 - 8*idx +: 8];
    else                       byte_v = shadow[r[5:2]][24 - 8*r[1:0] +: 8];
    last = head.resource ? (idx == 7'(RES_BYTES - 1)) : (idx == 7'(TRACE_BYTES - 1));
    send = netclk && net_en && !empty && netrdy && (stall_cnt == 2'd0) && !stall;
  end

  assign pop         = send && last;
  assign free_shadow = send && last && head.resource;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      netclk    <= 1'b0;
      idx       <= '0;
      stall_cnt <= '0;
      n_data    <= '0;
      parity    <= 1'b1;
      eom       <= 1'b0;
      fifodab   <= 1'b1;
    end else if (sw_rst) begin
      idx       <= '0;
      stall_cnt <= '0;
      fifodab   <= 1'b1;
      eom       <= 1'b0;
      netclk    <= ~netclk;
    end else begin
      netclk <= ~netclk;
      if (stall)               stall_cnt <= 2'd1;
      else if (stall_cnt != 0) stall_cnt <= stall_cnt - 2'd1;
      if (restart) idx <= '0;
      if (netclk) begin
        fifodab <= !send;
        if (send) begin
          n_data <= byte_v;
          parity <= ~^byte_v;
          eom    <= last;
          if (!restart) idx <= last ? '0 : idx + 7'd1;
        end
      end
    end
  end
endmodule
