// mk2_sample_assembler: builds the 160-bit sample word and keeps the two
// overrun flags that the next sample's header reports.
//
// Layout, most significant (sent first) to least significant:
//   header (8) | timestamp (56) | source address (32) | user data (64)
// with header = {CPU ID (3), sample type (2), shadow overrun, FIFO overrun,
// unused 0}. Sample type is 11 for a Trace sample and 10 for a Resource
// sample, as in the body text (the format table lists the two codes the
// other way round). The 161st bit of the FIFO entry marks a Resource sample,
// whose counter words follow from the shadow registers.
//
// A discarded sample sets the FIFO-overrun flag and/or the shadow-overrun
// flag; both are copied into the header of the next sample that is taken
// and then cleared, telling the reader that samples were lost before it.
module mk2_sample_assembler
  import mk2_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sw_rst,
  input  logic              take,          // a sample enters the FIFO
  input  logic              resource,      // ... and it is a Resource sample
  input  logic              lost_fifo,     // a sample was discarded: FIFO full
  input  logic              lost_shadow,   // ... shadow registers busy
  input  logic [2:0]        cpu_id,
  input  logic [TS_W-1:0]   ts,
  input  logic [SRC_W-1:0]  src,
  input  logic [63:0]       user,
  output fifo_entry_t       entry,
  output logic              fifo_ovr,
  output logic              shadow_ovr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_ovr   <= 1'b0;
      shadow_ovr <= 1'b0;
    end else if (sw_rst || take) begin
      fifo_ovr   <= 1'b0;
      shadow_ovr <= 1'b0;
    end else begin
      if (lost_fifo)   fifo_ovr   <= 1'b1;
      if (lost_shadow) shadow_ovr <= 1'b1;
    end
  end

  logic [7:0] header;
  assign header = {cpu_id, resource ? TYPE_RESOURCE : TYPE_TRACE,
                   shadow_ovr, fifo_ovr, 1'b0};
  assign entry.resource = resource;
  assign entry.sample   = {header, ts, src, user};
endmodule
