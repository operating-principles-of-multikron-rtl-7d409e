// mk2_shadow_regs: the single rank of shadow registers behind the resource
// counters.
//
// All counter reads and all Resource-sample output go through these
// registers, so every value read or sent was captured at one instant.
// A copy (read-with-copy or Resource sample) loads all sixteen counters at
// once while the counters keep counting. A Resource sample also marks the
// rank busy: it then acts as a one-entry FIFO holding the counter half of
// that sample until the network has sent it (free), and may not be copied
// over meanwhile. A copy that arrives while busy is refused here as well,
// so the held sample can never be corrupted; the controller decides
// whether the requester waits or is discarded.
module mk2_shadow_regs
  import mk2_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sw_rst,
  input  logic                        copy,       // load all counters
  input  logic                        mark_busy,  // with copy: Resource sample
  input  logic                        free,       // sample sent / test advance
  input  logic [NUM_RC-1:0][RC_W-1:0] cnt,
  output logic [NUM_RC-1:0][RC_W-1:0] shadow,
  output logic                        busy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      busy   <= 1'b0;
    end else if (sw_rst) begin
      shadow <= '0;
      busy   <= 1'b0;
    end else begin
      if (copy && !busy) begin
        shadow <= cnt;
        busy   <= mark_busy;
      end else if (free) begin
        busy   <= 1'b0;
      end
    end
  end
endmodule
