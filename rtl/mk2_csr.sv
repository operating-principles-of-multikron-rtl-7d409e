// mk2_csr: Control and Status Register (16 bits).
//
// Control bits come in set/clear pairs, so writing a 1 to a bit position
// commands that action and writing 0 changes nothing; one write can touch
// one option without knowing the others:
//   bit 0/1   enable / disable sampling (disabled after reset)
//   bit 2/3   wait for FIFO/shadow space on a sample / discard (default)
//   bit 4/5   wait for free shadow registers on read-with-copy / do not
//   bit 14/15 32-bit processor mode / 64-bit mode
// If both bits of a pair are written as 1 the disable side wins (this
// design's choice). On read the even bit of each pair shows the option and
// the odd bit reads 0, except bit 15 which reads as "64-bit mode". Bits 6..10
// show FIFO full, shadow registers full, FIFO overrun, shadow overrun and
// the 161st bit of the FIFO head entry; bit 12 the wait-state count. The
// reset state of 32-bit mode is not published; 64-bit mode is assumed.
module mk2_csr
  import mk2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sw_rst,
  input  logic        wr,
  input  logic [15:0] wdata,
  input  logic        fifo_full,
  input  logic        shadow_full,
  input  logic        fifo_ovr,
  input  logic        shadow_ovr,
  input  logic        bit161,
  input  logic        wait_state,
  output logic        samp_en,
  output logic        wwait_en,
  output logic        rwait_en,
  output logic        mode32,
  output logic [15:0] rd
);
  function automatic logic upd(input logic cur, input logic set, input logic clr);
    return clr ? 1'b0 : (set ? 1'b1 : cur);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_en  <= 1'b0;
      wwait_en <= 1'b0;
      rwait_en <= 1'b0;
      mode32   <= 1'b0;
    end else if (sw_rst) begin
      samp_en  <= 1'b0;
      wwait_en <= 1'b0;
      rwait_en <= 1'b0;
      mode32   <= 1'b0;
    end else if (wr) begin
      samp_en  <= upd(samp_en,  wdata[CSR_SAMP_EN],  wdata[CSR_SAMP_DIS]);
      wwait_en <= upd(wwait_en, wdata[CSR_WWAIT_EN], wdata[CSR_WWAIT_DIS]);
      rwait_en <= upd(rwait_en, wdata[CSR_RWAIT_EN], wdata[CSR_RWAIT_DIS]);
      mode32   <= upd(mode32,   wdata[CSR_M32_EN],   wdata[CSR_M32_DIS]);
    end
  end

  always_comb begin
    rd = '0;
    rd[CSR_SAMP_EN]   = samp_en;
    rd[CSR_WWAIT_EN]  = wwait_en;
    rd[CSR_RWAIT_EN]  = rwait_en;
    rd[CSR_FIFO_FULL] = fifo_full;
    rd[CSR_SHD_FULL]  = shadow_full;
    rd[CSR_FIFO_OVR]  = fifo_ovr;
    rd[CSR_SHD_OVR]   = shadow_ovr;
    rd[CSR_BIT161]    = bit161;
    rd[CSR_WSTATES]   = wait_state;
    rd[CSR_M32_EN]    = mode32;
    rd[CSR_M32_DIS]   = !mode32;
  end
endmodule
