// mk2_rc_ctrl_regs: Enable, Mode and Clock Select registers of the
// resource counters.
//
// Each register is 64 bits wide and split into sixteen 4-bit fields, field
// i (bits 4i+3..4i) belonging to resource counter i. A write changes only
// the fields whose written value is non-zero, so independent users can each
// drive their own counters without knowing the others' settings.
//   Mode field:   bit 3 double precision (even counters only, the odd
//                 partner follows its even counter), bits 2..0 counting
//                 source: x000 none, x001 internal clock, x010 software,
//                 x011 internal clock while external pin high,
//                 x100 external pin rising edges (reset value), and
//                 x101..x111 repeat x001..x011.
//   ClkSel field: x001 Node clock, x010 /10, x011 /100, x100 Timestamp
//                 clock (reset value), x101..x111 repeat x001..x011.
//   Enable field: xx01 disable (reset value), xx10 enable, xx11 clear the
//                 counter and enable it. The clear is issued here as a
//                 one-cycle pulse (clr) to the counter.
// The enable register reads back the counter's state (10 enabled, 01
// disabled); the other two read back the stored fields. That read-back
// format, and the field-to-counter ordering with counter 0 in the lowest
// field, are this design's choice.
module mk2_rc_ctrl_regs
  import mk2_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sw_rst,
  input  logic              wr_enable,
  input  logic              wr_mode,
  input  logic              wr_clksel,
  input  logic [DATA_W-1:0] wdata,
  output logic [NUM_RC-1:0] enabled,
  output logic [NUM_RC-1:0] clr,
  output logic [NUM_RC-1:0][3:0] mode,
  output logic [NUM_RC-1:0][3:0] clksel,
  output logic [DATA_W-1:0] enable_rd
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enabled <= '0;
      clr     <= '0;
      mode    <= {NUM_RC{MODE_DEFAULT}};
      clksel  <= {NUM_RC{CLKSEL_DEFAULT}};
    end else if (sw_rst) begin
      enabled <= '0;
      clr     <= '0;
      mode    <= {NUM_RC{MODE_DEFAULT}};
      clksel  <= {NUM_RC{CLKSEL_DEFAULT}};
    end else begin
      clr <= '0;
      for (int i = 0; i < NUM_RC; i++) begin
        if (wdata[4*i +: 4] != 4'd0) begin
          if (wr_mode)   mode[i]   <= wdata[4*i +: 4];
          if (wr_clksel) clksel[i] <= wdata[4*i +: 4];
          if (wr_enable && wdata[4*i +: 2] != EN_NOP) begin
            enabled[i] <= (wdata[4*i +: 2] != EN_DIS);
            clr[i]     <= (wdata[4*i +: 2] == EN_RST_EN);
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_RC; i++)
      enable_rd[4*i +: 4] = enabled[i] ? {2'b00, EN_EN} : {2'b00, EN_DIS};
  end
endmodule
