// mk2_source_regs: the eight Source Address registers and the CPU ID
// encoder.
//
// Register r holds the "node.process" identity of the process running on
// processor r of the node; the operating system rewrites it at each context
// switch (addresses 32..39). When a sample is taken, the one-hot CPU ID
// pins C0..C7 tell which processor wrote it: the pins are encoded to a
// 3-bit processor number for the sample header, and that processor's
// register is selected for the sample's source field. Only one pin should
// be high; if several are, the lowest-numbered wins, and with none high
// processor 0 is assumed (both this design's choice).
module mk2_source_regs
  import mk2_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sw_rst,
  input  logic                         wr,
  input  logic [2:0]                   widx,
  input  logic [SRC_W-1:0]             wdata,
  input  logic [NUM_CPU-1:0]           cpu_lines,
  output logic [NUM_CPU-1:0][SRC_W-1:0] regs,
  output logic [2:0]                   cpu_id,
  output logic [SRC_W-1:0]             sel_src
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      regs <= '0;
    else if (sw_rst) regs <= '0;
    else if (wr)     regs[widx] <= wdata;
  end

  always_comb begin
    cpu_id = 3'd0;
    for (int i = NUM_CPU - 1; i >= 0; i--)
      if (cpu_lines[i]) cpu_id = i[2:0];
  end
  assign sel_src = regs[cpu_id];
endmodule
