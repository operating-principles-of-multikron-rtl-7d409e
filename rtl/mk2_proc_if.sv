// mk2_proc_if: processor bus handshake of the MultiKron II.
//
// A processor interaction starts on a Node clock edge that sees STARTB low
// together with READB or WRITEB low. Address and data are captured at that
// edge; READB, WRITEB and STARTB are then ignored until the interaction
// ends. After the preset number of wait states (0 or 1, taken from the
// WAITSTATE pin while RESETB is low) the request is handed to the core
// (core_req). The core answers with core_done when it has carried the
// action out; it may hold core_done low to insert extra wait states (a full
// FIFO or busy shadow registers). ACKB is then driven low for one Node
// clock, or for as long as HOLDB is held low, and read data is driven for
// exactly as long as ACKB is low.
//
// The High Order 32 bit register (address 7) lives here. In 32-bit mode the
// upper half of every write is taken from it instead of from the pins, and
// the upper half of every read is copied into it, so a 32-bit processor
// moves 64-bit values with two accesses.
//
// RESETB is used both as the asynchronous reset and, synchronously, as the
// window in which the WAITSTATE pin is sampled; lint reports that double
// use and it is intended.
//
// Timing: request sampled at edge k, core_req high from edge k+1+ws, ACKB
// low one cycle after the edge at which core_done was high. The exact
// cycle-level timing of the original chip is not published here; this
// schedule, the write-over-read priority when both strobes are low, and the
// choice that reads of address 7 leave the register unchanged are this
// design's own.
module mk2_proc_if
  import mk2_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,      // RESETB, asynchronous
  input  logic              sw_rst,     // software reset (address 0)
  // pins
  input  logic              readb,
  input  logic              writeb,
  input  logic              startb,
  input  logic              holdb,
  input  logic              ws_pin,     // WAITSTATE, sampled during reset
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] d_in,
  output logic [DATA_W-1:0] d_out,
  output logic              d_oe,       // read data valid on d_out
  output logic              ackb,
  // configuration
  input  logic              mode32,
  output logic              wait_state, // latched WAITSTATE pin
  // core side
  output logic              core_req,
  output logic              core_we,
  output logic [ADDR_W-1:0] core_addr,
  output logic [DATA_W-1:0] core_wdata,
  input  logic              core_done,
  input  logic [DATA_W-1:0] core_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_EXEC, S_ACK} state_e;
  state_e             state;
  logic               we_q;
  logic [ADDR_W-1:0]  addr_q;
  logic [DATA_W-1:0]  din_q;
  logic [DATA_W-1:0]  rdata_q;
  logic [31:0]        high32;
  logic               is_high;
  logic               done;

  // The wait-state count follows the pin on every Node clock while reset
  // is held and keeps its last value once reset is released.
  always_ff @(posedge clk) begin
    if (!rst_n) wait_state <= ws_pin;
  end

  wire start = !startb && (!readb || !writeb);

  assign is_high    = (addr_q == A_HIGH32);
  assign core_req   = (state == S_EXEC) && !is_high;
  assign core_we    = we_q;
  assign core_addr  = addr_q;
  assign core_wdata = mode32 ? {high32, din_q[31:0]} : din_q;
  assign done       = (state == S_EXEC) && (is_high || core_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      din_q   <= '0;
      rdata_q <= '1;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          we_q   <= !writeb;
          addr_q <= addr;
          din_q  <= d_in;
          state  <= wait_state ? S_WAIT : S_EXEC;
        end
        S_WAIT: state <= S_EXEC;
        S_EXEC: if (done) begin
          rdata_q <= is_high ? {32'hFFFF_FFFF, high32} : core_rdata;
          state   <= S_ACK;
        end
        S_ACK: if (holdb) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // High Order 32 bit register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) high32 <= '0;
    else if (sw_rst) high32 <= '0;
    else if (done && is_high && we_q) high32 <= din_q[31:0];
    else if (done && !is_high && !we_q) high32 <= core_rdata[63:32];
  end

  assign ackb  = !(state == S_ACK);
  assign d_oe  = (state == S_ACK) && !we_q;
  assign d_out = rdata_q;

`ifndef SYNTHESIS
  // once started, an interaction always ends in an acknowledge
  a_ack_only_after_exec: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_ACK) |-> $past(state == S_EXEC) || $past(state == S_ACK));
`endif

endmodule
