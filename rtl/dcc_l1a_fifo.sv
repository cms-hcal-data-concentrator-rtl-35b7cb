// dcc_l1a_fifo: the trigger FIFO between trigger capture and the event
// builder, with the occupancy thresholds that drive the TTS state.
//
// Entries are pushed by dcc_l1a_capture and popped when the event builder
// starts an event. Two flags with hysteresis follow the occupancy: ofw is
// set when level >= ofw_on and cleared when level <= ofw_off; busy likewise
// with bsy_on/bsy_off. full follows the FIFO, and a push while full is a
// lost trigger, reported on overflow as loss of synchronisation. The
// ev_* outputs pulse once on each on/off transition and feed the DCC error
// counters 0-5. That the FIFO exists, the threshold on/off events and the
// overflow meaning follow the specification; depth and the threshold
// scheme are this design's.
module dcc_l1a_fifo
  import dcc_pkg::*;
#(
  parameter int DEPTH = 64,
  localparam int LW   = $clog2(DEPTH) + 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       push,
  input  l1a_entry_t din,
  input  logic       pop,
  output l1a_entry_t dout,
  output logic       empty,
  output logic [LW-1:0] level,
  input  logic [LW-1:0] ofw_on,
  input  logic [LW-1:0] ofw_off,
  input  logic [LW-1:0] bsy_on,
  input  logic [LW-1:0] bsy_off,
  output logic       ofw,
  output logic       busy,
  output logic       full,
  output logic       overflow,
  output logic       ev_ofw_on,
  output logic       ev_ofw_off,
  output logic       ev_bsy_on,
  output logic       ev_bsy_off,
  output logic       ev_full_on,
  output logic       ev_full_off
);
  logic full_q;

  dcc_fifo #(.WIDTH($bits(l1a_entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clear, .push, .din, .pop, .dout, .empty, .full, .count(level)
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ofw <= 1'b0; busy <= 1'b0; full_q <= 1'b0; overflow <= 1'b0;
      {ev_ofw_on, ev_ofw_off, ev_bsy_on, ev_bsy_off, ev_full_on, ev_full_off} <= '0;
    end else begin
      ev_ofw_on   <= !ofw  && level >= ofw_on;
      ev_ofw_off  <=  ofw  && level <= ofw_off;
      ev_bsy_on   <= !busy && level >= bsy_on;
      ev_bsy_off  <=  busy && level <= bsy_off;
      ev_full_on  <= !full_q &&  full;
      ev_full_off <=  full_q && !full;
      if (!ofw && level >= ofw_on)        ofw  <= 1'b1;
      else if (ofw && level <= ofw_off)   ofw  <= 1'b0;
      if (!busy && level >= bsy_on)       busy <= 1'b1;
      else if (busy && level <= bsy_off)  busy <= 1'b0;
      full_q   <= full;
      overflow <= push && full && !pop;
    end
  end
endmodule
