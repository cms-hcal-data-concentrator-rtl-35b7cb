// dcc_ttc_bcast: decoder for the TTCrx broadcast commands.
//
// Each cycle with brcst_str high, brcst[7:0] is decoded into one-cycle
// command pulses. Bits 7..5 select the command and bit 3 qualifies it
// (bit 3 = 0 only for StatReq, which shares code 101 with Stop); bit 1 is
// EvtCntReset and bit 0 is BC0, both independent of the upper bits. The
// command table is the specification's. Three pieces of state follow from
// the commands: the run flag (Start sets it, Stop clears it), whose OR with
// the VME run bit gives run_enable; and daq_clear, which is held for
// CLEAR_CYCLES cycles after ReSync or HardReset so that every buffer on the
// DAQ path empties. The strobe input and the clear length are this design's
// own choices. All outputs are registered (one cycle after the strobe).
module dcc_ttc_bcast #(
  parameter int CLEAR_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] brcst,
  input  logic       brcst_str,
  input  logic       vme_run,
  output logic       orbit_reset,
  output logic       resync,
  output logic       hard_reset,
  output logic       start,
  output logic       stop,
  output logic       stat_req,
  output logic       calib_trig,
  output logic       evcnt_reset,
  output logic       bc0,
  output logic       run_enable,
  output logic       daq_clear
);
  logic       ttc_run;
  logic [$clog2(CLEAR_CYCLES+1)-1:0] clr_cnt;
  logic [2:0] cmd;
  logic       q;

  assign cmd = brcst[7:5];
  assign q   = brcst[3];

  always_ff @(posedge clk) begin
    if (rst) begin
      {orbit_reset, resync, hard_reset, start, stop, stat_req, calib_trig, evcnt_reset, bc0} <= '0;
    end else begin
      orbit_reset <= brcst_str && cmd == 3'b001 &&  q;
      resync      <= brcst_str && cmd == 3'b010 &&  q;
      hard_reset  <= brcst_str && cmd == 3'b011 &&  q;
      start       <= brcst_str && cmd == 3'b100 &&  q;
      stat_req    <= brcst_str && cmd == 3'b101 && !q;
      stop        <= brcst_str && cmd == 3'b101 &&  q;
      calib_trig  <= brcst_str && cmd == 3'b110 &&  q;
      evcnt_reset <= brcst_str && brcst[1];
      bc0         <= brcst_str && brcst[0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)        ttc_run <= 1'b0;
    else if (start) ttc_run <= 1'b1;
    else if (stop)  ttc_run <= 1'b0;
  end
  assign run_enable = ttc_run || vme_run;

  always_ff @(posedge clk) begin
    if (rst)                       clr_cnt <= '0;
    else if (resync || hard_reset) clr_cnt <= ($bits(clr_cnt))'(CLEAR_CYCLES);
    else if (clr_cnt != 0)         clr_cnt <= clr_cnt - 1'b1;
  end
  assign daq_clear = (clr_cnt != 0);
endmodule
