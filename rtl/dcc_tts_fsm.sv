// dcc_tts_fsm: the Trigger Throttling System (TTS) state machine.
//
// States and their output values (bit order RDY,BSY,SYN,OFW) are those of
// the CMS DAQ/front-end convention: Ready 1000, Overflow Warning 0001,
// Busy 0100, Out of Sync 0010, Error 1100, Disconnected 0000. The
// throttling path follows the trigger FIFO flags: Ready goes to Overflow
// Warning when ofw is set ("FIFOs almost full"), Overflow Warning to Busy
// when busy is set ("FIFOs full"), Busy back to Overflow Warning and
// Overflow Warning back to Ready as the flags clear ("L1A rate reduced").
// A lost trigger (FIFO overflow) sends any state to Out of Sync. An error
// whose control register asks for it (tts_req) forces the requested state;
// a value that is not one of the six states is taken as Error. A forced
// state, Out of Sync, Error and Disconnected hold until the DAQ path is
// cleared (ReSync/HardReset, the "Repair"/"Reconnect" path back to Ready);
// only a lost trigger still moves a forced state to Out of Sync. While
// daq_clear is high the output is Busy and afterwards it returns to Ready.
// The output is registered; tts is updated every clock. The states,
// encodings and throttling transitions follow the specification; the
// overflow edge from every state (not only Busy), the stickiness and the
// forced-state mechanism's priority are this design's.
module dcc_tts_fsm
  import dcc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       daq_clear,
  input  logic       ofw,
  input  logic       busy,
  input  logic       overflow,
  input  logic       tts_req,
  input  logic [3:0] tts_req_state,
  output tts_e       state,
  output logic [3:0] tts
);
  tts_e nxt, req;
  logic forced, clr_q;

  always_comb begin
    case (tts_req_state)
      4'b0000, 4'b1111: req = TTS_DISCONNECTED;
      4'b0001:          req = TTS_OFW;
      4'b0010:          req = TTS_SYN;
      4'b0100:          req = TTS_BSY;
      4'b1000:          req = TTS_RDY;
      default:          req = TTS_ERR;
    endcase
  end

  always_comb begin
    nxt = state;
    if (daq_clear) begin
      nxt = TTS_BSY;
    end else if (clr_q) begin
      nxt = TTS_RDY;            // clear finished
    end else begin
      if (!forced) begin
        case (state)
          TTS_RDY: if (ofw || busy) nxt = TTS_OFW;
          TTS_OFW: if (busy) nxt = TTS_BSY; else if (!ofw) nxt = TTS_RDY;
          TTS_BSY: if (!busy) nxt = TTS_OFW;
          default: nxt = state;   // SYN, ERR, DISCONNECTED hold
        endcase
        if (tts_req && state != TTS_SYN && state != TTS_ERR && state != TTS_DISCONNECTED)
          nxt = req;
      end
      if (overflow && state != TTS_ERR && state != TTS_DISCONNECTED) nxt = TTS_SYN;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= TTS_RDY;
      forced <= 1'b0;
      clr_q  <= 1'b0;
    end else begin
      state <= nxt;
      clr_q <= daq_clear;
      if (daq_clear || clr_q) forced <= 1'b0;
      else if (tts_req && !forced && state != TTS_SYN && state != TTS_ERR
               && state != TTS_DISCONNECTED) forced <= 1'b1;
    end
  end
  assign tts = state;
endmodule
