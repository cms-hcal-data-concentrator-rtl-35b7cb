// dcc_l1a_capture: builds one trigger entry per accepted L1A or calibration
// trigger.
//
// On the L1A clock the local BcN is latched; the TTCrx then drives the
// event number on its 12-bit BCnt bus, low half on the next clock and high
// half on the one after, and the entry {calib=0, EvN+1, BcN} is pushed two
// clocks after L1A (the TTCrx count is one behind the CMS event number).
// A CalibTrig broadcast pushes {calib=1, calibration EvN, BcN} at once and
// advances a separate calibration event number, which starts at 1 and is
// set back to 1 by calib_evn_reset. Triggers are taken only while
// run_enable is high; the trigger rules keep L1As three clocks apart, so
// the capture pipeline never overlaps. A calibration trigger that meets an
// L1A push waits one clock. The +1, the separate calibration number and
// the BCnt sequence follow the specification; the pipeline is this design's.
module dcc_l1a_capture
  import dcc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             run_enable,
  input  logic             l1a,
  input  logic [BCN_W-1:0] bcnt,        // TTCrx BCnt bus
  input  logic [BCN_W-1:0] local_bcn,
  input  logic             calib_trig,
  input  logic             calib_evn_reset,
  output logic             push,
  output l1a_entry_t       entry,
  output logic [EVN_W-1:0] calib_evn
);
  logic             st1, st2;        // pipeline: L1A seen 1 / 2 clocks ago
  logic [BCN_W-1:0] bcn_q;
  logic [11:0]      evn_lo;
  logic             cal_pend;
  logic [BCN_W-1:0] cal_bcn;
  logic             l1a_push;

  always_ff @(posedge clk) begin
    if (rst) begin
      st1 <= 1'b0; st2 <= 1'b0;
    end else begin
      st1 <= l1a && run_enable;
      st2 <= st1;
    end
  end

  always_ff @(posedge clk) begin
    if (l1a && run_enable) bcn_q  <= local_bcn;
    if (st1)               evn_lo <= bcnt;
  end

  assign l1a_push = st2;

  always_ff @(posedge clk) begin
    if (rst) begin
      cal_pend  <= 1'b0;
      calib_evn <= EVN_W'(1);
      cal_bcn   <= '0;
    end else begin
      if (calib_evn_reset) calib_evn <= EVN_W'(1);
      if (calib_trig && run_enable && !cal_pend) begin
        cal_bcn <= local_bcn;
        if (l1a_push) cal_pend <= 1'b1;
      end
      if (!l1a_push && ((calib_trig && run_enable) || cal_pend)) begin
        cal_pend <= 1'b0;
        if (!calib_evn_reset) calib_evn <= calib_evn + 1'b1;
      end
    end
  end

  always_comb begin
    push  = 1'b0;
    entry = '0;
    if (l1a_push) begin
      push      = 1'b1;
      entry.evn = {bcnt, evn_lo} + EVN_W'(1);
      entry.bcn = bcn_q;
    end else if (cal_pend) begin
      push        = 1'b1;
      entry.calib = 1'b1;
      entry.evn   = calib_evn;
      entry.bcn   = cal_bcn;
    end else if (calib_trig && run_enable) begin
      push        = 1'b1;
      entry.calib = 1'b1;
      entry.evn   = calib_evn;
      entry.bcn   = local_bcn;
    end
  end
endmodule
