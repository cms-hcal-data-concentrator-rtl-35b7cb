// dcc_top: DAQ logic of the CMS HCAL Data Concentrator Card (DCC).
//
// For every level-1 accept (L1A) from the TTCrx, or every calibration
// trigger broadcast, the DCC collects the block that each of its 15 HTR
// inputs sends for that event, checks event and bunch numbers, and sends
// one event in the CMS Common Data Format on the 64-bit S-Link64 output
// (calibration events go only to the VME monitor buffer). It keeps the
// Trigger Throttling System (TTS) outputs up to date and counts every
// error condition.
//
// Data path: dcc_ttc_bcast decodes broadcasts; dcc_bx_counter keeps BcN
// and the orbit; dcc_l1a_capture turns each trigger into {calib, EvN, BcN}
// in dcc_l1a_fifo; each HTR link has a dcc_htr_rx and a dcc_htr_buffer;
// dcc_event_builder waits for the blocks (or the timeout) and produces the
// payload; dcc_cdf_framer adds header, trailer, length and CRC. Control:
// dcc_l1a_fifo thresholds and dcc_error_counters drive dcc_tts_fsm;
// dcc_monitor_buffer keeps calibration and prescaled events for VME;
// dcc_led_display drives the front panel. ReSync/HardReset clear the DAQ
// path (FIFOs, buffers, builder, framer, monitor) but no register.
//
// Interfaces: TTCrx (l1a, 12-bit BCnt bus, Brcst<7:0> with strobe),
// 15 HTR word streams (valid, S1S0, 16-bit data), S-Link64 (data, K, valid,
// ready; valid is held until ready), TTS (RDY,BSY,SYN,OFW), the LED serial
// line, and plain register ports standing for the VME/PCI registers.
// One clock domain, the 40 MHz LHC clock; rst is synchronous.
module dcc_top
  import dcc_pkg::*;
#(
  parameter int L1A_DEPTH  = 64,
  parameter int HTR_DEPTH  = 512,
  parameter int DESC_DEPTH = 16,
  parameter int MON_DEPTH  = 1024,
  parameter int MON_FREE   = 256,
  parameter int STRETCH    = 4_000_000,
  parameter int BLINK      = 8_000_000
) (
  input  logic             clk,
  input  logic             rst,
  // TTCrx
  input  logic             ttc_ready,
  input  logic             ttc_l1a,
  input  logic [11:0]      ttc_bcnt,
  input  logic [7:0]       ttc_brcst,
  input  logic             ttc_brcst_str,
  // HTR inputs
  input  logic             htr_valid [N_HTR],
  input  logic [1:0]       htr_s     [N_HTR],
  input  logic [15:0]      htr_data  [N_HTR],
  // S-Link64
  output logic [63:0]      slink_data,
  output logic             slink_k,
  output logic             slink_valid,
  input  logic             slink_ready,
  // TTS
  output logic [3:0]       tts,
  // front panel
  output logic             led_sclk,
  output logic             led_sdata,
  output logic             led_latch,
  // registers
  input  dcc_cfg_t         cfg,
  input  err_ctrl_t        htr_err_ctrl [N_HTR_ERR],
  input  err_ctrl_t        dcc_err_ctrl [N_DCC_ERR],
  input  logic             vme_act,
  input  logic             vme_calib_evn_reset,
  input  logic             vme_err_clear,
  input  logic [8:0]       vme_cnt_addr,
  output logic [7:0]       vme_cnt_data,
  output logic [31:0]      err_summary,
  input  logic             mon_rd,
  output logic [63:0]      mon_data,
  output logic             mon_k,
  output logic             mon_empty,
  output logic [15:0]      mon_captured,
  // status
  output logic [BCN_W-1:0] bcn,
  output logic [31:0]      orbit,
  output logic [EVN_W-1:0] calib_evn,
  output logic             stat_req,
  output logic             evcnt_reset,
  output logic             run_enable,
  output logic             daq_clear,
  output logic [23:0]      led,
  output logic [$clog2(L1A_DEPTH):0] l1a_level,
  output logic             l1a_full,
  output logic             l1a_lost,        // a trigger arrived with the FIFO full
  output logic             eb_timeout,    // pulse: an event was closed by the timeout
  output logic             eb_drop,       // pulse: a stale HTR block was dropped
  output logic [$clog2(MON_DEPTH):0] mon_count,
  output logic [15:0]      mon_dropped,
  output logic             mon_overrun
);
  localparam int LW = $clog2(L1A_DEPTH) + 1;

  // ---------------- TTC ----------------
  logic orbit_reset, calib_trig, bc0, bc0_err;

  dcc_ttc_bcast u_bcast (
    .clk, .rst, .brcst(ttc_brcst), .brcst_str(ttc_brcst_str), .vme_run(cfg.vme_run),
    .orbit_reset, .resync(), .hard_reset(), .start(), .stop(), .stat_req,
    .calib_trig, .evcnt_reset, .bc0, .run_enable, .daq_clear
  );

  dcc_bx_counter #(.ORBIT_W(32)) u_bx (
    .clk, .rst, .bc0, .bc0_delay(cfg.bc0_delay), .orbit_reset,
    .orbit_reset_val(cfg.orbit_reset_val), .bcn, .orbit, .bc0_err
  );

  logic       trig_push;
  l1a_entry_t trig_entry;

  dcc_l1a_capture u_cap (
    .clk, .rst, .run_enable, .l1a(ttc_l1a), .bcnt(ttc_bcnt), .local_bcn(bcn),
    .calib_trig, .calib_evn_reset(vme_calib_evn_reset), .push(trig_push),
    .entry(trig_entry), .calib_evn
  );

  // ---------------- trigger FIFO ----------------
  logic       l1a_pop, l1a_empty, l1a_ofw, l1a_busy, l1a_ovf;
  assign l1a_lost = l1a_ovf;
  l1a_entry_t l1a_head;
  logic ev_ofw_on, ev_ofw_off, ev_bsy_on, ev_bsy_off, ev_full_on, ev_full_off;

  dcc_l1a_fifo #(.DEPTH(L1A_DEPTH)) u_l1a_fifo (
    .clk, .rst, .clear(daq_clear), .push(trig_push), .din(trig_entry), .pop(l1a_pop),
    .dout(l1a_head), .empty(l1a_empty), .level(l1a_level),
    .ofw_on(LW'(cfg.ofw_on)), .ofw_off(LW'(cfg.ofw_off)),
    .bsy_on(LW'(cfg.bsy_on)), .bsy_off(LW'(cfg.bsy_off)),
    .ofw(l1a_ofw), .busy(l1a_busy), .full(l1a_full), .overflow(l1a_ovf),
    .ev_ofw_on, .ev_ofw_off, .ev_bsy_on, .ev_bsy_off, .ev_full_on, .ev_full_off
  );

  // ---------------- HTR inputs ----------------
  logic [N_HTR-1:0] desc_valid, rd_en, desc_pop, drop, blk_seen;
  htr_desc_t        desc [N_HTR];
  logic [31:0]      rd_data [N_HTR];

  for (genvar i = 0; i < N_HTR; i++) begin : g_htr
    logic        wr_en, buf_full, dpush, free1, free2;
    logic [31:0] wr_data;
    htr_desc_t   din;

    dcc_htr_rx u_rx (
      .clk, .rst, .clear(daq_clear), .in_valid(htr_valid[i]), .in_s(htr_s[i]),
      .in_data(htr_data[i]), .wr_en, .wr_data, .buf_full, .desc_push(dpush), .desc(din),
      .desc_free1(free1), .desc_free2(free2), .block_seen(blk_seen[i])
    );

    dcc_htr_buffer #(.DEPTH(HTR_DEPTH), .DESC_DEPTH(DESC_DEPTH)) u_buf (
      .clk, .rst, .clear(daq_clear), .wr_en, .wr_data, .full(buf_full),
      .desc_push(dpush), .desc_in(din), .desc_free1(free1), .desc_free2(free2),
      .desc_valid(desc_valid[i]), .desc(desc[i]), .rd_data(rd_data[i]),
      .rd_en(rd_en[i]), .desc_pop(desc_pop[i]), .drop(drop[i])
    );
  end

  // ---------------- event building ----------------
  logic                 fr_busy, eb_start, p_valid, p_last, p_ready;
  l1a_entry_t           eb_ev;
  logic [31:0]          p_data;
  logic [N_HTR_ERR-1:0] htr_err [N_HTR];
  logic [N_DCC_ERR-1:0] eb_dcc_err, dcc_err;

  dcc_event_builder #(.TIMEOUT_W(16)) u_eb (
    .clk, .rst, .clear(daq_clear), .htr_enable(cfg.htr_enable), .timeout(cfg.timeout),
    .fmt_ver(cfg.fmt_ver), .err_summary, .l1a_empty, .l1a_head, .l1a_pop,
    .desc_valid, .desc, .rd_data, .rd_en, .desc_pop, .drop,
    .framer_busy(fr_busy), .start(eb_start), .ev(eb_ev), .p_valid, .p_data, .p_last, .p_ready,
    .htr_err, .dcc_err(eb_dcc_err), .timed_out(eb_timeout), .dropped_any(eb_drop)
  );

  logic        fo_valid, fo_k, fo_sof, fo_eof, fo_calib, fo_ready;
  logic [63:0] fo_data;

  dcc_cdf_framer u_framer (
    .clk, .rst, .clear(daq_clear), .start(eb_start), .ev(eb_ev), .evt_ty(cfg.evt_ty),
    .source_id(cfg.source_id), .fov(cfg.fov), .evt_stat(cfg.evt_stat), .tts,
    .in_valid(p_valid), .in_data(p_data), .in_last(p_last), .in_ready(p_ready),
    .out_valid(fo_valid), .out_data(fo_data), .out_k(fo_k), .out_sof(fo_sof),
    .out_eof(fo_eof), .out_calib(fo_calib), .out_ready(fo_ready), .busy(fr_busy)
  );

  // calibration events and events with S-Link disabled bypass the link
  logic to_link;
  assign to_link     = cfg.slink_en && !fo_calib;
  assign slink_valid = fo_valid && to_link;
  assign slink_data  = fo_data;
  assign slink_k     = fo_k;
  assign fo_ready    = to_link ? slink_ready : 1'b1;


  dcc_monitor_buffer #(.DEPTH(MON_DEPTH), .MIN_FREE(MON_FREE)) u_mon (
    .clk, .rst, .clear(daq_clear), .prescale(cfg.mon_prescale),
    .tap_valid(fo_valid && fo_ready), .tap_data(fo_data), .tap_k(fo_k), .tap_sof(fo_sof),
    .tap_eof(fo_eof), .tap_calib(fo_calib), .rd_en(mon_rd), .rd_data(mon_data), .rd_k(mon_k),
    .empty(mon_empty), .count(mon_count), .n_captured(mon_captured), .n_dropped(mon_dropped),
    .overrun(mon_overrun)
  );

  // ---------------- errors and TTS ----------------
  always_comb begin
    dcc_err = eb_dcc_err;
    dcc_err[DERR_OFW_ON]  = ev_ofw_on;
    dcc_err[DERR_OFW_OFF] = ev_ofw_off;
    dcc_err[DERR_BSY_ON]  = ev_bsy_on;
    dcc_err[DERR_BSY_OFF] = ev_bsy_off;
    dcc_err[DERR_FULL_ON] = ev_full_on;
    dcc_err[DERR_FULL_OFF]= ev_full_off;
    dcc_err[DERR_BCN_BC0] = bc0_err;
  end

  logic       tts_req;
  logic [3:0] tts_req_state;
  tts_e       tts_state;

  dcc_error_counters #(.CNT_W(8)) u_err (
    .clk, .rst, .clear_all(vme_err_clear), .htr_err, .dcc_err, .htr_ctrl(htr_err_ctrl),
    .dcc_ctrl(dcc_err_ctrl), .rd_addr(vme_cnt_addr), .rd_data(vme_cnt_data), .err_summary,
    .tts_req, .tts_req_state
  );

  dcc_tts_fsm u_tts (
    .clk, .rst, .daq_clear, .ofw(l1a_ofw), .busy(l1a_busy), .overflow(l1a_ovf),
    .tts_req, .tts_req_state, .state(tts_state), .tts
  );

  // ---------------- front panel ----------------
  logic [N_HTR-1:0] htr_err_any;
  always_comb for (int i = 0; i < N_HTR; i++) htr_err_any[i] = |htr_err[i][7:0];

  dcc_led_display #(.STRETCH(STRETCH), .BLINK(BLINK), .SCLK_DIV(3)) u_led (
    .clk, .rst, .vme_act, .ttc_ready, .ttc_err(bc0_err), .l1a(trig_push && !trig_entry.calib),
    .daq_en(cfg.slink_en), .daq_word(slink_valid && slink_ready),
    .daq_err(tts_state == TTS_SYN || tts_state == TTS_ERR),
    .dcc_en(run_enable), .dcc_err(err_summary != '0), .tts, .htr_en(cfg.htr_enable),
    .htr_data(blk_seen), .htr_err(htr_err_any), .led, .led_sclk, .led_sdata, .led_latch
  );

  a_no_l1a_with_calib: assert property (@(posedge clk) disable iff (rst) !(ttc_l1a && calib_trig))
    else $error("dcc_top: L1A and CalibTrig together");
endmodule
