// tb_dcc_top: end-to-end test of the DCC at its default sizes.
//
// A TTCrx model drives L1As (with the bunch count / EvN low / EvN high
// sequence on BCnt) and broadcast commands; 15 HTR models send one block
// each per event in the HTR format. Every event leaving on S-Link64 is
// compared word for word with a reference built here (CDF header, DCC
// header, HTR summaries, HTR data, trailer length and CRC; the error
// summary word and the TTS field are taken from the received event). The
// run makes each mechanism happen and counts it: normal events, S-Link
// back-pressure stalls, the HTR timeout, a stale HTR block dropped,
// a calibration event to the monitor buffer only, prescaled monitor
// capture, TTS Overflow Warning and Busy as the trigger FIFO fills, lost
// triggers and Out of Sync, ReSync clearing the DAQ path, an error-forced
// TTS state repaired by HardReset, a misplaced BC0, Stop, error counter
// read-back and LED serial frames. A mechanism never seen is a failure.
module tb_dcc_top;
  import dcc_pkg::*;
  import dcc_tb_pkg::*;

  logic clk = 0, rst = 1;
  logic ttc_ready = 1, ttc_l1a = 0, ttc_brcst_str = 0;
  logic [11:0] ttc_bcnt = 0;
  logic [7:0]  ttc_brcst = 0;
  logic        htr_valid [N_HTR];
  logic [1:0]  htr_s     [N_HTR];
  logic [15:0] htr_data  [N_HTR];
  logic [63:0] slink_data;
  logic slink_k, slink_valid, slink_ready = 1;
  logic [3:0] tts;
  logic led_sclk, led_sdata, led_latch;
  dcc_cfg_t cfg;
  err_ctrl_t htr_err_ctrl [N_HTR_ERR];
  err_ctrl_t dcc_err_ctrl [N_DCC_ERR];
  logic vme_act = 0, vme_calib_evn_reset = 0, vme_err_clear = 0, mon_rd = 0;
  logic [8:0] vme_cnt_addr = 0;
  logic [7:0] vme_cnt_data;
  logic [31:0] err_summary;
  logic [63:0] mon_data;
  logic mon_k, mon_empty;
  logic [15:0] mon_captured;
  logic [11:0] bcn;
  logic [31:0] orbit;
  logic [23:0] calib_evn;
  logic stat_req, evcnt_reset, run_enable, daq_clear;
  logic [23:0] led;
  logic [6:0] l1a_level;
  logic l1a_full, l1a_lost, eb_timeout, eb_drop;
  logic [10:0] mon_count;
  logic [15:0] mon_dropped;
  logic mon_overrun;

  dcc_top dut (.*);
  always #12.5 clk = !clk;   // 40 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_events, n_stall, n_timeout, n_drop, n_calib, n_mon, n_ofw, n_bsy, n_syn, n_lost,
      n_clear, n_forced, n_bc0err, n_stop, n_frames, n_cnt_read;
  logic [3:0] tts_q;
  always @(posedge clk) if (!rst) begin
    if (slink_valid && !slink_ready) n_stall++;
    if (eb_timeout) n_timeout++;
    if (eb_drop) n_drop++;
    if (tts != tts_q && tts == 4'b0001) n_ofw++;
    if (tts != tts_q && tts == 4'b0100 && !daq_clear) n_bsy++;
    if (tts != tts_q && tts == 4'b0010) n_syn++;
    if (l1a_lost) n_lost++;
    if (led_latch) n_frames++;
    tts_q <= tts;
  end

  // ---------------- S-Link capture ----------------
  logic [63:0] cur [$];
  typedef logic [63:0] w64_q [$];
  w64_q events [$];
  always @(posedge clk) if (!rst && slink_valid && slink_ready) begin
    cur.push_back(slink_data);
    if (slink_k && slink_data[63:60] == 4'hA) begin events.push_back(cur); cur.delete(); end
  end
  always @(negedge clk) slink_ready = stall_mode ? 1'b0 : (($urandom % 5) != 0);
  bit stall_mode = 0;

  // ---------------- TTC model ----------------
  logic [23:0] ttc_count = 0;   // TTCrx event counter (one behind the DCC EvN)

  task automatic brcst(input logic [7:0] b);
    @(negedge clk); ttc_brcst = b; ttc_brcst_str = 1;
    @(negedge clk); ttc_brcst_str = 0;
  endtask

  // L1A; returns the DCC EvN and the BcN the DCC will record
  task automatic l1a(output logic [23:0] evn, output logic [11:0] b);
    @(negedge clk);
    ttc_l1a = 1; ttc_bcnt = 12'hFFF; b = bcn;
    evn = ttc_count + 1;
    @(negedge clk); ttc_l1a = 0; ttc_bcnt = ttc_count[11:0];
    @(negedge clk); ttc_bcnt = ttc_count[23:12];
    @(negedge clk); ttc_bcnt = 0;
    ttc_count++;
  endtask

  // ---------------- HTR models ----------------
  task automatic htr_send(input int i, input hblock_t b, input int delay);
    repeat (delay) @(negedge clk);
    foreach (b[k]) begin
      @(negedge clk); htr_valid[i] = 1; {htr_s[i], htr_data[i]} = b[k];
    end
    @(negedge clk); htr_valid[i] = 0;
  endtask

  // ---------------- reference event ----------------
  function automatic logic [15:0] crc64(input w64_q w);
    logic [15:0] c;
    c = 16'hFFFF;
    foreach (w[k])
      for (int b = 63; b >= 0; b--) begin
        logic top;
        top = c[15];
        c = {c[14:0], 1'b0};
        if (top ^ w[k][b]) c = c ^ 16'h8005;
      end
    return c;
  endfunction

  hblock_t blk [N_HTR];
  int      ndone;

  // pres: HTRs whose block belongs to the event; emis: E bits
  function automatic w64_q expected(input logic [23:0] evn, input logic [11:0] b,
                                    input logic [N_HTR-1:0] pres, input logic [N_HTR-1:0] emis,
                                    input w64_q got);
    logic [31:0] p [$];
    logic [N_HTR-1:0] hstat;
    w64_q e;
    logic [7:0] lrb [N_HTR];
    logic [14:0] st [N_HTR];
    for (int i = 0; i < N_HTR; i++) begin
      lrb[i] = pres[i] ? (blk[i][blk[i].size()-1][7:0] | ((blk[i].size() % 2 == 1) ? 8'h80 : 8'h00)) : 8'h00;
      st[i]  = pres[i] ? blk[i][2][14:0] : 15'h0;
      hstat[i] = cfg.htr_enable[i] && (!pres[i] || emis[i] || |st[i][7:0] || |lrb[i]);
    end
    p.push_back({3'b000, hstat, 6'b0, cfg.fmt_ver});
    p.push_back(got.size() > 1 ? got[1][63:32] : 32'h0);   // error summary: as received
    for (int i = 0; i < N_HTR; i++)
      p.push_back({st[i][7:0], lrb[i], emis[i], pres[i], cfg.htr_enable[i], 3'b000,
                   pres[i] ? 10'(blk[i].size()) : 10'h0});
    repeat (3) p.push_back(32'h0);
    for (int i = 0; i < N_HTR; i++) if (pres[i]) begin
      w32_q w;
      w = pack_block(blk[i]);
      foreach (w[k]) p.push_back(w[k]);
    end
    e.push_back({4'h5, cfg.evt_ty, evn, b, cfg.source_id, cfg.fov, 4'b0000});
    for (int k = 0; k < p.size(); k += 2)
      e.push_back({(k + 1 < p.size()) ? p[k+1] : 32'h0, p[k]});
    e.push_back({4'hA, 4'h0, 24'(e.size() + 1), 16'h0, 4'h0, cfg.evt_stat,
                 got.size() ? got[got.size()-1][7:4] : 4'h0, 4'b0000});
    e[e.size()-1][31:16] = crc64(e);
    return e;
  endfunction

  task automatic compare(input w64_q got, input w64_q e, input string name);
    check(got.size() == e.size(), $sformatf("%s: %0d words exp %0d", name, got.size(), e.size()));
    foreach (e[k]) if (k < got.size())
      check(got[k] == e[k], $sformatf("%s: word %0d got %h exp %h", name, k, got[k], e[k]));
  endtask

  // one complete event: L1A, blocks from the HTRs in `send`, compare
  task automatic run_event(input logic [N_HTR-1:0] send, input logic [14:0] st_bits,
                           input int stale_htr, input string name);
    logic [23:0] evn;
    logic [11:0] b;
    w64_q got;
    int n0;
    n0 = events.size();
    l1a(evn, b);
    for (int i = 0; i < N_HTR; i++)
      blk[i] = make_block(evn, b, (i == 4) ? st_bits : 15'h0, (i * 7 + 3) % 23, (i == 2) ? 8'h01 : 8'h00, 8'(i));
    ndone = 0;
    for (int i = 0; i < N_HTR; i++) begin
      automatic int ii = i;
      fork
        begin
          if (ii == stale_htr) htr_send(ii, make_block(evn - 1, b, 15'h0, 3, 8'h0, 8'(ii)), 2);
          if (send[ii]) htr_send(ii, blk[ii], 5 + ii);
          ndone++;
        end
      join_none
    end
    while (ndone < N_HTR) @(negedge clk);
    while (events.size() == n0) @(negedge clk);
    got = events[n0];
    compare(got, expected(evn, b, send, (stale_htr >= 0) ? N_HTR'(1) << stale_htr : '0, got), name);
    n_events++;
  endtask

  task automatic read_cnt(input logic [8:0] a, output logic [7:0] d);
    @(negedge clk); vme_cnt_addr = a; vme_act = 1;
    @(negedge clk); d = vme_cnt_data; vme_act = 0;
    n_cnt_read++;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    logic [23:0] evn;
    logic [11:0] b;
    {n_events, n_stall, n_timeout, n_drop, n_calib, n_mon, n_ofw, n_bsy, n_syn, n_lost,
     n_clear, n_forced, n_bc0err, n_stop, n_frames, n_cnt_read} = '0;
    tts_q = 4'b1000;
    for (int i = 0; i < N_HTR; i++) begin htr_valid[i] = 0; htr_s[i] = 0; htr_data[i] = 0; end
    for (int c = 0; c < N_HTR_ERR; c++) htr_err_ctrl[c] = '0;
    for (int j = 0; j < N_DCC_ERR; j++) dcc_err_ctrl[j] = '0;
    cfg = '0;
    cfg.slink_en = 1; cfg.htr_enable = '1; cfg.timeout = 16'd4000;
    cfg.source_id = 12'h2D4; cfg.fov = 4'h1; cfg.evt_ty = 4'h1; cfg.evt_stat = 4'h0; cfg.fmt_ver = 8'h05;
    cfg.ofw_on = 8'd16; cfg.ofw_off = 8'd8; cfg.bsy_on = 8'd32; cfg.bsy_off = 8'd16;
    cfg.bc0_delay = 4'd2; cfg.orbit_reset_val = 4'd1; cfg.mon_prescale = 16'd3;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // L1A before Start is ignored
    l1a(evn, b);
    repeat (10) @(negedge clk);
    check((l1a_level == 0), "L1A ignored before Start");
    ttc_count = 0;
    brcst(8'b0000_0010);                // EvtCntReset (TTCrx resets its own counter)
    brcst(8'b1000_1000);                // Start
    repeat (2) @(negedge clk);
    check(run_enable, "running after Start");

    // normal events, with S-Link back-pressure
    run_event('1, 15'h0000, -1, "event 1");
    run_event('1, 15'h0081, -1, "event 2 (OW and CK status bits)");
    run_event('1, 15'h0000, -1, "event 3");
    // timeout: HTR 6 silent
    run_event(~15'(1 << 6), 15'h0000, -1, "event 4 (HTR 6 timeout)");
    // stale block on HTR 9
    run_event('1, 15'h0000, 9, "event 5 (stale block on HTR 9)");
    run_event('1, 15'h0000, -1, "event 6");
    check(mon_captured >= 2, $sformatf("prescaled monitor capture (%0d)", mon_captured));
    n_mon = mon_captured;

    // error counters: HTR 4 counter 0 (OW) and 7 (CK) once, DCC EvN mismatch once
    read_cnt(9'(4 * 15 + 0), d); check(d == 1, $sformatf("HTR 4 OW counter %0d", d));
    read_cnt(9'(4 * 15 + 7), d); check(d == 1, $sformatf("HTR 4 CK counter %0d", d));
    read_cnt(9'h1C0 + 9'(DERR_EVN_L1A), d); check(d == 1, $sformatf("EvN mismatch counter %0d", d));
    check(err_summary[0] && err_summary[7] && err_summary[16 + DERR_EVN_L1A], "error summary bits");

    // calibration trigger: monitor buffer only
    while (!mon_empty) begin mon_rd = 1; @(negedge clk); mon_rd = 0; @(negedge clk); end
    begin
      int n0, nmon0;
      logic [11:0] cb;
      n0 = events.size();
      nmon0 = mon_captured;
      cb = bcn;
      brcst(8'b1100_1000);              // CalibTrig
      for (int i = 0; i < N_HTR; i++) blk[i] = make_block(24'd1, cb, 15'h1000, 2, 8'h0, 8'(i));
      ndone = 0;
      for (int i = 0; i < N_HTR; i++) begin
        automatic int ii = i;
        fork begin htr_send(ii, blk[ii], 3); ndone++; end join_none
      end
      while (ndone < N_HTR) @(negedge clk);
      while (mon_captured == nmon0) @(negedge clk);
      repeat (100) @(negedge clk);
      check(events.size() == n0, "calibration event not on S-Link");
      check(!mon_empty && mon_k && mon_data[63:60] == 4'h5 && mon_data[55:32] == 24'd1,
            $sformatf("calibration event in monitor buffer (%h)", mon_data));
      check(calib_evn == 24'd2, "calibration EvN advanced");
      n_calib++;
      while (!mon_empty) begin mon_rd = 1; @(negedge clk); mon_rd = 0; @(negedge clk); end
    end

    // misplaced BC0
    brcst(8'b0000_0001);
    repeat (8) @(negedge clk);
    read_cnt(9'h1C0 + 9'(DERR_BCN_BC0), d);
    n_bc0err = d;
    check(d >= 1, "BC0 error counted");

    // fill the trigger FIFO with S-Link stalled: OFW, Busy, lost triggers, Out of Sync
    stall_mode = 1;
    for (int k = 0; k < 70; k++) l1a(evn, b);
    repeat (5) @(negedge clk);
    check(tts == 4'b0010, $sformatf("Out of Sync after lost triggers (tts=%b)", tts));
    // ReSync clears the DAQ path
    brcst(8'b0100_1000);
    while (!daq_clear) @(negedge clk);
    @(negedge clk);
    check(tts == 4'b0100, "Busy during ReSync");
    while (daq_clear) @(negedge clk);
    repeat (3) @(negedge clk);
    check(tts == 4'b1000 && (l1a_level == 0), "Ready and empty after ReSync");
    n_clear++;
    stall_mode = 0;
    while (cur.size() != 0) cur.delete();

    // error-forced TTS state: CK bit forces Error; HardReset repairs
    htr_err_ctrl[7] = '{change_tts: 1, new_tts: 4'b1100};
    run_event('1, 15'h0080, -1, "event with forced Error");
    check(tts == 4'b1100, "TTS Error forced by CK");
    if (tts == 4'b1100) n_forced++;
    brcst(8'b0110_1000);                // HardReset
    while (!daq_clear) @(negedge clk);
    while (daq_clear) @(negedge clk);
    repeat (3) @(negedge clk);
    check(tts == 4'b1000, $sformatf("Ready after HardReset (tts=%b)", tts));
    htr_err_ctrl[7] = '0;
    run_event('1, 15'h0000, -1, "event after HardReset");

    // Stop: triggers ignored
    brcst(8'b1010_1000);
    l1a(evn, b);
    repeat (10) @(negedge clk);
    check((l1a_level == 0) && !run_enable, "L1A ignored after Stop");
    n_stop++;

    // mechanisms
    check(n_events >= 8, $sformatf("events %0d", n_events));
    check(n_stall > 0, "S-Link back-pressure seen");
    check(n_timeout > 0, "timeout seen");
    check(n_drop > 0, "stale block drop seen");
    check(n_calib > 0, "calibration event seen");
    check(n_mon > 0, "monitor prescale capture seen");
    check(n_ofw > 0, "Overflow Warning seen");
    check(n_bsy > 0, "Busy seen");
    check(n_lost > 0 && n_syn > 0, "lost trigger / Out of Sync seen");
    check(n_clear > 0, "ReSync clear seen");
    check(n_forced > 0, "forced TTS state seen");
    check(n_bc0err > 0, "BC0 error seen");
    check(n_frames > 0, "LED frames seen");
    $display("mechanisms: events=%0d stall=%0d timeout=%0d drop=%0d calib=%0d mon=%0d ofw=%0d bsy=%0d syn=%0d lost=%0d clear=%0d forced=%0d bc0err=%0d stop=%0d frames=%0d cntreads=%0d",
             n_events, n_stall, n_timeout, n_drop, n_calib, n_mon, n_ofw, n_bsy, n_syn, n_lost,
             n_clear, n_forced, n_bc0err, n_stop, n_frames, n_cnt_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
