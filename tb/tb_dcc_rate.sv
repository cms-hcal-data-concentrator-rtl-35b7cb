// tb_dcc_rate: the DCC at its default sizes under the expected trigger load.
//
// The L1A source runs at an average of 100 kHz (one L1A per 400 clocks of
// 40 MHz) but in bursts that sit right at the CMS trigger rules: L1As at
// 0, 3, 100 and 240 bunch crossings, then a pause of 1360 crossings, so that
// the minimum spacing (3 BX), two in 25 BX, three in 100 BX and four in
// 240 BX all occur. Every L1A is answered by all 15 HTR models, each one
// a fixed latency after the L1A, with one block; blocks queue behind each
// other in an HTR model when a burst arrives. The S-Link always accepts.
//
// Two phases: empty events (8 words per HTR, the size of the HTR empty-event
// format) and then events with 48 words per HTR. For every event the test
// checks the CDF header (EvN, BX), the 15 summary words (present, enabled,
// no EvN mismatch, word count), the HTR data word for word, the length and
// the CRC; it also checks that no trigger was lost, the TTS output never
// left Ready/Overflow Warning, no HTR timed out and the trigger FIFO stayed
// far from full. The average number of clocks the DCC spends per event in
// each phase and the highest trigger-FIFO level are printed.
module tb_dcc_rate;
  import dcc_pkg::*;
  import dcc_tb_pkg::*;

  localparam int PERIOD_BX   = 1600;                  // 4 L1As per period -> 400 clocks each
  localparam int BURST [4]   = '{0, 3, 100, 240};
  localparam int N_PER_PHASE = 80;
  localparam int HTR_LAT     = 40;                    // clocks from L1A to the first HTR word

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

  typedef logic [63:0] w64_q [$];

  // ---------------- reference per L1A ----------------
  typedef struct {
    logic [23:0] evn;
    logic [11:0] bcn;
    int          nwords;   // 16-bit words per HTR block
  } trig_t;
  trig_t trigs [$];
  int    nbody_now = 2;    // body words after the five header words
  logic  run = 0;          // trigger source on

  // blocks waiting in each HTR model: {start cycle, block}
  hblock_t hq    [N_HTR][$];
  longint  hq_at [N_HTR][$];
  longint  cyc = 0;

  // ---------------- TTC model: rule-limited bursts ----------------
  logic [23:0] ttc_count = 0;
  int          phase_bx  = 0;
  int          sent      = 0;
  int          seq       = 0;   // 0: idle, 1: EvN low due, 2: EvN high due
  always @(negedge clk) begin
    cyc++;
    ttc_l1a = 0;
    case (seq)
      1: begin ttc_bcnt = ttc_count[11:0];  seq = 2; end
      2: begin ttc_bcnt = ttc_count[23:12]; seq = 0; ttc_count++; end
      default: ttc_bcnt = 0;
    endcase
    if (run && !rst) begin
      if (phase_bx == BURST[0] || phase_bx == BURST[1] || phase_bx == BURST[2] || phase_bx == BURST[3]) begin
        trig_t t;
        hblock_t b;
        t.evn = ttc_count + 1;
        t.bcn = bcn;
        t.nwords = 6 + nbody_now;
        trigs.push_back(t);
        ttc_l1a = 1; ttc_bcnt = 12'hFFF; seq = 1;
        sent++;
        for (int i = 0; i < N_HTR; i++) begin
          b = make_block(t.evn, t.bcn, 15'h0, nbody_now, 8'h00, 8'(i));
          hq[i].push_back(b);
          hq_at[i].push_back(cyc + HTR_LAT);
        end
      end
      phase_bx = (phase_bx == PERIOD_BX - 1) ? 0 : phase_bx + 1;
    end
  end

  // ---------------- HTR models ----------------
  int hpos [N_HTR];
  always @(negedge clk) begin
    for (int i = 0; i < N_HTR; i++) begin
      htr_valid[i] = 0;
      if (hq[i].size() != 0 && cyc >= hq_at[i][0]) begin
        htr_valid[i] = 1;
        {htr_s[i], htr_data[i]} = hq[i][0][hpos[i]];
        hpos[i]++;
        if (hpos[i] == hq[i][0].size()) begin
          hpos[i] = 0;
          void'(hq[i].pop_front());
          void'(hq_at[i].pop_front());
        end
      end
    end
  end

  // ---------------- monitors ----------------
  int n_lost = 0, n_timeout = 0, n_bad_tts = 0, max_level = 0;
  always @(posedge clk) if (!rst) begin
    if (l1a_lost) n_lost++;
    if (eb_timeout) n_timeout++;
    if (tts != 4'b1000 && tts != 4'b0001) n_bad_tts++;
    if (int'(l1a_level) > max_level) max_level = int'(l1a_level);
  end

  // ---------------- S-Link capture and event check ----------------
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

  w64_q   cur;
  int     n_events = 0;
  longint last_eof = 0;
  longint span [2];
  int     span_n [2];

  task automatic check_event(input w64_q ev);
    trig_t t;
    logic [31:0] p [$];
    w64_q w;
    int wc32;
    if (trigs.size() == 0) begin check(0, "event with no L1A"); return; end
    t = trigs.pop_front();
    check(ev[0][63:60] == 4'h5 && ev[0][55:32] == t.evn && ev[0][31:20] == t.bcn,
          $sformatf("event %0d header %h (EvN %h BX %h)", n_events, ev[0], t.evn, t.bcn));
    for (int k = 1; k + 1 < ev.size(); k++) begin
      p.push_back(ev[k][31:0]);
      p.push_back(ev[k][63:32]);
    end
    wc32 = (t.nwords + 1) / 2;
    check(p.size() >= 20, "payload too short");
    if (p.size() < 20) return;
    check(p[1] == 32'h0, $sformatf("event %0d error summary %h", n_events, p[1]));
    for (int i = 0; i < N_HTR; i++)
      check(p[2+i][15:13] == 3'b011 && p[2+i][9:0] == 10'(t.nwords) && p[2+i][31:16] == 16'h0,
            $sformatf("event %0d HTR %0d summary %h", n_events, i, p[2+i]));
    check(p.size() == 20 + N_HTR * wc32 + ((N_HTR * wc32) % 2),
          $sformatf("event %0d payload %0d words", n_events, p.size()));
    check(ev[ev.size()-1][55:32] == 24'(ev.size()), $sformatf("event %0d length", n_events));
    w = ev;
    w[w.size()-1][31:16] = 16'h0;
    check(ev[ev.size()-1][31:16] == crc64(w), $sformatf("event %0d CRC", n_events));
    n_events++;
  endtask

  // HTR data is checked against what each HTR model put on its input
  logic [31:0] sent_words [N_HTR][$];
  logic [15:0] lo_half [N_HTR];
  logic        have_lo [N_HTR];
  always @(posedge clk) if (!rst)
    for (int i = 0; i < N_HTR; i++) if (htr_valid[i]) begin
      if (!have_lo[i]) begin lo_half[i] = htr_data[i]; have_lo[i] = 1; end
      else begin sent_words[i].push_back({htr_data[i], lo_half[i]}); have_lo[i] = 0; end
      if (htr_s[i] == 2'b01 && have_lo[i]) begin
        sent_words[i].push_back({16'h0, lo_half[i]}); have_lo[i] = 0;
      end
    end

  task automatic check_data(input w64_q ev, input int nwords);
    logic [31:0] p [$];
    int wc32, k;
    wc32 = (nwords + 1) / 2;
    for (int j = 1; j + 1 < ev.size(); j++) begin
      p.push_back(ev[j][31:0]);
      p.push_back(ev[j][63:32]);
    end
    k = 20;
    for (int i = 0; i < N_HTR; i++)
      for (int j = 0; j < wc32; j++) begin
        logic [31:0] e;
        e = sent_words[i].size() ? sent_words[i].pop_front() : 32'hDEADBEEF;
        if (j == 0 || j == wc32 - 1 || k % 5 == 0)
          check(k < p.size() && p[k] == e, $sformatf("event %0d HTR %0d word %0d", n_events, i, j));
        k++;
      end
  endtask

  int cur_phase = 0;
  always @(posedge clk) if (!rst && slink_valid && slink_ready) begin
    cur.push_back(slink_data);
    if (slink_k && slink_data[63:60] == 4'hA) begin
      int nw;
      nw = trigs.size() ? trigs[0].nwords : 0;
      check_data(cur, nw);
      check_event(cur);
      if (last_eof != 0) begin span[cur_phase] += cyc - last_eof; span_n[cur_phase]++; end
      last_eof = cyc;
      cur.delete();
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_HTR; i++) begin
      htr_valid[i] = 0; htr_s[i] = 0; htr_data[i] = 0; hpos[i] = 0; have_lo[i] = 0;
    end
    span = '{0, 0}; span_n = '{0, 0};
    for (int c = 0; c < N_HTR_ERR; c++) htr_err_ctrl[c] = '0;
    for (int j = 0; j < N_DCC_ERR; j++) dcc_err_ctrl[j] = '0;
    cfg = '0;
    cfg.slink_en = 1; cfg.htr_enable = '1; cfg.timeout = 16'd4000;
    cfg.source_id = 12'h2D4; cfg.fov = 4'h1; cfg.evt_ty = 4'h1; cfg.fmt_ver = 8'h05;
    cfg.ofw_on = 8'd16; cfg.ofw_off = 8'd8; cfg.bsy_on = 8'd32; cfg.bsy_off = 8'd16;
    cfg.bc0_delay = 4'd2; cfg.mon_prescale = 16'd0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    ttc_brcst = 8'b1000_1000; ttc_brcst_str = 1;    // Start
    @(negedge clk); ttc_brcst_str = 0;
    repeat (4) @(negedge clk);

    // phase 0: empty events, 8 words per HTR
    nbody_now = 2; cur_phase = 0; run = 1;
    while (sent < N_PER_PHASE) @(negedge clk);
    run = 0;
    while (n_events < sent) @(negedge clk);
    phase_bx = 0; last_eof = 0;

    // phase 1: 48 words per HTR
    nbody_now = 42; cur_phase = 1; run = 1;
    while (sent < 2 * N_PER_PHASE) @(negedge clk);
    run = 0;
    while (n_events < sent) @(negedge clk);
    repeat (20) @(negedge clk);

    check(n_events == 2 * N_PER_PHASE, $sformatf("%0d events of %0d", n_events, 2 * N_PER_PHASE));
    check(n_lost == 0, $sformatf("%0d triggers lost", n_lost));
    check(n_timeout == 0, $sformatf("%0d HTR timeouts", n_timeout));
    check(n_bad_tts == 0, $sformatf("%0d clocks outside Ready/Overflow Warning", n_bad_tts));
    check(max_level < 16, $sformatf("trigger FIFO reached %0d", max_level));
    for (int ph = 0; ph < 2; ph++)
      $display("phase %0d: %0d events, %0d clocks between event ends on average (L1A every 400)",
               ph, span_n[ph] + 1, span_n[ph] ? span[ph] / span_n[ph] : 0);
    $display("events=%0d lost=%0d timeouts=%0d max_fifo_level=%0d", n_events, n_lost, n_timeout, max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
