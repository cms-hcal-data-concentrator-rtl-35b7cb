// tb_dcc_event_builder: the event builder with 15 real HTR input buffers
// that the testbench loads directly. For each trigger the testbench
// computes the expected payload (DCC header words, 15 summary words,
// three zero words, the HTR data) and compares it word by word, with
// random back-pressure on the payload stream. Cases: all HTRs present; a
// stale block that must be dropped; a missing HTR that ends the wait by
// the timeout (the wait must last `timeout` clocks); a block with a newer
// event number that must wait for its own event; a BcN mis-match; a
// disabled HTR; a calibration trigger. The error pulses are checked too.
module tb_dcc_event_builder;
  import dcc_pkg::*;
  import dcc_tb_pkg::*;
  localparam int TMO = 200;
  logic clk = 0, rst = 1, clear = 0;
  logic [N_HTR-1:0] htr_enable = '1;
  logic [15:0] timeout = 16'(TMO);
  logic [7:0] fmt_ver = 8'h2A;
  logic [31:0] err_summary = 32'hCAFE0001;
  logic l1a_empty, l1a_pop;
  l1a_entry_t l1a_head;
  logic [N_HTR-1:0] desc_valid, rd_en, desc_pop, drop;
  htr_desc_t desc [N_HTR];
  logic [31:0] rd_data [N_HTR];
  logic framer_busy = 0, start, p_valid, p_last, p_ready = 1, timed_out, dropped_any;
  l1a_entry_t ev;
  logic [31:0] p_data;
  logic [N_HTR_ERR-1:0] htr_err [N_HTR];
  logic [N_DCC_ERR-1:0] dcc_err;
  int checks = 0, failures = 0;

  // buffer write side driven by the testbench
  logic        b_wr   [N_HTR];
  logic [31:0] b_data [N_HTR];
  logic        b_dpush[N_HTR];
  htr_desc_t   b_desc [N_HTR];

  for (genvar i = 0; i < N_HTR; i++) begin : g_buf
    logic unused_full, unused_f1, unused_f2;
    dcc_htr_buffer #(.DEPTH(64), .DESC_DEPTH(4)) u_buf (
      .clk, .rst, .clear, .wr_en(b_wr[i]), .wr_data(b_data[i]), .full(unused_full),
      .desc_push(b_dpush[i]), .desc_in(b_desc[i]), .desc_free1(unused_f1), .desc_free2(unused_f2),
      .desc_valid(desc_valid[i]), .desc(desc[i]), .rd_data(rd_data[i]),
      .rd_en(rd_en[i]), .desc_pop(desc_pop[i]), .drop(drop[i])
    );
  end

  // trigger FIFO
  logic       t_push = 0;
  l1a_entry_t t_din = '0;
  logic       unused_tfull;
  logic [3:0] unused_tcount;
  dcc_fifo #(.WIDTH($bits(l1a_entry_t)), .DEPTH(8)) u_trig (
    .clk, .rst, .clear, .push(t_push), .din(t_din), .pop(l1a_pop), .dout(l1a_head),
    .empty(l1a_empty), .full(unused_tfull), .count(unused_tcount)
  );

  dcc_event_builder dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // payload capture, trigger FIFO pops, error pulse accumulation
  logic [31:0] got [$];
  int          got_last;
  logic [N_DCC_ERR-1:0] derr_acc;
  logic [N_HTR_ERR-1:0] herr_acc [N_HTR];
  int t_pop, t_start;
  always @(posedge clk) if (!rst) begin
    if (p_valid && p_ready) begin got.push_back(p_data); if (p_last) got_last++; end
    if (l1a_pop) t_pop = $time / 10;
    if (start) t_start = $time / 10;
    derr_acc = derr_acc | dcc_err;
    for (int i = 0; i < N_HTR; i++) herr_acc[i] = herr_acc[i] | htr_err[i];
  end
  always @(negedge clk) p_ready = ($urandom % 4) != 0;

  // expected block contents per HTR for the next event
  w32_q      exp_data [N_HTR];
  htr_desc_t exp_desc [N_HTR];
  w32_q      later_data [N_HTR];   // blocks loaded for a later event
  htr_desc_t later_desc [N_HTR];

  task automatic load(input int i, input logic [23:0] evn, input logic [11:0] bcn,
                      input logic [14:0] st, input int nbody, input logic [7:0] lrb,
                      input bit expected);
    hblock_t b;
    w32_q    w;
    b = make_block(evn, bcn, st, nbody, lrb, 8'(i));
    w = pack_block(b);
    foreach (w[k]) begin
      @(negedge clk); b_wr[i] = 1; b_data[i] = w[k];
    end
    @(negedge clk); b_wr[i] = 0;
    b_dpush[i] = 1;
    b_desc[i] = '{evn: evn, bcn: bcn, evt_status: st, lrb_err: lrb, wc16: 10'(b.size()), wc32: 10'(w.size())};
    if (expected) begin exp_data[i] = w; exp_desc[i] = b_desc[i]; end
    else          begin later_data[i] = w; later_desc[i] = b_desc[i]; end
    @(negedge clk); b_dpush[i] = 0;
  endtask

  // run one trigger and compare the payload; P/E expectations per HTR
  task automatic run_event(input l1a_entry_t t, input logic [N_HTR-1:0] pres,
                           input logic [N_HTR-1:0] emis, input string name);
    w32_q exp;
    logic [N_HTR-1:0] hstat;
    got.delete(); got_last = 0; derr_acc = '0;
    for (int i = 0; i < N_HTR; i++) herr_acc[i] = '0;
    for (int i = 0; i < N_HTR; i++)
      hstat[i] = htr_enable[i] && (!pres[i] || emis[i] ||
                 (pres[i] && (|exp_desc[i].evt_status[7:0] || |exp_desc[i].lrb_err)));
    exp.push_back({3'b000, hstat, 6'b0, fmt_ver});
    exp.push_back(err_summary);
    for (int i = 0; i < N_HTR; i++)
      if (pres[i]) exp.push_back({exp_desc[i].evt_status[7:0], exp_desc[i].lrb_err, emis[i], 1'b1,
                                  htr_enable[i], 3'b000, exp_desc[i].wc16});
      else         exp.push_back({16'h0000, emis[i], 1'b0, htr_enable[i], 3'b000, 10'h000});
    repeat (3) exp.push_back(32'h0);
    for (int i = 0; i < N_HTR; i++) if (pres[i]) foreach (exp_data[i][k]) exp.push_back(exp_data[i][k]);
    @(negedge clk); t_push = 1; t_din = t;
    @(negedge clk); t_push = 0;
    while (got_last == 0) @(negedge clk);
    check(got.size() == exp.size(), $sformatf("%s: %0d words exp %0d", name, got.size(), exp.size()));
    foreach (exp[k]) if (k < got.size())
      check(got[k] == exp[k], $sformatf("%s: word %0d got %h exp %h", name, k, got[k], exp[k]));
    for (int i = 0; i < N_HTR; i++)
      check(herr_acc[i] == (pres[i] ? exp_desc[i].evt_status : 15'h0), $sformatf("%s: htr_err %0d", name, i));
    for (int i = 0; i < N_HTR; i++) exp_data[i].delete();
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l1a_entry_t t;
    for (int i = 0; i < N_HTR; i++) begin b_wr[i] = 0; b_dpush[i] = 0; b_data[i] = 0; b_desc[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // 1: all present, some status and LRB bits
    for (int i = 0; i < N_HTR; i++) load(i, 24'h10, 12'h100, (i == 4) ? 15'h0041 : 15'h0, i % 3, (i == 9) ? 8'h01 : 8'h00, 1);
    t = '{calib: 0, evn: 24'h10, bcn: 12'h100};
    run_event(t, '1, '0, "all present");
    check(derr_acc == '0, "no DCC errors in event 1");
    // 2: HTR 3 holds a stale block (EvN 0x0F) before the right one
    load(3, 24'h0F, 12'h0F0, 15'h0, 2, 8'h0, 0);
    for (int i = 0; i < N_HTR; i++) load(i, 24'h11, 12'h110, 15'h0, 1, 8'h0, 1);
    t = '{calib: 0, evn: 24'h11, bcn: 12'h110};
    run_event(t, '1, 15'(1 << 3), "stale block dropped");
    check(derr_acc[DERR_EVN_L1A] && !derr_acc[DERR_BCN_L1A], "EvN mismatch counted");
    // 3: HTR 5 missing: timeout
    for (int i = 0; i < N_HTR; i++) if (i != 5) load(i, 24'h12, 12'h120, 15'h0, 1, 8'h0, 1);
    t = '{calib: 0, evn: 24'h12, bcn: 12'h120};
    run_event(t, ~15'(1 << 5), '0, "HTR 5 missing");
    check(t_start - t_pop == TMO + 2, $sformatf("timeout wait %0d clocks", t_start - t_pop));
    // 4: HTR 7 already sends event 0x14 when 0x13 is built; BcN wrong on HTR 2
    for (int i = 0; i < N_HTR; i++)
      if (i != 7) load(i, 24'h13, (i == 2) ? 12'h999 : 12'h130, 15'h0, 1, 8'h0, 1);
    load(7, 24'h14, 12'h140, 15'h0, 1, 8'h0, 0);
    t = '{calib: 0, evn: 24'h13, bcn: 12'h130};
    run_event(t, ~15'(1 << 7), 15'(1 << 7), "HTR 7 ahead");
    check(derr_acc[DERR_EVN_L1A] && derr_acc[DERR_BCN_L1A], "EvN and BcN mismatch counted");
    // 5: event 0x14 uses the waiting block of HTR 7; HTR 11 disabled; calibration trigger
    htr_enable[11] = 1'b0;
    for (int i = 0; i < N_HTR; i++) if (i != 7 && i != 11) load(i, 24'h14, 12'h140, 15'h1000, 0, 8'h0, 1);
    exp_desc[7] = later_desc[7];
    exp_data[7] = later_data[7];
    t = '{calib: 1, evn: 24'h14, bcn: 12'h140};
    run_event(t, ~15'(1 << 11), '0, "calibration, HTR 11 disabled");
    check(!derr_acc[DERR_EVN_L1A] && !derr_acc[DERR_EVN_CAL], "no mismatch for calibration event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
