// tb_dcc_l1a_capture: drives L1As with the TTCrx BCnt sequence (bunch
// count, EvN low 12 bits, EvN high 12 bits) and checks that each entry is
// pushed two clocks after L1A with EvN+1 and the local BcN of the L1A
// clock; checks calibration entries, their own event number starting at 1,
// its VME reset, the one-clock deferral when a CalibTrig meets an L1A
// push, and that nothing is taken while run_enable is low.
module tb_dcc_l1a_capture;
  import dcc_pkg::*;
  logic clk = 0, rst = 1;
  logic run_enable = 1, l1a = 0, calib_trig = 0, calib_evn_reset = 0;
  logic [11:0] bcnt = 0, local_bcn = 0;
  logic push;
  l1a_entry_t entry;
  logic [23:0] calib_evn;
  int checks = 0, failures = 0;
  l1a_entry_t got [$];

  dcc_l1a_capture dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) local_bcn <= (local_bcn == 12'd3563) ? 12'd0 : local_bcn + 1'b1;
  always @(posedge clk) if (push && !rst) got.push_back(entry);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one L1A: returns the expected entry
  task automatic do_l1a(input logic [23:0] ttc_evn, output l1a_entry_t exp);
    @(negedge clk);
    l1a = 1; bcnt = 12'hABC;           // TTCrx bunch count, ignored
    exp.calib = 0; exp.evn = ttc_evn + 1; exp.bcn = local_bcn;
    @(negedge clk); l1a = 0; bcnt = ttc_evn[11:0];
    @(negedge clk); bcnt = ttc_evn[23:12];
    @(negedge clk); bcnt = 12'h000;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l1a_entry_t e1, e2, e3;
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    do_l1a(24'h000000, e1);
    do_l1a(24'h12FFFF, e2);
    check(got.size() == 2, $sformatf("two entries (%0d)", got.size()));
    if (got.size() == 2) begin
      check(got[0] == e1, $sformatf("entry 0 %h exp %h", got[0], e1));
      check(got[1] == e2, $sformatf("entry 1 %h exp %h", got[1], e2));
    end
    // latency: push exactly two clocks after the L1A clock
    got.delete();
    @(negedge clk); l1a = 1; t0 = $time;
    @(negedge clk); l1a = 0; bcnt = 12'h005;
    check(!push, "no push one clock after L1A");
    @(negedge clk); bcnt = 12'h000; #1;
    check(push && entry.evn == 24'h6, $sformatf("push two clocks after L1A (%0d %h)", push, entry));
    @(negedge clk);
    // calibration triggers
    got.delete();
    calib_trig = 1; e3 = '{calib: 1, evn: 24'd1, bcn: local_bcn};
    @(negedge clk); calib_trig = 0;
    check(got.size() == 1 && got[0] == e3, "first calib entry EvN 1");
    check(calib_evn == 2, "calib EvN advanced");
    calib_trig = 1; @(negedge clk); calib_trig = 0;
    check(got.size() == 2 && got[1].evn == 2 && got[1].calib, "second calib entry EvN 2");
    calib_evn_reset = 1; @(negedge clk); calib_evn_reset = 0;
    check(calib_evn == 1, "calib EvN reset to 1");
    // calib meeting an L1A push: deferred by one clock
    got.delete();
    @(negedge clk); l1a = 1;
    @(negedge clk); l1a = 0; bcnt = 12'h010;
    @(negedge clk); bcnt = 12'h000; calib_trig = 1;
    @(negedge clk); calib_trig = 0;
    check(got.size() == 1 && !got[0].calib && got[0].evn == 24'h11, "L1A entry first");
    @(negedge clk);
    check(got.size() == 2 && got[1].calib && got[1].evn == 1, "calib entry one clock later");
    // disabled
    got.delete();
    run_enable = 0;
    do_l1a(24'h42, e1);
    calib_trig = 1; @(negedge clk); calib_trig = 0;
    repeat (3) @(negedge clk);
    check(got.size() == 0, "nothing taken while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
