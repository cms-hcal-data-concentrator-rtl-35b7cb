// tb_dcc_monitor_buffer: streams CDF-like events past the monitor buffer
// and checks which are kept (every calibration event, one normal event in
// `prescale`, none with prescale 0), that kept events read back word for
// word with their K bits, and that an event is refused, and counted as
// dropped, when less than MIN_FREE words are free.
module tb_dcc_monitor_buffer;
  localparam int DEPTH = 64, MIN_FREE = 16;
  logic clk = 0, rst = 1, clear = 0;
  logic [15:0] prescale = 3;
  logic tap_valid = 0, tap_k = 0, tap_sof = 0, tap_eof = 0, tap_calib = 0, rd_en = 0;
  logic [63:0] tap_data = 0, rd_data;
  logic rd_k, empty, overrun;
  logic [6:0] count;
  logic [15:0] n_captured, n_dropped;
  int checks = 0, failures = 0;
  logic [64:0] expq [$];

  dcc_monitor_buffer #(.DEPTH(DEPTH), .MIN_FREE(MIN_FREE)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one event of n words (header, n-2 data, trailer); keep = expected capture
  task automatic send_event(input int id, input int n, input logic calib, input bit keep);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      tap_valid = 1; tap_sof = (k == 0); tap_eof = (k == n - 1); tap_k = tap_sof || tap_eof;
      tap_calib = calib; tap_data = {32'(id), 32'(k)};
      if (keep) expq.push_back({tap_k, tap_data});
    end
    @(negedge clk); tap_valid = 0;
    @(negedge clk);
  endtask

  task automatic drain();
    while (!empty) begin
      logic [64:0] e;
      e = expq.size() ? expq.pop_front() : '1;
      check({rd_k, rd_data} == e, $sformatf("read %h exp %h", {rd_k, rd_data}, e));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(expq.size() == 0, $sformatf("%0d expected words not read", expq.size()));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // prescale 3: normal events 0,1,2,3,4,5 -> keep 2 and 5; calib always
    send_event(0, 5, 0, 0);
    send_event(1, 4, 0, 0);
    send_event(2, 6, 0, 1);
    send_event(100, 3, 1, 1);
    send_event(3, 4, 0, 0);
    send_event(4, 4, 0, 0);
    send_event(5, 5, 0, 1);
    check(n_captured == 3, $sformatf("captured %0d", n_captured));
    drain();
    // prescale 0: no normal events, calibration still kept
    prescale = 0;
    send_event(6, 4, 0, 0);
    send_event(101, 4, 1, 1);
    drain();
    // fill: 50 words kept, then a calibration event finds < 16 free words
    send_event(102, 50, 1, 1);
    send_event(103, 5, 1, 0);
    check(n_dropped == 1, "event refused when space is short");
    drain();
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
