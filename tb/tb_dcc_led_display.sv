// tb_dcc_led_display: with short stretch and blink times, checks each LED
// group: activity LEDs lit for STRETCH clocks after a pulse, status LEDs
// on/off/blinking as their inputs say, the TTS LEDs, HTR LEDs disabled,
// lit by data and blinking on errors; then decodes the serial output (bits
// sampled on the rising edge of led_sclk, frame closed by led_latch) and
// compares whole frames with the LED state.
module tb_dcc_led_display;
  import dcc_pkg::*;
  localparam int STRETCH = 20, BLINK = 8;
  logic clk = 0, rst = 1;
  logic vme_act = 0, ttc_ready = 0, ttc_err = 0, l1a = 0, daq_en = 0, daq_word = 0, daq_err = 0;
  logic dcc_en = 0, dcc_err = 0;
  logic [3:0] tts = 0;
  logic [N_HTR-1:0] htr_en = 0, htr_data = 0, htr_err = 0;
  logic [23:0] led;
  logic led_sclk, led_sdata, led_latch;
  int checks = 0, failures = 0;

  dcc_led_display #(.STRETCH(STRETCH), .BLINK(BLINK), .SCLK_DIV(1)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (led=%h)", msg, led); end
  endtask

  // serial decoder
  logic [23:0] shreg, frame;
  int nframes = 0;
  always @(posedge led_sclk) shreg = {shreg[22:0], led_sdata};
  always @(posedge clk) if (led_latch) begin frame = shreg; nframes++; end

  // does an LED toggle within two blink periods?
  task automatic blinks(input int i, output bit toggled);
    logic first;
    first = led[i]; toggled = 0;
    repeat (2 * BLINK + 2) begin @(negedge clk); if (led[i] != first) toggled = 1; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit t;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(led == 24'h0, "all off");
    // VME activity stretched
    vme_act = 1; @(negedge clk); vme_act = 0;
    check(led[0], "VME lit");
    repeat (STRETCH - 2) @(negedge clk);
    check(led[0], "VME still lit near the end of the stretch");
    repeat (3) @(negedge clk);
    check(!led[0], "VME off after stretch");
    // TTC ready on; error blinks
    ttc_ready = 1; @(negedge clk);
    check(led[1], "TTC ready");
    ttc_err = 1; @(negedge clk); ttc_err = 0;
    blinks(1, t); check(t, "TTC error blinks");
    // L1A
    l1a = 1; @(negedge clk); l1a = 0;
    check(led[2], "L1A lit");
    // DAQ: not enabled -> off even with words
    daq_word = 1; @(negedge clk); daq_word = 0;
    check(!led[3], "DAQ off when not enabled");
    daq_en = 1; daq_word = 1; @(negedge clk); daq_word = 0;
    check(led[3], "DAQ sending");
    daq_err = 1; blinks(3, t); check(t, "DAQ error blinks"); daq_err = 0;
    // DCC
    dcc_en = 1; @(negedge clk);
    check(led[4], "DCC running");
    dcc_err = 1; blinks(4, t); check(t, "DCC errors blink"); dcc_err = 0;
    // TTS LEDs: order RDY, BSY, OFW, SYN
    tts = 4'b1000; @(negedge clk); check(led[8:5] == 4'b0001, "RDY LED");
    tts = 4'b0001; @(negedge clk); check(led[7], "OFW LED");
    tts = 4'b0010; @(negedge clk); check(led[8], "SYN LED");
    tts = 4'b0000;
    // HTR LEDs
    htr_data[3] = 1; @(negedge clk); htr_data[3] = 0;
    check(!led[12], "HTR 3 disabled: off");
    htr_en = '1;
    htr_data[3] = 1; @(negedge clk); htr_data[3] = 0;
    check(led[12], "HTR 3 data");
    htr_err[14] = 1; @(negedge clk); htr_err[14] = 0;
    blinks(23, t); check(t, "HTR 14 error blinks");
    // let everything settle, then compare serial frames with the LED state
    repeat (3 * STRETCH) @(negedge clk);
    begin
      int n0;
      n0 = nframes;
      while (nframes < n0 + 2) @(negedge clk);
      check(frame == led, $sformatf("serial frame %h led %h", frame, led));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
