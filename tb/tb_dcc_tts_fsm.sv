// tb_dcc_tts_fsm: walks the TTS state machine along every transition it
// has: Ready -> Overflow Warning -> Busy -> Overflow Warning -> Ready as
// the FIFO flags rise and fall, a lost trigger to Out of Sync, the clear
// (ReSync) that shows Busy and then Ready, error-forced states that hold
// until the clear, and the output encodings RDY,BSY,SYN,OFW.
module tb_dcc_tts_fsm;
  import dcc_pkg::*;
  logic clk = 0, rst = 1, daq_clear = 0, ofw = 0, busy = 0, overflow = 0, tts_req = 0;
  logic [3:0] tts_req_state = 0;
  tts_e state;
  logic [3:0] tts;
  int checks = 0, failures = 0;

  dcc_tts_fsm dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (tts=%b)", msg, tts); end
  endtask

  task automatic step(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic do_clear();
    daq_clear = 1; step(3);
    check(tts == 4'b0100, "Busy during clear");
    daq_clear = 0; step(2);
    check(tts == 4'b1000, "Ready after clear");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0; step();
    check(tts == 4'b1000, "Ready after reset");
    ofw = 1; step();
    check(tts == 4'b0001, "almost full: Overflow Warning");
    busy = 1; step();
    check(tts == 4'b0100, "full: Busy");
    busy = 0; step();
    check(tts == 4'b0001, "rate reduced: back to Overflow Warning");
    ofw = 0; step();
    check(tts == 4'b1000, "rate reduced: back to Ready");
    step(3);
    check(tts == 4'b1000, "stays Ready");
    // busy and overflow -> out of sync
    ofw = 1; busy = 1; step(2);
    check(tts == 4'b0100, "Busy");
    overflow = 1; step(); overflow = 0;
    check(tts == 4'b0010, "lost trigger: Out of Sync");
    ofw = 0; busy = 0; step(3);
    check(tts == 4'b0010, "Out of Sync holds");
    do_clear();
    // forced error state
    tts_req = 1; tts_req_state = 4'b1100; step(); tts_req = 0;
    check(tts == 4'b1100, "forced Error");
    ofw = 1; step(2); ofw = 0;
    check(tts == 4'b1100, "Error holds");
    do_clear();
    // forced Busy holds even without FIFO flags
    tts_req = 1; tts_req_state = 4'b0100; step(); tts_req = 0;
    step(3);
    check(tts == 4'b0100, "forced Busy holds");
    do_clear();
    // forced disconnected and invalid code
    tts_req = 1; tts_req_state = 4'b0000; step(); tts_req = 0;
    check(tts == 4'b0000, "forced Disconnected");
    do_clear();
    tts_req = 1; tts_req_state = 4'b0110; step(); tts_req = 0;
    check(tts == 4'b1100, "invalid code taken as Error");
    do_clear();
    check(state == TTS_RDY, "enum state Ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
