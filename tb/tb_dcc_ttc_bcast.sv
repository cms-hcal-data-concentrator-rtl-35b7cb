// tb_dcc_ttc_bcast: sends every broadcast command of the TTC table (with
// random values in the don't-care bits) and checks that exactly the right
// pulse appears one clock later, that Start/Stop and the VME bit give
// run_enable, and that ReSync/HardReset hold daq_clear for CLEAR_CYCLES.
module tb_dcc_ttc_bcast;
  logic clk = 0, rst = 1;
  logic [7:0] brcst = 0;
  logic brcst_str = 0, vme_run = 0;
  logic orbit_reset, resync, hard_reset, start, stop, stat_req, calib_trig, evcnt_reset, bc0;
  logic run_enable, daq_clear;
  int checks = 0, failures = 0;

  dcc_ttc_bcast #(.CLEAR_CYCLES(16)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // expected pulse vector {orbit,resync,hard,start,stop,statreq,calib}
  task automatic send(input logic [2:0] cmd, input logic q, input logic [6:0] exp_pulses, input string name);
    logic [7:0] b;
    b = {cmd, 1'($urandom), q, 1'($urandom), 2'b00};
    @(negedge clk); brcst = b; brcst_str = 1;
    @(negedge clk); brcst_str = 0;
    check({orbit_reset, resync, hard_reset, start, stop, stat_req, calib_trig} == exp_pulses, name);
    check(!evcnt_reset && !bc0, {name, " no ECR/BC0"});
    @(negedge clk);
    check({orbit_reset, resync, hard_reset, start, stop, stat_req, calib_trig} == 0, {name, " one cycle"});
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check(!run_enable && !daq_clear, "idle after reset");
    send(3'b001, 1, 7'b1000000, "ResetOrbitCounter");
    send(3'b010, 1, 7'b0100000, "ReSync");
    begin
      int n = 0;
      while (daq_clear) begin n++; @(negedge clk); end
      check(n == 16, $sformatf("ReSync clear length %0d", n));
    end
    send(3'b011, 1, 7'b0010000, "HardReset");
    repeat (20) @(negedge clk);
    send(3'b100, 1, 7'b0001000, "Start");
    check(run_enable, "run after Start");
    send(3'b101, 0, 7'b0000010, "StatReq");
    check(run_enable, "StatReq leaves run");
    send(3'b101, 1, 7'b0000100, "Stop");
    check(!run_enable, "stopped after Stop");
    send(3'b110, 1, 7'b0000001, "CalibTrig");
    send(3'b010, 0, 7'b0000000, "ReSync with bit3=0 ignored");
    send(3'b111, 1, 7'b0000000, "unused code 111");
    vme_run = 1; #1;
    check(run_enable, "VME run bit");
    vme_run = 0;
    // EvtCntReset and BC0
    @(negedge clk); brcst = 8'b0000_0010; brcst_str = 1;
    @(negedge clk); brcst_str = 0;
    check(evcnt_reset && !bc0, "EvtCntReset");
    @(negedge clk); brcst = 8'b0000_0001; brcst_str = 1;
    @(negedge clk); brcst_str = 0;
    check(bc0 && !evcnt_reset, "BC0");
    // BC0 together with a command
    @(negedge clk); brcst = 8'b1000_1001; brcst_str = 1;
    @(negedge clk); brcst_str = 0;
    check(bc0 && start, "BC0 with Start");
    // no strobe, no pulse
    @(negedge clk); brcst = 8'b0100_1011;
    @(negedge clk);
    check(!resync && !bc0 && !evcnt_reset, "no strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
