// tb_dcc_l1a_fifo: fills and drains the trigger FIFO (DEPTH 16 here) and
// checks order of entries, the overflow-warning and busy flags with their
// hysteresis, the one-cycle on/off event pulses, full, the overflow
// (lost trigger) pulse, and clear.
module tb_dcc_l1a_fifo;
  import dcc_pkg::*;
  localparam int DEPTH = 16;
  localparam int LW = $clog2(DEPTH) + 1;
  logic clk = 0, rst = 1, clear = 0, push = 0, pop = 0;
  l1a_entry_t din = '0, dout;
  logic empty, ofw, busy, full, overflow;
  logic [LW-1:0] level;
  logic [LW-1:0] ofw_on = 8, ofw_off = 4, bsy_on = 12, bsy_off = 6;
  logic ev_ofw_on, ev_ofw_off, ev_bsy_on, ev_bsy_off, ev_full_on, ev_full_off;
  int checks = 0, failures = 0;
  int n_ofw_on, n_ofw_off, n_bsy_on, n_bsy_off, n_full_on, n_full_off, n_ovf;

  dcc_l1a_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = !clk;

  always @(posedge clk) if (!rst) begin
    n_ofw_on += ev_ofw_on; n_ofw_off += ev_ofw_off; n_bsy_on += ev_bsy_on;
    n_bsy_off += ev_bsy_off; n_full_on += ev_full_on; n_full_off += ev_full_off; n_ovf += overflow;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic put(input int k);
    @(negedge clk); push = 1; din = '{calib: k[0], evn: 24'(k), bcn: 12'(k * 3)};
    @(negedge clk); push = 0;
  endtask

  task automatic take(input int k);
    #1;
    check(!empty && dout.evn == 24'(k) && dout.bcn == 12'(k * 3), $sformatf("head %0d", k));
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_ofw_on, n_ofw_off, n_bsy_on, n_bsy_off, n_full_on, n_full_off, n_ovf} = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 7; k++) put(k);
    @(negedge clk);
    check(!ofw && !busy && level == 7, "7 entries: no flags");
    put(7); @(negedge clk);
    check(ofw && !busy, "8 entries: overflow warning");
    for (int k = 8; k < 12; k++) put(k);
    @(negedge clk);
    check(busy, "12 entries: busy");
    for (int k = 12; k < 16; k++) put(k);
    @(negedge clk);
    check(full && level == 16, "full");
    put(99);                 // lost
    @(negedge clk);
    check(n_ovf == 1, "overflow pulse");
    check(level == 16, "level unchanged by lost trigger");
    for (int k = 0; k < 9; k++) take(k);
    @(negedge clk);
    check(busy && ofw, "7 entries: busy still on (hysteresis)");
    take(9); @(negedge clk);
    check(!busy && ofw, "6 entries: busy off, warning on");
    take(10); @(negedge clk);
    check(ofw, "5 entries: warning still on");
    take(11); @(negedge clk);
    check(!ofw, "4 entries: warning off");
    @(negedge clk);
    check(n_ofw_on == 1 && n_ofw_off == 1 && n_bsy_on == 1 && n_bsy_off == 1, $sformatf("one on/off event each %0d %0d %0d %0d", n_ofw_on, n_ofw_off, n_bsy_on, n_bsy_off));
    check(n_full_on == 1 && n_full_off == 1, "full on/off events");
    put(50); @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    check(empty && level == 0, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
