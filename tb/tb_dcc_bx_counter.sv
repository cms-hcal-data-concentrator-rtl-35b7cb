// tb_dcc_bx_counter: checks that BcN counts 0..3563 and wraps, that the
// orbit advances on each wrap, that a BC0 whose delayed arrival meets
// BcN = 3563 gives no error while a misplaced one resets BcN and flags
// bc0_err, and that ResetOrbitCounter loads the programmed constant.
module tb_dcc_bx_counter;
  import dcc_pkg::*;
  logic clk = 0, rst = 1;
  logic bc0 = 0, orbit_reset = 0;
  logic [3:0] bc0_delay = 4'd3, orbit_reset_val = 4'd5;
  logic [11:0] bcn;
  logic [31:0] orbit;
  logic bc0_err;
  int checks = 0, failures = 0, nerr = 0;

  dcc_bx_counter dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (bc0_err) nerr++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(bcn == 1 && orbit == 0, "counting from 0");
    while (bcn != 12'd3563) @(negedge clk);
    check(orbit == 0, "orbit before wrap");
    @(negedge clk);
    check(bcn == 0 && orbit == 1, "wrap to 0, orbit 1");
    // aligned BC0: raised so that after 3 clocks of delay BcN is 3563
    while (bcn != 12'd3563 - 12'd3) @(negedge clk);
    bc0 = 1; @(negedge clk); bc0 = 0;
    repeat (4) @(negedge clk);
    check(nerr == 0, "aligned BC0 gives no error");
    check(bcn == 1, $sformatf("aligned BC0 keeps phase (bcn=%0d)", bcn));
    // misplaced BC0 at BcN=100: BcN becomes 0 after the delay
    while (bcn != 12'd100) @(negedge clk);
    bc0 = 1; @(negedge clk); bc0 = 0;
    // now bcn=101; reset takes effect at the clock where the delayed BC0 is seen
    repeat (3) @(negedge clk);
    check(bcn == 0, $sformatf("misplaced BC0 resets BcN (bcn=%0d)", bcn));
    @(negedge clk);
    check(nerr == 1, "misplaced BC0 flagged");
    // delay 0
    bc0_delay = 0;
    while (bcn != 12'd50) @(negedge clk);
    bc0 = 1; @(negedge clk); bc0 = 0;
    check(bcn == 0, "delay 0 BC0");
    @(negedge clk);
    check(nerr == 2, "second error");
    orbit_reset = 1; @(negedge clk); orbit_reset = 0;
    check(orbit == 5, "orbit reset constant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
