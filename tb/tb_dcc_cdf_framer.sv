// tb_dcc_cdf_framer: frames events of several payload lengths (odd and
// even numbers of 32-bit words) with random stalls on both sides and
// checks every output word: the CDF header fields, little-endian packing,
// zero padding, K bits, start/end marks, the trailer length in 64-bit
// words and the CRC, which the testbench computes by polynomial division
// of the whole event (trailer CRC field zero, start value 0xFFFF).
module tb_dcc_cdf_framer;
  import dcc_pkg::*;
  logic clk = 0, rst = 1, clear = 0, start = 0;
  l1a_entry_t ev = '0;
  logic [3:0] evt_ty = 4'h3, fov = 4'h2, evt_stat = 4'h9, tts = 4'b1000;
  logic [11:0] source_id = 12'h2C5;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, out_k, out_sof, out_eof, out_calib;
  logic out_ready = 1, busy;
  logic [31:0] in_data = 0;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  dcc_cdf_framer dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [15:0] crc_words(input logic [63:0] w [$]);
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

  logic [63:0] got [$];
  logic        gotk [$];
  logic        sof_ok, eof_ok;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    got.push_back(out_data); gotk.push_back(out_k);
  end
  always @(negedge clk) out_ready = ($urandom % 3) != 0;

  task automatic frame(input int n, input logic calib);
    logic [31:0] pay [$];
    logic [63:0] exp [$];
    logic [63:0] trl;
    got.delete(); gotk.delete();
    for (int k = 0; k < n; k++) pay.push_back($urandom);
    ev = '{calib: calib, evn: 24'($urandom), bcn: 12'($urandom)};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int k = 0; k < n; k++) begin
      in_valid = 1; in_data = pay[k]; in_last = (k == n - 1);
      #1; while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      if ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0; in_last = 0;
    while (busy) @(negedge clk);
    exp.push_back({4'h5, evt_ty, ev.evn, ev.bcn, source_id, fov, 4'b0000});
    for (int k = 0; k < n; k += 2)
      exp.push_back({(k + 1 < n) ? pay[k+1] : 32'h0, pay[k]});
    trl = {4'hA, 4'h0, 24'(exp.size() + 1), 16'h0000, 4'h0, evt_stat, tts, 4'b0000};
    exp.push_back(trl);
    exp[exp.size()-1][31:16] = crc_words(exp);
    check(got.size() == exp.size(), $sformatf("n=%0d: %0d words exp %0d", n, got.size(), exp.size()));
    foreach (exp[k]) if (k < got.size()) begin
      check(got[k] == exp[k], $sformatf("n=%0d word %0d got %h exp %h", n, k, got[k], exp[k]));
      check(gotk[k] == (k == 0 || k == exp.size() - 1), $sformatf("n=%0d K bit %0d", n, k));
    end
    check(out_calib == calib, "calib flag follows the event");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    frame(20, 0);
    frame(21, 1);
    frame(1, 0);
    frame(57, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
