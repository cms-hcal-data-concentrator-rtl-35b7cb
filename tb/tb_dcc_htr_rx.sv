// tb_dcc_htr_rx: feeds HTR blocks into the receiver and checks the stored
// 32-bit words and the descriptor fields (EvN, BcN, EVT_Status,
// LRB_Errors, word counts) for even and odd block lengths, and the
// receiver's own error bits: odd count (bit 7), a block cut by a new header
// (bit 6), truncation at MAX_WC16 or on a full buffer (bit 5), trailer EvN
// mis-match (bit 3), and a block dropped when no descriptor space is left.
module tb_dcc_htr_rx;
  import dcc_pkg::*;
  import dcc_tb_pkg::*;
  logic clk = 0, rst = 1, clear = 0;
  logic in_valid = 0;
  logic [1:0] in_s = 0;
  logic [15:0] in_data = 0;
  logic wr_en, buf_full = 0, desc_push, desc_free1 = 1, desc_free2 = 1, block_seen;
  logic [31:0] wr_data;
  htr_desc_t desc;
  int checks = 0, failures = 0;
  logic [31:0] words [$];
  htr_desc_t   descs [$];

  dcc_htr_rx #(.MAX_WC16(40)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (!rst) begin
    if (wr_en) words.push_back(wr_data);
    if (desc_push) descs.push_back(desc);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input hblock_t b);
    foreach (b[i]) begin
      @(negedge clk); in_valid = 1; {in_s, in_data} = b[i];
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
  endtask

  task automatic expect_block(input hblock_t b, input logic [23:0] evn, input logic [11:0] bcn,
                              input logic [14:0] st, input logic [7:0] lrb, input string name);
    w32_q exp;
    int n;
    exp = pack_block(b);
    n = b.size();
    check(descs.size() == 1, {name, ": one descriptor"});
    check(words.size() == exp.size(), $sformatf("%s: %0d words exp %0d", name, words.size(), exp.size()));
    foreach (exp[i]) if (i < words.size()) check(words[i] == exp[i], $sformatf("%s: word %0d", name, i));
    if (descs.size() == 1) begin
      check(descs[0].evn == evn && descs[0].bcn == bcn && descs[0].evt_status == st, {name, ": fields"});
      check(descs[0].lrb_err == (lrb | ((n % 2) ? 8'h80 : 8'h00)), $sformatf("%s: lrb %h", name, descs[0].lrb_err));
      check(descs[0].wc16 == 10'(n) && descs[0].wc32 == 10'((n + 1) / 2), {name, ": counts"});
    end
    words.delete(); descs.delete();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hblock_t b, b2;
    repeat (3) @(negedge clk);
    rst = 0;
    // even length (5 + 10 + 1 = 16 words)
    b = make_block(24'h123456, 12'hABC, 15'h0085, 10, 8'h01, 8'h07);
    send(b); expect_block(b, 24'h123456, 12'hABC, 15'h0085, 8'h01, "even");
    // odd length (5 + 3 + 1 = 9 words)
    b = make_block(24'h000042, 12'h001, 15'h1000, 3, 8'h00, 8'h02);
    send(b); expect_block(b, 24'h000042, 12'h001, 15'h1000, 8'h00, "odd");
    // back-to-back blocks without a gap
    b  = make_block(24'h000100, 12'h010, 15'h0, 2, 8'h00, 8'h00);
    b2 = make_block(24'h000101, 12'h011, 15'h0, 2, 8'h00, 8'h00);
    foreach (b2[i]) b.push_back(b2[i]);
    send(b);
    check(descs.size() == 2 && descs[1].evn == 24'h000101 && words.size() == 8, "back-to-back");
    words.delete(); descs.delete();
    // truncation: 5 + 50 + 1 words, only 40 kept
    b = make_block(24'h000200, 12'h020, 15'h0, 50, 8'h00, 8'h00);
    send(b);
    check(descs.size() == 1 && descs[0].wc16 == 10'd40 && descs[0].wc32 == 10'd20, "truncated counts");
    check(descs.size() == 1 && descs[0].lrb_err[5], "truncation flagged");
    words.delete(); descs.delete();
    // header inside a block: the first block closes with bit 6
    b  = make_block(24'h000300, 12'h030, 15'h0, 4, 8'h00, 8'h00);
    b2 = make_block(24'h000301, 12'h031, 15'h0, 4, 8'h00, 8'h00);
    b.delete(b.size() - 1);
    foreach (b2[i]) b.push_back(b2[i]);
    send(b);
    check(descs.size() == 2 && descs[0].lrb_err[6] && !descs[1].lrb_err[6], "cut block flagged");
    check(descs.size() == 2 && descs[0].wc16 == 10'd9 && descs[0].wc32 == 10'd5, "cut block counts");
    words.delete(); descs.delete();
    // trailer EvN mismatch
    b = make_block(24'h000400, 12'h040, 15'h0, 2, 8'h00, 8'h00);
    b[b.size()-1][15:8] = 8'h55;
    send(b);
    check(descs.size() == 1 && descs[0].lrb_err[3], "trailer EvN mismatch");
    words.delete(); descs.delete();
    // buffer full mid-block
    b = make_block(24'h000500, 12'h050, 15'h0, 10, 8'h00, 8'h00);
    fork
      send(b);
      begin repeat (6) @(negedge clk); buf_full = 1; end
    join
    buf_full = 0;
    check(descs.size() == 1 && descs[0].lrb_err[5] && 11'(descs[0].wc32) == 11'(words.size())
          && descs[0].wc16 == {descs[0].wc32[8:0], 1'b0}, "buffer full truncation");
    words.delete(); descs.delete();
    // no descriptor space: block dropped
    desc_free1 = 0;
    b = make_block(24'h000600, 12'h060, 15'h0, 2, 8'h00, 8'h00);
    send(b);
    check(descs.size() == 0 && words.size() == 0, "dropped block");
    desc_free1 = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
