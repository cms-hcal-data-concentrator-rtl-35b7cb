// tb_dcc_htr_buffer: writes three blocks (words plus descriptors) into the
// buffer, drops the first whole, reads the second word by word and
// retires it, and checks the data order, descriptor order, the drop skip
// and full/free flags, with a buffer of 16 words and 4 descriptors.
module tb_dcc_htr_buffer;
  import dcc_pkg::*;
  logic clk = 0, rst = 1, clear = 0;
  logic wr_en = 0, full, desc_push = 0, desc_free1, desc_free2, desc_valid;
  logic [31:0] wr_data = 0, rd_data;
  htr_desc_t desc_in = '0, desc;
  logic rd_en = 0, desc_pop = 0, drop = 0;
  int checks = 0, failures = 0;

  dcc_htr_buffer #(.DEPTH(16), .DESC_DEPTH(4)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // block k: n words with value {k, index}
  task automatic put_block(input int k, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); wr_en = 1; wr_data = {16'(k), 16'(i)};
    end
    @(negedge clk); wr_en = 0;
    desc_push = 1; desc_in = '0; desc_in.evn = 24'(k); desc_in.wc32 = 10'(n); desc_in.wc16 = 10'(2*n);
    @(negedge clk); desc_push = 0;
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
    check(!desc_valid && desc_free1 && desc_free2, "empty after reset");
    put_block(1, 5);
    put_block(2, 3);
    put_block(3, 8);
    check(desc_valid && desc.evn == 1, "oldest block first");
    check(desc_free1 && !desc_free2, "3 of 4 descriptors used");
    check(full, "16 words: full");
    // drop block 1
    drop = 1; @(negedge clk); drop = 0;
    check(desc_valid && desc.evn == 2 && rd_data == {16'd2, 16'd0}, "drop skips block 1");
    check(!full, "space after drop");
    // read block 2
    for (int i = 0; i < 3; i++) begin
      check(rd_data == {16'd2, 16'(i)}, $sformatf("block 2 word %0d", i));
      rd_en = 1; desc_pop = (i == 2);
      @(negedge clk);
    end
    rd_en = 0; desc_pop = 0;
    check(desc_valid && desc.evn == 3 && rd_data == {16'd3, 16'd0}, "block 3 next");
    // write past the end of the circular memory
    put_block(4, 6);
    drop = 1; @(negedge clk); drop = 0;
    check(desc.evn == 4 && rd_data == {16'd4, 16'd0}, "wrapped block 4 after drop");
    for (int i = 0; i < 6; i++) begin
      check(rd_data == {16'd4, 16'(i)}, $sformatf("block 4 word %0d", i));
      rd_en = 1; desc_pop = (i == 5);
      @(negedge clk);
    end
    rd_en = 0; desc_pop = 0;
    check(!desc_valid, "all blocks consumed");
    put_block(5, 2);
    clear = 1; @(negedge clk); clear = 0;
    check(!desc_valid && !full, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
