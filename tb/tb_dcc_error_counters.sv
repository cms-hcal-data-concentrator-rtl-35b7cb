// tb_dcc_error_counters: pulses HTR and DCC error inputs and reads every
// counter back through the offset map (HTR h counter c at 15*h + c, DCC
// counter j at 0x1C0 + j), checking the counts kept by the testbench,
// saturation at 255, the error summary bits, clear-all, and the TTS
// request with its priority (DCC errors before HTR errors, lowest first).
module tb_dcc_error_counters;
  import dcc_pkg::*;
  logic clk = 0, rst = 1, clear_all = 0;
  logic [N_HTR_ERR-1:0] htr_err [N_HTR];
  logic [N_DCC_ERR-1:0] dcc_err = '0;
  err_ctrl_t htr_ctrl [N_HTR_ERR];
  err_ctrl_t dcc_ctrl [N_DCC_ERR];
  logic [8:0] rd_addr = 0;
  logic [7:0] rd_data;
  logic [31:0] err_summary;
  logic tts_req;
  logic [3:0] tts_req_state;
  int checks = 0, failures = 0;
  int hc [N_HTR][N_HTR_ERR];
  int dc [N_DCC_ERR];

  dcc_error_counters #(.CNT_W(8)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic read(input logic [8:0] a, output logic [7:0] d);
    @(negedge clk); rd_addr = a;
    @(negedge clk); d = rd_data;
  endtask

  task automatic read_all(input string name);
    logic [7:0] d;
    for (int h = 0; h < N_HTR; h++)
      for (int c = 0; c < N_HTR_ERR; c++) begin
        read(9'(h * 15 + c), d);
        check(d == 8'(hc[h][c] > 255 ? 255 : hc[h][c]), $sformatf("%s: HTR %0d counter %0d = %0d", name, h, c, d));
      end
    for (int j = 0; j < N_DCC_ERR; j++) begin
      read(9'h1C0 + 9'(j), d);
      check(d == 8'(dc[j] > 255 ? 255 : dc[j]), $sformatf("%s: DCC counter %0d = %0d", name, j, d));
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_sum;
    for (int h = 0; h < N_HTR; h++) begin htr_err[h] = '0; for (int c = 0; c < N_HTR_ERR; c++) hc[h][c] = 0; end
    for (int j = 0; j < N_DCC_ERR; j++) dc[j] = 0;
    for (int c = 0; c < N_HTR_ERR; c++) htr_ctrl[c] = '0;
    for (int j = 0; j < N_DCC_ERR; j++) dcc_ctrl[j] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // random pulses on a few sources
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int h = 0; h < N_HTR; h++) htr_err[h] = '0;
      dcc_err = '0;
      begin
        int h, c, j;
        h = $urandom % N_HTR; c = $urandom % 4;        // counters 0..3 only
        htr_err[h][c] = 1; hc[h][c]++;
        j = $urandom % N_DCC_ERR;
        if (j < 6) begin dcc_err[j] = 1; dc[j]++; end
      end
    end
    // saturation of HTR 14 counter 14
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int h = 0; h < N_HTR; h++) htr_err[h] = '0;
      dcc_err = '0;
      htr_err[14][14] = 1; hc[14][14]++;
    end
    @(negedge clk);
    htr_err[14] = '0;
    read_all("after pulses");
    exp_sum = '0;
    for (int h = 0; h < N_HTR; h++) for (int c = 0; c < N_HTR_ERR; c++) if (hc[h][c] != 0) exp_sum[c] = 1;
    for (int j = 0; j < N_DCC_ERR; j++) if (dc[j] != 0) exp_sum[16+j] = 1;
    check(err_summary == exp_sum, $sformatf("summary %h exp %h", err_summary, exp_sum));
    // TTS requests
    htr_ctrl[6] = '{change_tts: 1, new_tts: 4'b0010};
    dcc_ctrl[7] = '{change_tts: 1, new_tts: 4'b1100};
    @(negedge clk); htr_err[3][6] = 1; #1;
    check(tts_req && tts_req_state == 4'b0010, "HTR OD error requests Out of Sync");
    dcc_err[7] = 1; #1;
    check(tts_req && tts_req_state == 4'b1100, "DCC error wins");
    @(negedge clk); htr_err[3] = '0; dcc_err = '0; htr_err[1][5] = 1; #1;
    check(!tts_req, "error without change_tts bit");
    @(negedge clk); htr_err[1] = '0;
    clear_all = 1; @(negedge clk); clear_all = 0;
    for (int h = 0; h < N_HTR; h++) for (int c = 0; c < N_HTR_ERR; c++) hc[h][c] = 0;
    for (int j = 0; j < N_DCC_ERR; j++) dc[j] = 0;
    #1;
    check(err_summary == 0, "summary cleared");
    read_all("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
