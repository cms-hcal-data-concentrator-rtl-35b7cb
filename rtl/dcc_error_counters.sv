// dcc_error_counters: error counters, error summary and error-driven TTS
// state changes.
//
// Every error source has a saturating CNT_W-bit counter (held at its
// maximum instead of wrapping): 15 counters per HTR input, one per
// EVT_Status bit (OW, BZ, EE, RL, LE, LW, OD, CK, four spares, CT, HM, TM),
// and 11 DCC counters (L1A FIFO overflow-warning on/off, busy on/off,
// full on/off, EvN and BcN mis-match for L1A and for calibration events,
// BcN != 3563 at BC0). A one-cycle pulse on an error input adds one.
// clear_all zeroes them all. The counters are read by offset:
//   HTR h, counter c: 15*h + c          (0x000 .. 0x0E0)
//   DCC counter j:    0x1C0 + j         (0x1C0 .. 0x1CA)
// with the read data one cycle after the address. err_summary bit c
// (c = 0..14) is set while counter c of any HTR is non-zero and bit 16+j
// while DCC counter j is non-zero; it goes into DCC header word 1.
// Each HTR error bit has one control register shared by the 15 HTRs and
// each DCC error its own: when an error occurs and its change_tts bit is
// set, tts_req pulses with that register's new_tts state (DCC errors
// first, lowest index wins). The sources, the counter width range, the
// control fields and clear-all follow the specification; the DCC base
// offset, the summary bit assignment and the priority are this design's.
module dcc_error_counters
  import dcc_pkg::*;
#(
  parameter int CNT_W = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear_all,
  input  logic [N_HTR_ERR-1:0] htr_err [N_HTR],
  input  logic [N_DCC_ERR-1:0] dcc_err,
  input  err_ctrl_t            htr_ctrl [N_HTR_ERR],
  input  err_ctrl_t            dcc_ctrl [N_DCC_ERR],
  input  logic [8:0]           rd_addr,
  output logic [CNT_W-1:0]     rd_data,
  output logic [31:0]          err_summary,
  output logic                 tts_req,
  output logic [3:0]           tts_req_state
);
  localparam logic [8:0] DCC_BASE = 9'h1C0;
  localparam logic [CNT_W-1:0] CMAX = '1;

  logic [CNT_W-1:0] hcnt [N_HTR][N_HTR_ERR];
  logic [CNT_W-1:0] dcnt [N_DCC_ERR];

  always_ff @(posedge clk) begin
    if (rst || clear_all) begin
      for (int h = 0; h < N_HTR; h++)
        for (int c = 0; c < N_HTR_ERR; c++) hcnt[h][c] <= '0;
      for (int j = 0; j < N_DCC_ERR; j++) dcnt[j] <= '0;
    end else begin
      for (int h = 0; h < N_HTR; h++)
        for (int c = 0; c < N_HTR_ERR; c++)
          if (htr_err[h][c] && hcnt[h][c] != CMAX) hcnt[h][c] <= hcnt[h][c] + 1'b1;
      for (int j = 0; j < N_DCC_ERR; j++)
        if (dcc_err[j] && dcnt[j] != CMAX) dcnt[j] <= dcnt[j] + 1'b1;
    end
  end

  // VME read port
  always_ff @(posedge clk) begin
    rd_data <= '0;
    if (rd_addr >= DCC_BASE && rd_addr < DCC_BASE + 9'(N_DCC_ERR))
      rd_data <= dcnt[4'(rd_addr - DCC_BASE)];
    else
      for (int h = 0; h < N_HTR; h++)
        for (int c = 0; c < N_HTR_ERR; c++)
          if (rd_addr == 9'(h*N_HTR_ERR + c)) rd_data <= hcnt[h][c];
  end

  always_comb begin
    err_summary = '0;
    for (int h = 0; h < N_HTR; h++)
      for (int c = 0; c < N_HTR_ERR; c++)
        if (hcnt[h][c] != '0) err_summary[c] = 1'b1;
    for (int j = 0; j < N_DCC_ERR; j++)
      if (dcnt[j] != '0) err_summary[16+j] = 1'b1;
  end

  // error-driven TTS request
  always_comb begin
    logic [N_HTR_ERR-1:0] any_h;
    tts_req       = 1'b0;
    tts_req_state = 4'b0000;
    any_h = '0;
    for (int h = 0; h < N_HTR; h++) any_h = any_h | htr_err[h];
    for (int c = N_HTR_ERR-1; c >= 0; c--)
      if (any_h[c] && htr_ctrl[c].change_tts) begin
        tts_req = 1'b1; tts_req_state = htr_ctrl[c].new_tts;
      end
    for (int j = N_DCC_ERR-1; j >= 0; j--)
      if (dcc_err[j] && dcc_ctrl[j].change_tts) begin
        tts_req = 1'b1; tts_req_state = dcc_ctrl[j].new_tts;
      end
  end
endmodule
