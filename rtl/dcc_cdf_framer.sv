// dcc_cdf_framer: wraps one event payload into the CMS Common Data Format.
//
// A start pulse latches the event's trigger entry and emits the CDF header
// word (K = 1):
//   [63:60] BOE_1 = 0x5  [59:56] Evt_ty  [55:32] LV1_id (EvN)
//   [31:20] BX_id        [19:8]  Source_id  [7:4] FOV  [3] H = 0  [2:0] 0
// The 32-bit payload words that follow on the in_* stream are packed two
// per 64-bit data word (K = 0), the first word in the low half; an odd last
// word is completed with 32 zero bits. After the last payload word comes
// the trailer (K = 1):
//   [63:60] EOE_1 = 0xA  [55:32] Evt_lgth (64-bit words, header and
//   trailer included)  [31:16] CRC  [11:8] Evt_stat  [7:4] TTS  [3] T = 0
// The CRC (dcc_crc16_d64) runs over every word from the header to the
// trailer, the trailer taken with its CRC field zero, starting from 0xFFFF.
// Bits [1:0] of the header and trailer, which the S-Link hardware uses, are
// sent as zero. out_sof/out_eof mark the header and trailer. The output
// uses a valid/ready handshake and holds its word while out_ready is low.
// The field layout follows the specification; the CRC start value, the
// zero CRC field during the calculation and the handshake are this design's.
module dcc_cdf_framer
  import dcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        start,
  input  l1a_entry_t  ev,
  input  logic [3:0]  evt_ty,
  input  logic [11:0] source_id,
  input  logic [3:0]  fov,
  input  logic [3:0]  evt_stat,
  input  logic [3:0]  tts,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        in_ready,
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_k,
  output logic        out_sof,
  output logic        out_eof,
  output logic        out_calib,
  input  logic        out_ready,
  output logic        busy
);
  typedef enum logic [1:0] {F_IDLE, F_HDR, F_PAY, F_TRL} fstate_e;
  fstate_e state;

  l1a_entry_t  evq;
  logic [31:0] lo;
  logic        half;
  logic [15:0] crc, crc_acc, crc_trl;
  logic [23:0] nwords;
  logic        slot;
  logic [63:0] trailer0;

  assign slot     = !out_valid || out_ready;
  assign in_ready = (state == F_PAY) && slot;
  assign busy     = (state != F_IDLE) || out_valid;
  assign trailer0 = {EOE_1, 4'h0, nwords + 24'd1, 16'h0000, 4'h0, evt_stat, tts, 1'b0, 3'b000};

  dcc_crc16_d64 u_crc_acc (.data(out_data), .crc_in(crc),     .crc_out(crc_acc));
  dcc_crc16_d64 u_crc_trl (.data(trailer0), .crc_in(crc),     .crc_out(crc_trl));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state <= F_IDLE; out_valid <= 1'b0; out_data <= '0; out_k <= 1'b0;
      out_sof <= 1'b0; out_eof <= 1'b0; crc <= 16'hFFFF; nwords <= '0;
      half <= 1'b0; lo <= '0; evq <= '0;
    end else begin
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        if (!out_eof) begin
          crc    <= crc_acc;
          nwords <= nwords + 1'b1;
        end
      end
      case (state)
        F_IDLE: if (start) begin
          evq    <= ev;
          crc    <= 16'hFFFF;
          nwords <= '0;
          state  <= F_HDR;
        end
        F_HDR: if (slot) begin
          out_valid <= 1'b1;
          out_k     <= 1'b1;
          out_sof   <= 1'b1;
          out_eof   <= 1'b0;
          out_data  <= {BOE_1, evt_ty, evq.evn, evq.bcn, source_id, fov, 1'b0, 3'b000};
          half      <= 1'b0;
          state     <= F_PAY;
        end
        F_PAY: if (in_valid && in_ready) begin
          if (!half && !in_last) begin
            lo   <= in_data;
            half <= 1'b1;
          end else begin
            out_valid <= 1'b1;
            out_k     <= 1'b0;
            out_sof   <= 1'b0;
            out_data  <= half ? {in_data, lo} : {32'h0, in_data};
            half      <= 1'b0;
            if (in_last) state <= F_TRL;
          end
        end
        F_TRL: if (!out_valid) begin
          // every earlier word has been accepted, so crc and nwords are final
          out_valid <= 1'b1;
          out_k     <= 1'b1;
          out_sof   <= 1'b0;
          out_eof   <= 1'b1;
          out_data  <= trailer0 | {32'h0, crc_trl, 16'h0};
          state     <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end
  assign out_calib = evq.calib;
endmodule
