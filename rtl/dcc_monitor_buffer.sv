// dcc_monitor_buffer: VME monitor buffer for spying on built events.
//
// The buffer watches the CDF word stream leaving the framer (tap_* inputs,
// one accepted 64-bit word per tap_valid, with its K bit and start/end of
// event marks). At each header it decides whether to keep the event:
// a calibration event is always kept (no prescaling); a normal event is
// kept once every `prescale` events (prescale = 0 keeps none). An event is
// only started when at least MIN_FREE words are free; otherwise it is
// counted in n_dropped. Kept words, with their K bit, go into a FIFO that
// the VME side reads word by word (rd_en, rd_data, rd_k, empty, count).
// If the FIFO fills in the middle of an event the rest is lost and
// `overrun` is set until clear. The calibration and prescale rules follow
// the specification; the FIFO organisation and sizes are this design's.
module dcc_monitor_buffer #(
  parameter int DEPTH    = 1024,
  parameter int MIN_FREE = 256,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic [15:0] prescale,
  input  logic        tap_valid,
  input  logic [63:0] tap_data,
  input  logic        tap_k,
  input  logic        tap_sof,
  input  logic        tap_eof,
  input  logic        tap_calib,
  input  logic        rd_en,
  output logic [63:0] rd_data,
  output logic        rd_k,
  output logic        empty,
  output logic [AW:0] count,
  output logic [15:0] n_captured,
  output logic [15:0] n_dropped,
  output logic        overrun
);
  logic [15:0] pcnt;
  logic        capturing, want, take, full;
  logic [64:0] head;

  assign want = tap_calib || (prescale != 16'd0 && pcnt == prescale - 16'd1);
  assign take = tap_valid && (tap_sof ? (want && (AW+1)'(DEPTH) - count >= (AW+1)'(MIN_FREE))
                                      : capturing) && !full;

  dcc_fifo #(.WIDTH(65), .DEPTH(DEPTH)) u_mem (
    .clk, .rst, .clear, .push(take), .din({tap_k, tap_data}), .pop(rd_en),
    .dout(head), .empty, .full, .count
  );
  assign rd_k    = head[64];
  assign rd_data = head[63:0];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      pcnt <= '0; capturing <= 1'b0; n_captured <= '0; n_dropped <= '0; overrun <= 1'b0;
    end else if (tap_valid) begin
      if (tap_sof) begin
        if (!tap_calib && prescale != 16'd0)
          pcnt <= (pcnt == prescale - 16'd1) ? '0 : pcnt + 1'b1;
        if (want) begin
          if (take) begin
            capturing  <= !tap_eof;
            n_captured <= n_captured + 1'b1;
          end else begin
            n_dropped  <= n_dropped + 1'b1;
          end
        end
      end else if (capturing) begin
        if (full) overrun <= 1'b1;
        if (tap_eof) capturing <= 1'b0;
      end
    end
  end
endmodule
