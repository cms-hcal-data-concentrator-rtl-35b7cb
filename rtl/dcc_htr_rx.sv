// dcc_htr_rx: receiver for the block that one HTR sends per trigger.
//
// Input words are 16 bits wide with two type flags S1,S0: 11 = header
// (first word), 10 = body, 01 = trailer (last word). Every word of the block
// is kept, two at a time packed into 32-bit words with the earlier word in
// the low half, and written to the HTR input buffer; a block of odd length
// is completed with 16 zero bits. From fixed positions the receiver takes
// EvN[7:0] (word 0, bits 7..0), EvN[23:8] (word 1), EVT_Status (word 2,
// bits 14..0), BcN (word 4, bits 11..0) and LRB_Errors (trailer bits 7..0);
// when the trailer arrives the block descriptor is written. To the
// LRB_Errors byte it adds what it sees itself: bit 7 for an odd word count,
// bit 6 for a block that is cut short by a new header, bit 5 when words are
// lost (block over MAX_WC16 words or buffer full) and bit 3 when the
// trailer EvN differs from the header EvN. A block that arrives while the
// descriptor FIFO cannot take it is dropped whole. The field positions and
// the error bit meanings are the specification's; the packing and the
// DCC-side checks are this design's. One word is accepted per clock.
module dcc_htr_rx
  import dcc_pkg::*;
#(
  parameter int MAX_WC16 = 1023
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [1:0]  in_s,
  input  logic [15:0] in_data,
  // to the input buffer
  output logic        wr_en,
  output logic [31:0] wr_data,
  input  logic        buf_full,
  output logic        desc_push,
  output htr_desc_t   desc,
  input  logic        desc_free1,   // descriptor FIFO can take one more
  input  logic        desc_free2,   // ... and two more
  output logic        block_seen    // one-cycle pulse per complete block
);
  logic            in_blk, half, trunc;
  logic [15:0]     lo;
  logic [WC_W-1:0] wc16, wc32;
  htr_desc_t       cur;
  logic            is_hdr, is_trl, is_body, take;

  // next-state of the packing path for the current word
  logic            n_half, n_trunc, w_en, close;
  logic [15:0]     n_lo;
  logic [WC_W-1:0] n_wc16, n_wc32;
  logic [31:0]     w_data;
  logic [7:0]      close_err;

  assign is_hdr  = in_valid && in_s == 2'b11;
  assign is_trl  = in_valid && in_s == 2'b01;
  assign is_body = in_valid && in_s == 2'b10;
  assign take    = (is_body || is_trl) && in_blk;
  assign close   = in_blk && (is_trl || is_hdr);

  always_comb begin
    n_lo = lo; n_half = half; n_wc16 = wc16; n_wc32 = wc32; n_trunc = trunc;
    w_en = 1'b0; w_data = '0;
    if (take) begin
      if (!trunc && wc16 != WC_W'(MAX_WC16)) begin
        if (half) begin
          if (buf_full) begin
            n_trunc = 1'b1; n_half = 1'b0; n_wc16 = {wc32[WC_W-2:0], 1'b0};
          end else begin
            w_en = 1'b1; w_data = pack16(lo, in_data);
            n_half = 1'b0; n_wc16 = wc16 + 1'b1; n_wc32 = wc32 + 1'b1;
          end
        end else begin
          n_lo = in_data; n_half = 1'b1; n_wc16 = wc16 + 1'b1;
        end
      end else begin
        n_trunc = 1'b1;
      end
    end
    // end of block: flush a half-filled word
    if (close && n_half && !w_en) begin
      if (!buf_full) begin
        w_en = 1'b1; w_data = pack16(n_lo, 16'h0000); n_wc32 = n_wc32 + 1'b1;
      end else begin
        n_trunc = 1'b1; n_wc16 = {n_wc32[WC_W-2:0], 1'b0};
      end
    end
    close_err = (n_trunc ? 8'h20 : 8'h00) | (n_wc16[0] ? 8'h80 : 8'h00);
    if (is_hdr) close_err = close_err | 8'h40;
    else if (in_data[15:8] != cur.evn[7:0]) close_err = close_err | 8'h08;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      in_blk <= 1'b0; half <= 1'b0; trunc <= 1'b0;
      wc16 <= '0; wc32 <= '0; cur <= '0; lo <= '0;
      wr_en <= 1'b0; desc_push <= 1'b0; block_seen <= 1'b0;
      wr_data <= '0; desc <= '0;
    end else begin
      wr_en      <= w_en;
      wr_data    <= w_data;
      desc_push  <= close;
      block_seen <= close;
      lo <= n_lo; half <= n_half; wc16 <= n_wc16; wc32 <= n_wc32; trunc <= n_trunc;
      if (close) begin
        desc         <= cur;
        desc.lrb_err <= (is_trl ? in_data[7:0] : cur.lrb_err) | close_err;
        desc.wc16    <= n_wc16;
        desc.wc32    <= n_wc32;
        in_blk       <= 1'b0;
        half         <= 1'b0;
      end
      if (take) begin
        case (wc16)
          WC_W'(1): cur.evn[23:8]  <= in_data;
          WC_W'(2): cur.evt_status <= in_data[14:0];
          WC_W'(4): cur.bcn        <= in_data[11:0];
          default: ;
        endcase
      end
      if (is_hdr) begin
        if (in_blk ? desc_free2 : desc_free1) begin
          in_blk       <= 1'b1;
          cur          <= '0;
          cur.evn[7:0] <= in_data[7:0];
          lo           <= in_data;
          half         <= 1'b1;
          wc16         <= WC_W'(1);
          wc32         <= '0;
          trunc        <= 1'b0;
        end else begin
          in_blk <= 1'b0;          // no descriptor space: the block is dropped
        end
      end
    end
  end
endmodule
