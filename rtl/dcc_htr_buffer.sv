// dcc_htr_buffer: input buffer of one HTR link.
//
// Holds the 32-bit words written by dcc_htr_rx in a circular data memory
// and, for every complete block, a descriptor in a small FIFO. The event
// builder sees the oldest complete block's descriptor (desc_valid, desc)
// and its words one at a time on rd_data; rd_en advances to the next word
// and desc_pop retires the descriptor once its words are read. drop
// discards the oldest block whole in one cycle (descriptor and wc32 words),
// which is how a stale block with a wrong event number is thrown away.
// clear empties both memories. The specification only says that HTR data
// is buffered per event; the organisation and sizes are this design's.
module dcc_htr_buffer
  import dcc_pkg::*;
#(
  parameter int DEPTH      = 512,
  parameter int DESC_DEPTH = 16,
  localparam int AW        = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  output logic        full,
  input  logic        desc_push,
  input  htr_desc_t   desc_in,
  output logic        desc_free1,
  output logic        desc_free2,
  output logic        desc_valid,
  output htr_desc_t   desc,
  output logic [31:0] rd_data,
  input  logic        rd_en,
  input  logic        desc_pop,
  input  logic        drop
);
  localparam int DW = $clog2(DESC_DEPTH);

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          desc_empty, desc_full;
  logic [DW:0]   desc_count;
  logic          do_wr, do_rd;

  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && count != 0;
  assign full    = count == (AW+1)'(DEPTH);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      wp <= wp + AW'(do_wr);
      if (drop && desc_valid) rp <= rp + AW'(desc.wc32);
      else                    rp <= rp + AW'(do_rd);
      count <= count + (AW+1)'(do_wr)
                     - ((drop && desc_valid) ? (AW+1)'(desc.wc32) : (AW+1)'(do_rd));
    end
  end
  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  dcc_fifo #(.WIDTH($bits(htr_desc_t)), .DEPTH(DESC_DEPTH)) u_desc (
    .clk, .rst, .clear, .push(desc_push), .din(desc_in), .pop(desc_pop || drop),
    .dout(desc), .empty(desc_empty), .full(desc_full), .count(desc_count)
  );
  assign desc_valid = !desc_empty;
  assign desc_free1 = !desc_full;
  assign desc_free2 = desc_count <= (DW+1)'(DESC_DEPTH-2);

  a_no_rd_and_drop: assert property (@(posedge clk) disable iff (rst) !(rd_en && drop))
    else $error("dcc_htr_buffer: rd_en and drop together");
endmodule
