// dcc_fifo: synchronous first-word-fall-through FIFO used for trigger
// entries and HTR block descriptors.
//
// The head entry is visible on dout whenever empty is low; pop removes it.
// push while full is ignored unless the same cycle pops (the caller detects
// overflow from full).
// clear empties the FIFO in one cycle. count is the occupancy. The memory
// is an array read asynchronously at the read pointer. This is a helper of
// this design; the specification only says that triggers are kept in a FIFO.
module dcc_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && (!full || do_pop);
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst) !(pop && empty && !clear))
    else $error("dcc_fifo: pop while empty");
endmodule
