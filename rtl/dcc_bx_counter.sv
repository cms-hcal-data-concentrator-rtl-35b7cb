// dcc_bx_counter: local bunch-crossing (BcN) and orbit counters.
//
// The TTCrx bunch count is not used; BcN is counted locally, 0..3563,
// wrapping once per orbit. A BC0 broadcast is delayed by bc0_delay clocks
// (programmable, 0..15) and then forces BcN to 0; at that moment BcN must
// read 3563, otherwise bc0_err pulses for one cycle. The orbit counter
// advances every time BcN returns to 0 and ResetOrbitCounter loads it with
// the programmable constant orbit_reset_val. Counting scheme and widths of
// the delay and orbit counter are this design's choices; the delay, the
// 3563 check and the reset constant come from the specification.
module dcc_bx_counter
  import dcc_pkg::*;
#(
  parameter int ORBIT_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               bc0,
  input  logic [3:0]         bc0_delay,
  input  logic               orbit_reset,
  input  logic [3:0]         orbit_reset_val,
  output logic [BCN_W-1:0]   bcn,
  output logic [ORBIT_W-1:0] orbit,
  output logic               bc0_err
);
  logic [15:0] bc0_pipe;   // bc0_pipe[k] = BC0 seen k+1 cycles ago
  logic        bc0_now;
  logic        wrap;

  always_ff @(posedge clk) begin
    if (rst) bc0_pipe <= '0;
    else     bc0_pipe <= {bc0_pipe[14:0], bc0};
  end
  assign bc0_now = (bc0_delay == 4'd0) ? bc0 : bc0_pipe[bc0_delay - 4'd1];
  assign wrap    = (bcn == BCN_W'(BX_PER_ORBIT-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      bcn     <= '0;
      bc0_err <= 1'b0;
    end else begin
      bc0_err <= bc0_now && !wrap;
      if (bc0_now || wrap) bcn <= '0;
      else                 bcn <= bcn + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                 orbit <= '0;
    else if (orbit_reset)    orbit <= ORBIT_W'(orbit_reset_val);
    else if (bc0_now || wrap) orbit <= orbit + 1'b1;
  end
endmodule
