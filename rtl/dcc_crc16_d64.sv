// dcc_crc16_d64: one step of the CDF event CRC over a 64-bit word.
//
// The CRC polynomial is x^16 + x^15 + x^2 + 1 (taps 0, 2, 15, 16), with
// the 64-bit word entering MSB first (bit 63 is the first serial bit), as
// the specification requires. The step is written as the serial
// shift-register form unrolled over 64 bits, which synthesis flattens into
// the parallel XOR network. Purely combinational: crc_out is the register
// value after data has been shifted in on top of crc_in.
module dcc_crc16_d64 (
  input  logic [63:0] data,
  input  logic [15:0] crc_in,
  output logic [15:0] crc_out
);
  localparam logic [15:0] POLY = 16'h8005;

  always_comb begin
    logic [15:0] c;
    c = crc_in;
    for (int i = 63; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ data[i];
      c  = {c[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
    end
    crc_out = c;
  end
endmodule
