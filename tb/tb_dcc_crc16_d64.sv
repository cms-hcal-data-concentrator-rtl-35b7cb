// tb_dcc_crc16_d64: checks the CRC step against vectors evaluated from the
// parallel XOR equations of the CRC-16 (0 2 15 16) 64-bit update, and
// checks that chaining two steps equals feeding the same 128 bits through
// a bit-at-a-time polynomial division done here in the testbench.
module tb_dcc_crc16_d64;
  logic [63:0] data;
  logic [15:0] cin, cout;
  int checks = 0, failures = 0;

  dcc_crc16_d64 dut (.data, .crc_in(cin), .crc_out(cout));

  typedef struct { logic [63:0] d; logic [15:0] c; logic [15:0] r; } vec_t;
  vec_t vecs [8] = '{
    '{64'hf2a74de452e6b438, 16'h269e, 16'hd194},
    '{64'ha6a3a4506513270e, 16'h0c5c, 16'h3d55},
    '{64'hd23f0824128b2f33, 16'h892f, 16'hee1e},
    '{64'h5d9dc9f81818e811, 16'h9531, 16'ha451},
    '{64'he8e25d940ed90475, 16'h81e7, 16'hb9c2},
    '{64'h099950d836f675cc, 16'h1600, 16'h4ede},
    '{64'h0000000000000000, 16'hffff, 16'h02d0},
    '{64'hffffffffffffffff, 16'h0000, 16'h8221}
  };

  // reference: append 16 zero bits to (init-xored message) and divide
  function automatic logic [15:0] ref_div(input logic [127:0] msg, input logic [15:0] init);
    logic [143:0] r;
    r = {msg, 16'h0};
    r[143:128] = r[143:128] ^ init;
    for (int i = 143; i >= 16; i--)
      if (r[i]) r[i -: 17] = r[i -: 17] ^ 17'h18005;
    return r[15:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (vecs[i]) begin
      data = vecs[i].d; cin = vecs[i].c; #1;
      checks++;
      if (cout !== vecs[i].r) begin
        failures++;
        $display("FAIL vec %0d: got %h exp %h", i, cout, vecs[i].r);
      end
    end
    for (int k = 0; k < 50; k++) begin
      logic [127:0] m;
      logic [15:0]  init, mid;
      m    = {$urandom, $urandom, $urandom, $urandom};
      init = 16'($urandom);
      data = m[127:64]; cin = init; #1; mid = cout;
      data = m[63:0];   cin = mid;  #1;
      checks++;
      if (cout !== ref_div(m, init)) begin
        failures++;
        $display("FAIL chain %0d: got %h exp %h", k, cout, ref_div(m, init));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
