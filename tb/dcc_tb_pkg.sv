// dcc_tb_pkg: testbench helpers shared by the DCC testbenches.
//
// make_block builds the word sequence that one HTR sends for one event in
// the 2005 HTR-to-DCC format: header (chan_id, EvN[7:0]), EvN[23:8],
// EVT_Status with bit 15 set, OrN/sub-module number, FmtVers/BcN, then
// `nbody` further words, then the trailer (EvN[7:0], LRB_Errors). Each
// element is {S1,S0, data[15:0]}. pack_block gives the 32-bit words the
// DCC stores for that block (two 16-bit words per 32-bit word, first word
// low, an odd block padded with zero), the reference for every check of
// stored or transmitted HTR data.
package dcc_tb_pkg;
  typedef logic [17:0] hword_t;
  typedef hword_t      hblock_t [$];
  typedef logic [31:0] w32_q [$];

  function automatic hblock_t make_block(input logic [23:0] evn, input logic [11:0] bcn,
                                         input logic [14:0] status, input int nbody,
                                         input logic [7:0] lrb, input logic [7:0] chan);
    hblock_t b;
    b.push_back({2'b11, chan, evn[7:0]});
    b.push_back({2'b10, evn[23:8]});
    b.push_back({2'b10, 1'b1, status});
    b.push_back({2'b10, 6'h15, 10'(chan)});
    b.push_back({2'b10, 4'h3, bcn});
    for (int i = 0; i < nbody; i++) b.push_back({2'b10, 16'($urandom)});
    b.push_back({2'b01, evn[7:0], lrb});
    return b;
  endfunction

  function automatic w32_q pack_block(input hblock_t b);
    w32_q q;
    for (int i = 0; i < b.size(); i += 2)
      q.push_back({(i + 1 < b.size()) ? b[i+1][15:0] : 16'h0000, b[i][15:0]});
    return q;
  endfunction
endpackage
