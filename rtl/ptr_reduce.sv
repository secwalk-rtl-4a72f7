// ptr_reduce: compresses an encoded address into byte link keys.
//
// Linked memory accesses scramble every data byte with a key derived from
// that byte's own encoded address, so a byte gets the same key whatever the
// width of the access that touches it. For the 8-byte word containing the
// encoded address pa_enc_i, this block forms the encoded address of each
// byte lane j: payload {pa[38:3], j}, residues r_i + (j - pa[2:0]) mod m_i,
// i.e. the redundancy is carried over from pa_enc_i, not recomputed, so a
// faulted address gives wrong keys. Each 64-bit encoded byte address is then
// folded to 8 bits by xor of its eight bytes, giving key_o[8j+7:8j] for lane
// j. The existence of this compression step between the encoded physical
// address and the xor unit follows the SecWalk load-store unit; the
// per-lane addresses and the xor fold are this design's choice.
// Purely combinational.
module ptr_reduce
  import secwalk_pkg::*;
(
  input  enc_addr_t   pa_enc_i,
  output logic [63:0] key_o
);
  always_comb begin
    red_t        red_j;
    enc_addr_t   a_j;
    logic [7:0]  k;
    logic [2:0]  off;
    logic [2:0]  lane_dist;
    off   = pa_enc_i[2:0];
    key_o = '0;
    for (int unsigned j = 0; j < 8; j++) begin
      lane_dist = (3'(j) >= off) ? 3'(j) - off : off - 3'(j);
      red_j = red_addsub(pa_enc_i[XLEN-1:ADDR_W], residues(addr_t'(lane_dist)), 3'(j) < off);
      a_j = {red_j, pa_enc_i[ADDR_W-1:3], 3'(j)};
      k   = '0;
      for (int unsigned b = 0; b < 8; b++) k = k ^ a_j[8*b +: 8];
      key_o[8*j +: 8] = k;
    end
  end
endmodule
