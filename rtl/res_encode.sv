// res_encode: multi-residue encoder ("Res Encode").
//
// Turns a plain 39-bit address into a 64-bit encoded address: the residues
// of the address modulo 5, 7, 17, 31 and 127 are placed in the upper
// 25 bits, the address stays unchanged in the lower 39 bits. The code is the
// one SecWalk uses for pointers, virtual and physical addresses; the order in
// which the residues are packed is this design's choice (see secwalk_pkg).
// Purely combinational, no clock.
//
//   addr_i  plain address (bits above 39 of a wider operand are dropped by
//           the caller)
//   enc_o   {residues, addr_i}
module res_encode
  import secwalk_pkg::*;
(
  input  addr_t     addr_i,
  output enc_addr_t enc_o
);
  always_comb enc_o = encode(addr_i);
endmodule
