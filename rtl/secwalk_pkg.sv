// secwalk_pkg: constants, types and pure functions shared by the SecWalk blocks.
//
// Encoded addresses. An address of the 39-bit Sv39 space is protected by a
// multi-residue code with the moduli {5, 7, 17, 31, 127}. The residues are
// kept in the 25 upper bits of the 64-bit word, the address itself in the
// lower 39 bits:  enc = {redundancy[24:0], addr[38:0]}. The code is separable,
// so the plain address is always readable without decoding. The five
// residues need 3+3+5+5+7 = 23 bits; they are packed from bit 0 of the
// redundancy field upwards in the order of the moduli, and the two top bits
// of the field are zero in every valid codeword. The packing order and the
// zero top bits are this design's choice; the moduli, the 25/39 split and
// the Sv39 sizes follow the SecWalk scheme.
//
// Page table entries carry an encoded PPN: PTE[61:10] holds the upper 52 bits
// of the encoded page address (PPN_enc), so {PTE[61:10], 12'b0} is a full
// 64-bit codeword whose lower 12 bits are zero. PTE[63:62] are reserved,
// PTE[9:8] are RSW and PTE[7:0] are the usual Sv39 status bits.
package secwalk_pkg;

  localparam int unsigned ADDR_W   = 39;   // payload width of an encoded address
  localparam int unsigned RED_W    = 25;   // redundancy field width
  localparam int unsigned XLEN     = 64;
  localparam int unsigned PO_W     = 12;   // Sv39 page offset
  localparam int unsigned VPN_W    = 9;    // one VPN level
  localparam int unsigned LEVELS   = 3;    // Sv39 page table depth
  localparam int unsigned PPN_ENC_W = 52;  // encoded PPN inside a PTE
  localparam int unsigned PTE_SIZE = 8;
  localparam int unsigned NUM_MOD  = 5;

  typedef logic [XLEN-1:0]   enc_addr_t;   // {redundancy, address}
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [RED_W-1:0]  red_t;

  // Moduli, their residue widths and the bit position of each residue
  // inside the redundancy field.
  localparam int unsigned MODULI  [NUM_MOD] = '{5, 7, 17, 31, 127};
  localparam int unsigned RES_WID [NUM_MOD] = '{3, 3, 5, 5, 7};
  localparam int unsigned RES_OFF [NUM_MOD] = '{0, 3, 6, 11, 16};

  // Sv39 PTE status bits
  localparam int unsigned PTE_V = 0;
  localparam int unsigned PTE_R = 1;
  localparam int unsigned PTE_W = 2;
  localparam int unsigned PTE_X = 3;
  localparam int unsigned PTE_U = 4;
  localparam int unsigned PTE_A = 6;
  localparam int unsigned PTE_D = 7;

  // satp_enc modes (same encoding as the MODE field of satp)
  localparam logic [3:0] SATP_MODE_BARE = 4'd0;
  localparam logic [3:0] SATP_MODE_SV39 = 4'd8;

  // Redundancy of a 39-bit value: each residue x mod m_i in its slot.
  function automatic red_t residues(input addr_t x);
    red_t r;
    logic [63:0] xe;
    r  = '0;
    xe = 64'(x);
    r[2:0]   = 3'(xe % 64'd5);
    r[5:3]   = 3'(xe % 64'd7);
    r[10:6]  = 5'(xe % 64'd17);
    r[15:11] = 5'(xe % 64'd31);
    r[22:16] = 7'(xe % 64'd127);
    return r;
  endfunction

  function automatic enc_addr_t encode(input addr_t x);
    return {residues(x), x};
  endfunction

  // A word is a valid codeword when its redundancy equals the residues of
  // its payload (which also forces the two unused top bits to zero).
  function automatic logic is_codeword(input enc_addr_t w);
    return w[XLEN-1:ADDR_W] == residues(w[ADDR_W-1:0]);
  endfunction

  // Residue-wise modular addition / subtraction of two redundancy fields.
  // Operands are residues already below their modulus.
  function automatic red_t red_addsub(input red_t a, input red_t b, input logic sub);
    red_t r;
    int unsigned ra, rb, s, m;
    r = '0;
    for (int i = 0; i < NUM_MOD; i++) begin
      m  = MODULI[i];
      ra = (32'(a) >> RES_OFF[i]) & ((32'd1 << RES_WID[i]) - 1);
      rb = (32'(b) >> RES_OFF[i]) & ((32'd1 << RES_WID[i]) - 1);
      if (sub) s = (ra + m - rb) % m;
      else     s = (ra + rb) % m;
      r = r | (red_t'(s) << RES_OFF[i]);
    end
    return r;
  endfunction

  // Operations of the residue page-table-walk datapath (Fig. 7 "state").
  typedef enum logic [2:0] {
    RP_IDLE     = 3'd0,  // nothing
    RP_VPN      = 3'd1,  // VPN_enc = VA_enc (-) Enc(PO), low 12 bits must be 0
    RP_PTE_ADDR = 3'd2,  // PTE address = a (+) Enc(vpn[i]*8); latch Enc(vpn[i])
    RP_LEAF     = 3'd3,  // PA_enc = (unlink2 ppn) (+) Enc(PO)
    RP_TLB      = 3'd4   // PA_enc = (unlink1 of TLB entry with VPN_enc) (+) Enc(PO)
  } rp_state_e;

  // Residue ALU operations (new instructions).
  typedef enum logic [2:0] {
    RALU_ENC   = 3'd0,  // rd = Enc(rs1[38:0])
    RALU_DEC   = 3'd1,  // rd = rs1[38:0], checked
    RALU_ADD   = 3'd2,  // rd = rs1 (+) rs2
    RALU_SUB   = 3'd3,  // rd = rs1 (-) rs2
    RALU_LINK1 = 3'd4,  // vpnlink1: rd = P64(rs1, rs2)
    RALU_LINK2 = 3'd5   // vpnlink2: rd = {P52(rs1[63:12], rs2[63:12]), 12'b0}
  } ralu_op_e;

endpackage
