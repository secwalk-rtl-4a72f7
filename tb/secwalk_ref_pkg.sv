// secwalk_ref_pkg: reference model used by the testbenches.
//
// Computes, independently of the RTL, what the SecWalk blocks must produce:
// residues (by digit sums: 2^5 = 1 mod 31, 2^7 = 1 mod 127, 2^3 = 1 mod 7,
// 2^4 = -1 mod 17, 2^2 = -1 mod 5, instead of division), encoded addresses,
// the two-round PRINCE links P64 / P52 (table-driven, with the PRINCE
// ShiftRows table written out), the byte xor link keys of a physical access
// and complete linked page table entries as system software would build them.
package secwalk_ref_pkg;

  function automatic longint unsigned chunk_mod(input longint unsigned x, input int unsigned w,
                                                input int unsigned m, input bit alt);
    longint signed acc;
    int unsigned   n;
    acc = 0;
    n   = 0;
    while (x != 0) begin
      if (alt && n[0]) acc -= longint'(x & ((64'd1 << w) - 1));
      else             acc += longint'(x & ((64'd1 << w) - 1));
      x = x >> w;
      n++;
    end
    while (acc < 0) acc += longint'(m);
    while (acc >= longint'(m)) acc -= longint'(m);
    return longint'(acc);
  endfunction

  function automatic logic [24:0] ref_res(input logic [38:0] a);
    logic [24:0] r;
    r = '0;
    r[2:0]   = 3'(chunk_mod(64'(a), 2, 5, 1'b1));
    r[5:3]   = 3'(chunk_mod(64'(a), 3, 7, 1'b0));
    r[10:6]  = 5'(chunk_mod(64'(a), 4, 17, 1'b1));
    r[15:11] = 5'(chunk_mod(64'(a), 5, 31, 1'b0));
    r[22:16] = 7'(chunk_mod(64'(a), 7, 127, 1'b0));
    return r;
  endfunction

  function automatic logic [63:0] ref_enc(input logic [38:0] a);
    return {ref_res(a), a};
  endfunction

  // upper 52 bits of an encoded page address: the PPN_enc field of a PTE
  function automatic logic [51:0] ref_ppn_enc(input logic [38:0] page_pa);
    logic [63:0] e;
    e = ref_enc(page_pa);
    return e[63:12];
  endfunction

  function automatic bit ref_valid(input logic [63:0] w);
    return w[63:39] == ref_res(w[38:0]);
  endfunction

  // ---------------- PRINCE-based link ----------------
  localparam logic [3:0] SB [16] = '{4'hb, 4'hf, 4'h3, 4'h2, 4'ha, 4'hc, 4'h9, 4'h1,
                                     4'h6, 4'h7, 4'h8, 4'h0, 4'he, 4'h5, 4'hd, 4'h4};
  localparam int SR64 [16] = '{0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11};
  localparam int SR52 [13] = '{0, 5, 10, 2, 7, 12, 4, 9, 1, 6, 11, 3, 8};
  localparam logic [63:0] RCS [3] = '{64'h0, 64'h13198a2e03707344, 64'ha4093822299f31d0};

  // nibble array, element 0 = most significant nibble
  typedef logic [3:0] nib16_t [16];

  function automatic void mhat_blk(ref logic [3:0] n [16], input int first, input int sh);
    logic [3:0] in [4];
    logic [3:0] mask [4];
    for (int i = 0; i < 4; i++) mask[i] = 4'b1111 & ~(4'b1000 >> i);   // M_i
    for (int k = 0; k < 4; k++) in[k] = n[first + k];
    for (int j = 0; j < 4; j++) begin
      n[first + j] = 4'h0;
      for (int k = 0; k < 4; k++) n[first + j] ^= in[k] & mask[(j + k + sh) % 4];
    end
  endfunction

  // w = 64 or 52
  function automatic logic [63:0] ref_link(input logic [63:0] d, input logic [63:0] k, input int w);
    logic [3:0] n [16];
    logic [3:0] t [16];
    int         nn;
    logic [63:0] s;
    nn = w / 4;
    s  = d ^ k;
    for (int r = 1; r <= 2; r++) begin
      for (int i = 0; i < nn; i++) n[i] = SB[s[w-1-4*i -: 4]];
      for (int i = nn; i < 16; i++) n[i] = 4'h0;
      if (w == 64) begin
        mhat_blk(n, 0, 0); mhat_blk(n, 4, 1); mhat_blk(n, 8, 1); mhat_blk(n, 12, 0);
        for (int i = 0; i < 16; i++) t[i] = n[SR64[i]];
      end else begin
        mhat_blk(n, 0, 0); mhat_blk(n, 4, 1); mhat_blk(n, 8, 0);
        for (int i = 0; i < 12; i++) n[12] ^= n[i];
        for (int i = 0; i < 13; i++) t[i] = n[SR52[i]];
      end
      s = '0;
      for (int i = 0; i < nn; i++) s[w-1-4*i -: 4] = t[i];
      s = s ^ k ^ (RCS[r] & ((w == 64) ? 64'hffff_ffff_ffff_ffff : 64'h000f_ffff_ffff_ffff));
    end
    return s;
  endfunction

  function automatic logic [63:0] ref_link64(input logic [63:0] d, input logic [63:0] k);
    return ref_link(d, k, 64);
  endfunction

  function automatic logic [51:0] ref_link52(input logic [51:0] d, input logic [51:0] k);
    logic [63:0] r;
    r = ref_link(64'(d), 64'(k), 52);
    return r[51:0];
  endfunction

  // ---------------- byte xor link ----------------
  function automatic logic [7:0] ref_byte_key(input logic [38:0] byte_addr);
    logic [63:0] e;
    logic [7:0]  k;
    e = ref_enc(byte_addr);
    k = '0;
    for (int b = 0; b < 8; b++) k ^= e[8*b +: 8];
    return k;
  endfunction

  // xor mask for the 8-byte word containing byte address a
  function automatic logic [63:0] ref_mask(input logic [38:0] a);
    logic [63:0] m;
    for (int j = 0; j < 8; j++) m[8*j +: 8] = ref_byte_key({a[38:3], 3'(j)});
    return m;
  endfunction

  // ---------------- linked page table entries ----------------
  // pointer to the next-level table at physical address next_pa, reached
  // with index vpn_i: returns the PTE as it sits in the linked table
  function automatic logic [63:0] ref_pte_ptr(input logic [38:0] next_pa, input logic [8:0] vpn_i);
    logic [63:0] plain;
    logic [63:0] e;
    e     = ref_enc(next_pa);
    plain = {2'b00, e[63:12], 2'b00, 8'h01};
    return ref_link64(plain, ref_enc(39'(vpn_i)));
  endfunction

  // leaf for virtual address va mapping the 4 KiB page at page_pa
  function automatic logic [63:0] ref_pte_leaf(input logic [38:0] va, input logic [38:0] page_pa,
                                               input logic [7:0] flags);
    logic [63:0] vpn_enc, e, plain;
    logic [51:0] ppn_l;
    vpn_enc = ref_enc({va[38:12], 12'h000});
    e       = ref_enc(page_pa);
    ppn_l   = ref_link52(e[63:12], vpn_enc[63:12]);
    plain   = {2'b00, ppn_l, 2'b00, flags};
    return ref_link64(plain, ref_enc(39'(va[20:12])));
  endfunction

endpackage
