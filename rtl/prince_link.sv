// prince_link: the SecWalk linking function P_x(y, k) and its inverse.
//
// A keyed, bijective, diffusing permutation of a BLOCK_W-bit word built from
// a round-reduced PRINCE. It binds a page table entry to the part of the
// virtual address it belongs to: page tables hold linked entries, and the
// walker unlinks them with the key taken from the address it translates. With
// the wrong key the unlinked word is scrambled, so the residue code of the
// PPN inside it fails its check. SecWalk uses two sizes: 64 bits for whole
// PTEs (vpnlink1 / vpnunlink1) and 52 bits for the encoded PPN of a leaf
// (vpnlink2 / vpnunlink2). Linking is the encryption direction, unlinking the
// decryption direction.
//
// One round is the PRINCE forward round: 4-bit S-box on every nibble, the
// linear layer M' (blocks M^0 / M^1, nibbles and bits numbered from the most
// significant end), the nibble permutation SR, then the round key k xor
// RC_r. The block is whitened with k before the first round. S-box, M^ blocks,
// SR and the constants RC_1..RC_5 are those of PRINCE; taking the short key
// as the round key with no key schedule and whitening, and ROUNDS = 2 forward
// rounds as "two-round reduced", is this design's reading. For 52 bits
// (13 nibbles) the design uses its own linear layer: M^0, M^1, M^0 on nibbles
// 0-11, then nibble 12 xor-accumulates the other twelve (an invertible
// Feistel-like step), and SR becomes the nibble permutation i -> 5*i mod 13;
// round constants are truncated to 52 bits.
//
// Purely combinational.
//   data_i    word to link (unlink_i = 0) or to unlink (unlink_i = 1)
//   key_i     linking key, zero-extended by the caller
//   data_o    P(data_i, key_i) or P^-1(data_i, key_i)
module prince_link #(
  parameter int unsigned BLOCK_W = 64,   // 64 or 52
  parameter int unsigned ROUNDS  = 2     // 1 .. 5
) (
  input  logic [BLOCK_W-1:0] data_i,
  input  logic [BLOCK_W-1:0] key_i,
  input  logic               unlink_i,
  output logic [BLOCK_W-1:0] data_o
);
  localparam int unsigned N = BLOCK_W / 4;   // nibbles

  typedef logic [BLOCK_W-1:0] blk_t;

  localparam logic [63:0] RC [6] = '{
    64'h0000000000000000, 64'h13198a2e03707344, 64'ha4093822299f31d0,
    64'h082efa98ec4e6c89, 64'h452821e638d01377, 64'hbe5466cf34e90c6c
  };

  // ---- nibble helpers, nibble 0 is the most significant ----
  function automatic logic [3:0] get_nib(input blk_t s, input int unsigned i);
    return s[BLOCK_W-1-4*i -: 4];
  endfunction

  function automatic blk_t set_nib(input blk_t s, input int unsigned i, input logic [3:0] v);
    blk_t r;
    r = s;
    r[BLOCK_W-1-4*i -: 4] = v;
    return r;
  endfunction

  // ---- S-box layer ----
  function automatic logic [3:0] sbox(input logic [3:0] x);
    case (x)
      4'h0: return 4'hb;  4'h1: return 4'hf;  4'h2: return 4'h3;  4'h3: return 4'h2;
      4'h4: return 4'ha;  4'h5: return 4'hc;  4'h6: return 4'h9;  4'h7: return 4'h1;
      4'h8: return 4'h6;  4'h9: return 4'h7;  4'ha: return 4'h8;  4'hb: return 4'h0;
      4'hc: return 4'he;  4'hd: return 4'h5;  4'he: return 4'hd;  default: return 4'h4;
    endcase
  endfunction

  function automatic logic [3:0] sbox_inv(input logic [3:0] y);
    logic [3:0] r;
    r = '0;
    for (int x = 0; x < 16; x++)
      if (sbox(4'(x)) == y) r = 4'(x);
    return r;
  endfunction

  function automatic blk_t s_layer(input blk_t s, input logic inv);
    blk_t r;
    r = s;
    for (int unsigned i = 0; i < N; i++)
      r = set_nib(r, i, inv ? sbox_inv(get_nib(s, i)) : sbox(get_nib(s, i)));
    return r;
  endfunction

  // ---- linear layer ----
  // M^ block on nibbles first..first+3: output nibble j, bit b (b = 0 is the
  // nibble's MSB) is the xor of bit b of every input nibble k of the block
  // with (j + k + shift) mod 4 != b.  Each block is an involution.
  function automatic blk_t mhat(input blk_t s, input int unsigned first, input int unsigned shift);
    blk_t r;
    logic [3:0] o;
    r = s;
    for (int unsigned j = 0; j < 4; j++) begin
      o = '0;
      for (int unsigned b = 0; b < 4; b++)
        for (int unsigned k = 0; k < 4; k++)
          if (((j + k + shift) % 4) != b)
            o[3-b] = o[3-b] ^ get_nib(s, first + k)[3-b];
      r = set_nib(r, first + j, o);
    end
    return r;
  endfunction

  function automatic blk_t fold_last(input blk_t s);
    logic [3:0] acc;
    acc = get_nib(s, N-1);
    for (int unsigned i = 0; i < N-1; i++) acc = acc ^ get_nib(s, i);
    return set_nib(s, N-1, acc);
  endfunction

  function automatic blk_t m_layer(input blk_t s, input logic inv);
    blk_t r;
    r = s;
    if (N == 16) begin
      r = mhat(r, 0, 0);  r = mhat(r, 4, 1);
      r = mhat(r, 8, 1);  r = mhat(r, 12, 0);
    end else begin
      if (inv) r = fold_last(r);
      r = mhat(r, 0, 0);  r = mhat(r, 4, 1);  r = mhat(r, 8, 0);
      if (!inv) r = fold_last(r);
    end
    return r;
  endfunction

  // ---- nibble permutation ----
  function automatic int unsigned sr_src(input int unsigned i);
    if (N == 16) return 4 * (((i / 4) + (i % 4)) % 4) + (i % 4);
    else         return (5 * i) % N;
  endfunction

  function automatic blk_t sr_layer(input blk_t s, input logic inv);
    blk_t r;
    r = s;
    for (int unsigned i = 0; i < N; i++)
      if (inv) r = set_nib(r, sr_src(i), get_nib(s, i));
      else     r = set_nib(r, i, get_nib(s, sr_src(i)));
    return r;
  endfunction

  always_comb begin
    blk_t s;
    s = data_i;
    if (!unlink_i) begin
      s = s ^ key_i;
      for (int unsigned r = 1; r <= ROUNDS; r++) begin
        s = sr_layer(m_layer(s_layer(s, 1'b0), 1'b0), 1'b0);
        s = s ^ key_i ^ RC[r][BLOCK_W-1:0];
      end
    end else begin
      for (int unsigned r = ROUNDS; r >= 1; r--) begin
        s = s ^ key_i ^ RC[r][BLOCK_W-1:0];
        s = s_layer(m_layer(sr_layer(s, 1'b1), 1'b1), 1'b1);
      end
      s = s ^ key_i;
    end
    data_o = s;
  end

  initial begin
    assert (BLOCK_W == 64 || BLOCK_W == 52)
      else $error("prince_link: BLOCK_W must be 64 or 52");
    assert (ROUNDS >= 1 && ROUNDS <= 5)
      else $error("prince_link: ROUNDS must be 1..5");
  end
endmodule
