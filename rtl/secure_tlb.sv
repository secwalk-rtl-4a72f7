// secure_tlb: fully associative TLB whose entries are linked to VPN_enc.
//
// A plain TLB would let a fault on its tag match or its data array hand out
// a wrong translation unnoticed. Here every entry is stored linked: on a fill
// the leaf PTE (its PPN field already holding the plain encoded PPN_enc) is
// passed through the 64-bit link P64 with the encoded VPN of the virtual
// address as key, and the linked word is what the array keeps. On a hit the
// entry is handed out still linked; the MMU unlinks it with the VPN_enc of
// the access being translated and checks the PPN's residues. An entry picked
// for the wrong address, or a corrupted entry, fails that check.
//
// Lookup is combinational on the plain 27-bit VPN. A fill writes at the next
// clock edge into the first invalid entry, otherwise into the entry a
// round-robin pointer selects. flush_i (sfence.vma) invalidates everything.
// Linking TLB entries with VPN_enc follows SecWalk; the size (ENTRIES = 16,
// the CVA6 default), full associativity, 4 KiB entries only and round-robin
// replacement are this design's choices.
module secure_tlb
  import secwalk_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        flush_i,
  input  logic [26:0] lookup_vpn_i,
  output logic        hit_o,
  output logic [63:0] entry_o,        // linked PTE of the hit
  input  logic        fill_i,
  input  logic [26:0] fill_vpn_i,
  input  logic [63:0] fill_pte_i,     // leaf PTE, PPN field = PPN_enc
  input  enc_addr_t   fill_key_i      // VPN_enc of the filled address
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] valid_q;
  logic [26:0]        vpn_q  [ENTRIES];
  logic [63:0]        data_q [ENTRIES];
  logic [IW-1:0]      rr_q;
  logic [IW-1:0]      victim;
  logic [63:0]        linked;

  prince_link #(.BLOCK_W(64)) u_link (
    .data_i(fill_pte_i), .key_i(fill_key_i), .unlink_i(1'b0), .data_o(linked)
  );

  always_comb begin
    hit_o   = 1'b0;
    entry_o = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (valid_q[i] && vpn_q[i] == lookup_vpn_i && !hit_o) begin
        hit_o   = 1'b1;
        entry_o = data_q[i];
      end
  end

  always_comb begin
    logic found;
    found  = 1'b0;
    victim = rr_q;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (!valid_q[i] && !found) begin
        found  = 1'b1;
        victim = IW'(i);
      end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q <= '0;
      rr_q    <= '0;
    end else if (flush_i) begin
      valid_q <= '0;
    end else if (fill_i) begin
      valid_q[victim] <= 1'b1;
      if (IW'(ENTRIES - 1) == rr_q) rr_q <= '0;
      else                          rr_q <= rr_q + 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (fill_i && !flush_i) begin
      vpn_q[victim]  <= fill_vpn_i;
      data_q[victim] <= linked;
    end
  end
endmodule
