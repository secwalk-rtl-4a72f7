// res_ptw: residue page table walker datapath (ResPTW).
//
// The arithmetic and linking half of the secure page table walk. A
// controller (the walker FSM, or the MMU for TLB hits) selects one operation
// per cycle with state_i; the block adds/subtracts in the encoded domain,
// unlinks page table entries and checks every result:
//
//   RP_VPN       result = VA_enc (-) Enc(PO)          (MMU operands)
//                The low 12 bits must be zero. result is kept as VPN_enc,
//                the key of the final 52-bit unlink and of the TLB link.
//   RP_PTE_ADDR  result = a (+) Enc(op_b)             (walker operands)
//                a is the encoded table base, op_b = vpn[i]*8. Enc(vpn[i])
//                is kept as the key of the next 64-bit unlink.
//   RP_LEAF      result = {P52^-1(PTE.ppn, VPN_enc), 12'b0} (+) Enc(op_b)
//                op_b = page offset: the final encoded physical address.
//   RP_TLB       result = {P64^-1(entry, VPN_enc).ppn, 12'b0} (+) Enc(op_b)
//                entry (a linked TLB entry) comes in on mmu_op_a_i.
//
// decoded_rdata_o = P64^-1(rdata_xorcorr_i, Enc(vpn[i])) is the unlinked PTE
// the walker reads (in RP_TLB: the unlinked TLB entry); decoded_pte_o is the
// 52-bit unlinked PPN of a leaf. res_fault_o is raised in the same cycle when
// any operand or the result is not a valid codeword or the VPN_enc low bits
// are not zero; integrity of an intermediate PTE's PPN is checked by the
// addition that uses it as the next table base.
//
// The operations, the two unlink units, the VPN[i]_enc and VPN_enc
// registers, the residue encoder on the operand, the residue adder and the
// 12-bit-zero and codeword compares joined into res_fault follow the ResPTW
// block diagram and the walk steps of SecWalk. The operation encoding and
// the merging of the intermediate PPN check into the next address addition
// are this design's choices. Registers update on the rising clock edge;
// everything else is combinational.
module res_ptw
  import secwalk_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  rp_state_e   state_i,
  input  logic [63:0] rdata_xorcorr_i,   // PTE read by the walker
  input  enc_addr_t   ptw_op_a_i,
  input  logic [63:0] ptw_op_b_i,
  input  logic [63:0] mmu_op_a_i,
  input  logic [63:0] mmu_op_b_i,
  output logic [63:0] decoded_rdata_o,
  output logic [PPN_ENC_W-1:0] decoded_pte_o,
  output enc_addr_t   result_o,
  output logic        res_fault_o,
  output enc_addr_t   vpn_enc_o
);
  enc_addr_t   vpn_enc_q;     // VPN_enc
  enc_addr_t   vpn_key_q;     // VA.vpn[i]_enc
  logic        use_mmu;
  enc_addr_t   op_a, enc_b;
  logic [63:0] op_b;
  logic [63:0] unlink1_in, unlink1_key;
  logic        add_fault;

  assign use_mmu = (state_i == RP_VPN) || (state_i == RP_TLB);
  assign op_b    = use_mmu ? mmu_op_b_i : ptw_op_b_i;

  res_encode u_enc_b (.addr_i(op_b[ADDR_W-1:0]), .enc_o(enc_b));

  assign unlink1_in  = (state_i == RP_TLB) ? mmu_op_a_i : rdata_xorcorr_i;
  assign unlink1_key = (state_i == RP_TLB) ? vpn_enc_q  : vpn_key_q;

  prince_link #(.BLOCK_W(64)) u_unlink1 (
    .data_i(unlink1_in), .key_i(unlink1_key), .unlink_i(1'b1), .data_o(decoded_rdata_o)
  );

  prince_link #(.BLOCK_W(PPN_ENC_W)) u_unlink2 (
    .data_i(decoded_rdata_o[61:10]), .key_i(vpn_enc_q[63:12]), .unlink_i(1'b1),
    .data_o(decoded_pte_o)
  );

  always_comb begin
    unique case (state_i)
      RP_VPN:      op_a = mmu_op_a_i;
      RP_LEAF:     op_a = {decoded_pte_o, 12'b0};
      RP_TLB:      op_a = {decoded_rdata_o[61:10], 12'b0};
      default:     op_a = ptw_op_a_i;
    endcase
  end

  res_adder u_add (
    .a_i(op_a), .b_i(enc_b), .sub_i(state_i == RP_VPN),
    .y_o(result_o), .fault_o(add_fault)
  );

  always_comb begin
    res_fault_o = 1'b0;
    if (state_i != RP_IDLE)
      res_fault_o = add_fault || ((state_i == RP_VPN) && (result_o[11:0] != 12'd0));
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      vpn_enc_q <= '0;
      vpn_key_q <= '0;
    end else begin
      if (state_i == RP_VPN)      vpn_enc_q <= result_o;
      if (state_i == RP_PTE_ADDR) vpn_key_q <= encode(addr_t'(op_b[11:3]));
    end
  end

  assign vpn_enc_o = vpn_enc_q;
endmodule
