// secwalk_mmu: memory management unit with secure translation.
//
// Translates an encoded virtual address VA_enc into an encoded physical
// address PA_enc without ever leaving the residue-protected domain:
//
//   M_VPN   VPN_enc = VA_enc (-) Enc(PO) in res_ptw; a VA_enc that is not a
//           codeword is caught here. In bare mode (satp_enc MODE = 0) the
//           checked VA_enc is returned as PA_enc.
//   M_TLB   look up the ITLB (instruction fetch) or DTLB (data access) with
//           the plain VPN. On a hit res_ptw unlinks the entry with VPN_enc,
//           checks the PPN and adds Enc(PO): PA_enc is ready.
//   M_WALK  on a miss the walker runs the secure page table walk; a good
//           result is written to the TLB (linked with VPN_enc) and returned.
//
// Request: req_valid_i/req_ready_o handshake, one translation at a time.
// Response: resp_valid_o pulses for one cycle with PA_enc, a page fault flag
// (Sv39 rules) and a residue fault flag (a fault attack was detected: the
// core must trap). resp_tlb_hit_o tells whether the TLB served it. Latency:
// 3 cycles on a TLB hit, 2 in bare mode, a walk plus 3 on a miss.
// The split into TLBs, walker and residue walker and the role of each
// follow the SecWalk MMU; the FSM, the single shared request port and the
// permission checks on TLB hits are this design's choices.
module secwalk_mmu
  import secwalk_pkg::*;
#(
  parameter int unsigned ITLB_ENTRIES = 16,
  parameter int unsigned DTLB_ENTRIES = 16
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        sv39_i,
  input  logic [PPN_ENC_W-1:0] root_ppn_enc_i,
  input  logic        flush_i,
  // translation request / response
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  enc_addr_t   req_va_enc_i,
  input  logic        req_store_i,
  input  logic        req_instr_i,
  output logic        resp_valid_o,
  output enc_addr_t   resp_pa_enc_o,
  output logic        resp_page_fault_o,
  output logic        resp_res_fault_o,
  output logic        resp_tlb_hit_o,
  // page directory memory port of the walker
  output logic        mem_req_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  input  logic        mem_gnt_i,
  input  logic        mem_rvalid_i,
  input  logic [63:0] mem_rdata_i
);
  typedef enum logic [2:0] {M_IDLE, M_VPN, M_TLB, M_WALK, M_RESP} mst_e;

  mst_e        st_q;
  enc_addr_t   va_q;
  logic        store_q, instr_q;
  enc_addr_t   pa_q;
  logic        pf_q, rf_q, hit_q;

  // residue walker
  rp_state_e   rp_state, ptw_rp_state;
  enc_addr_t   rp_result, ptw_op_a, vpn_enc;
  logic [63:0] ptw_op_b, ptw_rdata, mmu_op_a, mmu_op_b;
  logic [63:0] decoded_rdata;
  logic [PPN_ENC_W-1:0] decoded_pte;
  logic        rp_fault;

  // walker
  logic        ptw_start, ptw_done, ptw_pf, ptw_rf, ptw_busy;
  enc_addr_t   ptw_pa;
  logic [63:0] ptw_leaf;

  // TLBs
  logic        itlb_hit, dtlb_hit, tlb_hit;
  logic [63:0] itlb_entry, dtlb_entry;
  logic        itlb_fill, dtlb_fill;
  logic [63:0] tlb_pte;
  logic        perm_fault;

  res_ptw u_res_ptw (
    .clk_i, .rst_ni,
    .state_i(rp_state), .rdata_xorcorr_i(ptw_rdata),
    .ptw_op_a_i(ptw_op_a), .ptw_op_b_i(ptw_op_b),
    .mmu_op_a_i(mmu_op_a), .mmu_op_b_i(mmu_op_b),
    .decoded_rdata_o(decoded_rdata), .decoded_pte_o(decoded_pte),
    .result_o(rp_result), .res_fault_o(rp_fault), .vpn_enc_o(vpn_enc)
  );

  secwalk_ptw u_ptw (
    .clk_i, .rst_ni,
    .start_i(ptw_start), .va_enc_i(va_q), .is_store_i(store_q), .is_instr_i(instr_q),
    .root_ppn_enc_i(root_ppn_enc_i),
    .busy_o(ptw_busy), .done_o(ptw_done), .page_fault_o(ptw_pf), .res_fault_o(ptw_rf),
    .pa_enc_o(ptw_pa), .leaf_pte_o(ptw_leaf),
    .rp_state_o(ptw_rp_state), .rp_rdata_o(ptw_rdata), .rp_op_a_o(ptw_op_a),
    .rp_op_b_o(ptw_op_b), .rp_result_i(rp_result), .rp_fault_i(rp_fault),
    .rp_decoded_rdata_i(decoded_rdata), .rp_decoded_pte_i(decoded_pte),
    .mem_req_o, .mem_addr_o, .mem_gnt_i, .mem_rvalid_i, .mem_rdata_i
  );

  secure_tlb #(.ENTRIES(ITLB_ENTRIES)) u_itlb (
    .clk_i, .rst_ni, .flush_i,
    .lookup_vpn_i(va_q[38:12]), .hit_o(itlb_hit), .entry_o(itlb_entry),
    .fill_i(itlb_fill), .fill_vpn_i(va_q[38:12]), .fill_pte_i(ptw_leaf), .fill_key_i(vpn_enc)
  );

  secure_tlb #(.ENTRIES(DTLB_ENTRIES)) u_dtlb (
    .clk_i, .rst_ni, .flush_i,
    .lookup_vpn_i(va_q[38:12]), .hit_o(dtlb_hit), .entry_o(dtlb_entry),
    .fill_i(dtlb_fill), .fill_vpn_i(va_q[38:12]), .fill_pte_i(ptw_leaf), .fill_key_i(vpn_enc)
  );

  assign tlb_hit = instr_q ? itlb_hit : dtlb_hit;

  always_comb begin
    rp_state = RP_IDLE;
    mmu_op_a = va_q;
    mmu_op_b = {52'd0, va_q[11:0]};
    unique case (st_q)
      M_VPN:  rp_state = RP_VPN;
      M_TLB:  if (tlb_hit) begin
                rp_state = RP_TLB;
                mmu_op_a = instr_q ? itlb_entry : dtlb_entry;
              end
      M_WALK: rp_state = ptw_rp_state;
      default: ;
    endcase
  end

  // permissions of the unlinked TLB entry
  assign tlb_pte    = decoded_rdata;
  assign perm_fault = (store_q && !tlb_pte[PTE_W]) || (instr_q && !tlb_pte[PTE_X])
                      || (!store_q && !instr_q && !tlb_pte[PTE_R]) || !tlb_pte[PTE_V];

  assign ptw_start = (st_q == M_TLB) && !tlb_hit;
  assign itlb_fill = (st_q == M_WALK) && ptw_done && !ptw_pf && !ptw_rf && instr_q;
  assign dtlb_fill = (st_q == M_WALK) && ptw_done && !ptw_pf && !ptw_rf && !instr_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q    <= M_IDLE;
      va_q    <= '0;
      store_q <= 1'b0;
      instr_q <= 1'b0;
      pa_q    <= '0;
      pf_q    <= 1'b0;
      rf_q    <= 1'b0;
      hit_q   <= 1'b0;
    end else begin
      unique case (st_q)
        M_IDLE: if (req_valid_i) begin
          va_q    <= req_va_enc_i;
          store_q <= req_store_i;
          instr_q <= req_instr_i;
          pf_q    <= 1'b0;
          rf_q    <= 1'b0;
          hit_q   <= 1'b0;
          st_q    <= M_VPN;
        end
        M_VPN: begin
          if (rp_fault) begin
            rf_q <= 1'b1;
            pa_q <= '0;
            st_q <= M_RESP;
          end else if (!sv39_i) begin
            pa_q <= va_q;
            st_q <= M_RESP;
          end else st_q <= M_TLB;
        end
        M_TLB: begin
          if (tlb_hit) begin
            hit_q <= 1'b1;
            pa_q  <= rp_result;
            rf_q  <= rp_fault;
            pf_q  <= !rp_fault && perm_fault;
            st_q  <= M_RESP;
          end else st_q <= M_WALK;
        end
        M_WALK: if (ptw_done) begin
          pa_q <= ptw_pa;
          pf_q <= ptw_pf;
          rf_q <= ptw_rf;
          st_q <= M_RESP;
        end
        M_RESP: st_q <= M_IDLE;
        default: st_q <= M_IDLE;
      endcase
    end
  end

  // the walker only runs while the MMU waits for it
  a_walk_owned: assert property (@(posedge clk_i) disable iff (!rst_ni)
    ptw_busy |-> st_q == M_WALK);

  assign req_ready_o       = (st_q == M_IDLE);
  assign resp_valid_o      = (st_q == M_RESP);
  assign resp_pa_enc_o     = (pf_q || rf_q) ? '0 : pa_q;
  assign resp_page_fault_o = pf_q;
  assign resp_res_fault_o  = rf_q;
  assign resp_tlb_hit_o    = hit_q;
endmodule
