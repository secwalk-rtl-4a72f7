// secwalk_ptw: the secure Sv39 page table walk controller.
//
// Walks the three-level Sv39 page table for an encoded virtual address,
// using res_ptw for all encoded arithmetic, unlinking and checking:
//
//   1. a = satp_enc.ppn_enc * 4096, i = 2          (start_i)
//   2. VPN_enc = VA_enc (-) Enc(PO)                 (done by the MMU before)
//   3. PTE address = a (+) Enc(vpn[i]*8), checked   (S_ADDR)
//      read the 8-byte PTE; remove the byte xor link of the physical access
//      with the keys of the PTE's encoded address   (S_REQ, S_WAIT)
//   4. PTE = P64^-1(PTE_l, Enc(vpn[i]))             (S_PTE, in res_ptw)
//   5/6. not a leaf: a = PTE.ppn_enc * 4096, i = i-1, back to 3 (the next
//      addition checks that a is a codeword); at i < 0 it is a page fault
//   7/8. leaf: PA_enc = P52^-1(PTE.ppn, VPN_enc) (+) Enc(PO), checked (S_LEAF)
//
// The usual Sv39 checks stay: V = 0, W without R, reserved bits set, or a
// missing R/W/X permission for the access give a page fault (page_fault_o),
// a failed residue check gives res_fault_o (the processor traps). Apart from
// V, the PTE is only interpreted after its residues were checked, so a
// faulted entry is reported as a residue fault whenever its V bit survives.
// Leaves above level 0 (2 MiB / 1 GiB pages) are reported as page faults:
// the link of a leaf uses the 4 KiB VPN_enc, so this design maps 4 KiB pages
// only.
//
// Memory port: mem_req_o/mem_addr_o held until mem_gnt_i, then one
// mem_rvalid_i with the 64-bit word. done_o pulses for one cycle with the
// outcome; pa_enc_o and leaf_pte_o (leaf with its PPN field unlinked, for
// the TLB) are valid with it. With d cycles from the granted request to the
// read data, done_o rises 3 * (3 + d) + 2 cycles after start_i for a 4 KiB
// page. The walk steps follow SecWalk; the state
// split, the reserved-bit check and the memory handshake are this design's.
module secwalk_ptw
  import secwalk_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // request from the MMU
  input  logic        start_i,
  input  enc_addr_t   va_enc_i,
  input  logic        is_store_i,
  input  logic        is_instr_i,
  input  logic [PPN_ENC_W-1:0] root_ppn_enc_i,
  output logic        busy_o,
  output logic        done_o,
  output logic        page_fault_o,
  output logic        res_fault_o,
  output enc_addr_t   pa_enc_o,
  output logic [63:0] leaf_pte_o,
  // residue datapath
  output rp_state_e   rp_state_o,
  output logic [63:0] rp_rdata_o,
  output enc_addr_t   rp_op_a_o,
  output logic [63:0] rp_op_b_o,
  input  enc_addr_t   rp_result_i,
  input  logic        rp_fault_i,
  input  logic [63:0] rp_decoded_rdata_i,
  input  logic [PPN_ENC_W-1:0] rp_decoded_pte_i,
  // memory (page directory) port
  output logic        mem_req_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  input  logic        mem_gnt_i,
  input  logic        mem_rvalid_i,
  input  logic [63:0] mem_rdata_i
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_REQ, S_WAIT, S_PTE, S_LEAF, S_DONE} st_e;

  st_e         st_q;
  logic [1:0]  lvl_q;
  enc_addr_t   va_q, a_q, pte_addr_q;
  logic        store_q, instr_q;
  logic [63:0] pte_q;
  logic        pf_q, rf_q;
  enc_addr_t   pa_q;
  logic [63:0] leaf_q;
  logic [63:0] pte_key, rdata_unxor;
  logic [8:0]  vpn_i;
  logic [63:0] pte;

  // byte xor link of the physical PTE read
  ptr_reduce u_reduce (.pa_enc_i(pte_addr_q), .key_o(pte_key));
  assign rdata_unxor = mem_rdata_i ^ pte_key;

  always_comb begin
    unique case (lvl_q)
      2'd2:    vpn_i = va_q[38:30];
      2'd1:    vpn_i = va_q[29:21];
      default: vpn_i = va_q[20:12];
    endcase
  end

  assign pte        = rp_decoded_rdata_i;
  assign rp_rdata_o = pte_q;
  assign rp_op_a_o  = a_q;
  assign rp_op_b_o  = (st_q == S_LEAF) ? {52'd0, va_q[11:0]} : {52'd0, vpn_i, 3'b000};

  always_comb begin
    unique case (st_q)
      S_ADDR:  rp_state_o = RP_PTE_ADDR;
      S_LEAF:  rp_state_o = RP_LEAF;
      default: rp_state_o = RP_IDLE;
    endcase
  end

  assign mem_req_o  = (st_q == S_REQ);
  assign mem_addr_o = {pte_addr_q[ADDR_W-1:3], 3'b000};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q       <= S_IDLE;
      lvl_q      <= 2'd2;
      va_q       <= '0;
      a_q        <= '0;
      pte_addr_q <= '0;
      store_q    <= 1'b0;
      instr_q    <= 1'b0;
      pte_q      <= '0;
      pf_q       <= 1'b0;
      rf_q       <= 1'b0;
      pa_q       <= '0;
      leaf_q     <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (start_i) begin
          va_q    <= va_enc_i;
          a_q     <= {root_ppn_enc_i, 12'b0};
          lvl_q   <= 2'd2;
          store_q <= is_store_i;
          instr_q <= is_instr_i;
          pf_q    <= 1'b0;
          rf_q    <= 1'b0;
          st_q    <= S_ADDR;
        end
        S_ADDR: begin
          pte_addr_q <= rp_result_i;
          if (rp_fault_i) begin
            rf_q <= 1'b1;
            st_q <= S_DONE;
          end else st_q <= S_REQ;
        end
        S_REQ:  if (mem_gnt_i) st_q <= S_WAIT;
        S_WAIT: if (mem_rvalid_i) begin
          pte_q <= rdata_unxor;
          st_q  <= S_PTE;
        end
        S_PTE: begin
          if (!pte[PTE_V]) begin
            pf_q <= 1'b1;
            st_q <= S_DONE;
          end else if (pte[PTE_R] || pte[PTE_X]) begin
            st_q <= S_LEAF;               // residues first, then permissions
          end else if (lvl_q == 2'd0 || pte[PTE_W] || (pte[63:62] != 2'b00)) begin
            // a scrambled entry is an attack, not a page fault
            rf_q <= !is_codeword({pte[61:10], 12'b0});
            pf_q <= is_codeword({pte[61:10], 12'b0});
            st_q <= S_DONE;
          end else begin
            a_q   <= {pte[61:10], 12'b0}; // checked by the next address addition
            lvl_q <= lvl_q - 2'd1;
            st_q  <= S_ADDR;
          end
        end
        S_LEAF: begin
          pa_q   <= rp_result_i;
          leaf_q <= {pte[63:62], rp_decoded_pte_i, pte[9:0]};
          rf_q   <= rp_fault_i;
          pf_q   <= !rp_fault_i && (
                      lvl_q != 2'd0
                      || (pte[63:62] != 2'b00)
                      || (!pte[PTE_R] && pte[PTE_W])
                      || (store_q && !pte[PTE_W])
                      || (instr_q && !pte[PTE_X])
                      || (!store_q && !instr_q && !pte[PTE_R]));
          st_q   <= S_DONE;
        end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o       = (st_q != S_IDLE);
  assign done_o       = (st_q == S_DONE);
  assign page_fault_o = pf_q;
  assign res_fault_o  = rf_q;
  assign pa_enc_o     = pa_q;
  assign leaf_pte_o   = leaf_q;
endmodule
