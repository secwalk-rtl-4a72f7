// secwalk_top: the SecWalk additions to an application-class RISC-V core.
//
// Brings together the hardware a core needs to keep every memory access
// protected by the multi-residue address code, from the pointer register to
// the data cache:
//   - res_alu       the new pointer instructions (encode, decode, encoded
//                   add/sub) and the page-table set-up instructions
//                   vpnlink1 / vpnlink2;
//   - agu_res_mux   address generation: the virtual address of a load or
//                   store is either the residue ALU result (encoded pointer
//                   arithmetic, res_agu_valid_i = 1) or base + immediate;
//   - satp_enc_csr  the CSR holding the encoded root of the page table;
//   - secwalk_mmu   secure translation VA_enc -> PA_enc (linked TLBs,
//                   walker, residue walker);
//   - ptr_reduce + link_xor  the byte xor link of load and store data with
//                   the encoded physical address of the access.
// The rest of the core (fetch, decode, issue, register file, caches) is not
// part of this block; its connections are ports. The encoded physical
// address of the last successful translation is held in a register and is
// the address the data link of the following load or store uses
// (dcache_addr_o, the keys of link_xor). Port timing: the ALU, the address
// mux and the data link are combinational; the MMU takes the address from
// the mux in the cycle req_valid_i and req_ready_o are both high. CSR writes
// and translations are timed as in their blocks.
// Which blocks exist and how data flows between them follows the SecWalk
// core and load-store unit; holding the last PA_enc for the data link is this
// design's simplification of the load and store units.
module secwalk_top
  import secwalk_pkg::*;
#(
  parameter int unsigned ITLB_ENTRIES = 16,
  parameter int unsigned DTLB_ENTRIES = 16
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // CSR access (satp_enc)
  input  logic        csr_en_i,
  input  logic [1:0]  csr_op_i,
  input  logic [11:0] csr_addr_i,
  input  logic [63:0] csr_wdata_i,
  output logic [63:0] csr_rdata_o,
  // residue ALU (execute stage)
  input  logic        alu_valid_i,
  input  ralu_op_e    alu_op_i,
  input  enc_addr_t   alu_rs1_i,
  input  enc_addr_t   alu_rs2_i,
  output enc_addr_t   alu_rd_o,
  output logic        alu_fault_o,
  // address generation and translation
  input  logic [63:0] agu_operand_a_i,
  input  logic [63:0] agu_imm_i,
  input  logic        res_agu_valid_i,
  input  logic        sfence_i,
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  logic        req_store_i,
  input  logic        req_instr_i,
  output logic        resp_valid_o,
  output enc_addr_t   resp_pa_enc_o,
  output logic        resp_page_fault_o,
  output logic        resp_res_fault_o,
  output logic        resp_tlb_hit_o,
  // page table walker memory port
  output logic        ptw_mem_req_o,
  output logic [ADDR_W-1:0] ptw_mem_addr_o,
  input  logic        ptw_mem_gnt_i,
  input  logic        ptw_mem_rvalid_i,
  input  logic [63:0] ptw_mem_rdata_i,
  // linked data access to the data cache
  input  logic        en_linking_i,
  output logic [ADDR_W-1:0] dcache_addr_o,
  input  logic [63:0] store_data_i,
  output logic [63:0] dcache_wdata_o,
  input  logic [63:0] dcache_rdata_i,
  output logic [63:0] load_data_o
);
  logic                 sv39;
  logic [PPN_ENC_W-1:0] root_ppn_enc;
  logic                 root_valid;
  enc_addr_t            pa_enc_q;
  logic [63:0]          link_key;
  enc_addr_t            vaddr;

  satp_enc_csr u_satp (
    .clk_i, .rst_ni, .csr_en_i, .csr_op_i, .csr_addr_i, .csr_wdata_i, .csr_rdata_o,
    .sv39_o(sv39), .ppn_enc_o(root_ppn_enc), .ppn_enc_valid_o(root_valid)
  );

  res_alu u_alu (
    .valid_i(alu_valid_i), .op_i(alu_op_i), .rs1_i(alu_rs1_i), .rs2_i(alu_rs2_i),
    .rd_o(alu_rd_o), .fault_o(alu_fault_o)
  );

  agu_res_mux u_agu (
    .operand_a_i(agu_operand_a_i), .imm_i(agu_imm_i),
    .res_data_i(alu_rd_o), .res_agu_valid_i, .vaddr_o(vaddr)
  );

  secwalk_mmu #(.ITLB_ENTRIES(ITLB_ENTRIES), .DTLB_ENTRIES(DTLB_ENTRIES)) u_mmu (
    .clk_i, .rst_ni,
    .sv39_i(sv39), .root_ppn_enc_i(root_ppn_enc), .flush_i(sfence_i),
    .req_valid_i, .req_ready_o, .req_va_enc_i(vaddr), .req_store_i, .req_instr_i,
    .resp_valid_o, .resp_pa_enc_o, .resp_page_fault_o, .resp_res_fault_o, .resp_tlb_hit_o,
    .mem_req_o(ptw_mem_req_o), .mem_addr_o(ptw_mem_addr_o), .mem_gnt_i(ptw_mem_gnt_i),
    .mem_rvalid_i(ptw_mem_rvalid_i), .mem_rdata_i(ptw_mem_rdata_i)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                                                      pa_enc_q <= '0;
    else if (resp_valid_o && !resp_page_fault_o && !resp_res_fault_o) pa_enc_q <= resp_pa_enc_o;
  end

  ptr_reduce u_reduce (.pa_enc_i(pa_enc_q), .key_o(link_key));

  link_xor u_xor (
    .en_linking_i, .key_i(link_key),
    .store_data_i, .store_data_o(dcache_wdata_o),
    .load_data_i(dcache_rdata_i), .load_data_o
  );

  assign dcache_addr_o = pa_enc_q[ADDR_W-1:0];

  // a walk from a root PPN that is not a codeword always ends in a residue
  // fault
  a_root_checked: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (resp_valid_o && sv39 && !root_valid && !resp_tlb_hit_o) |-> resp_res_fault_o);
endmodule
