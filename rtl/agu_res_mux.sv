// agu_res_mux: address generation with the residue-ALU bypass.
//
// A load or store of a protected program is addressed by an encoded pointer
// that the residue ALU has already formed and checked (base (+) offset, in
// the code). The address generation unit therefore gets a second source:
// when res_agu_valid_i is high the virtual address is the residue ALU's
// result res_data_i (mux input 1); otherwise it is the core's ordinary
// sum operand_a_i + imm_i (mux input 0), used by unprotected accesses.
// The ordinary adder would destroy the residues of an encoded pointer, which
// is why the protected path must skip it.
//
// Purely combinational; vaddr_o goes to the load/store unit and from there
// to the MMU as VA_enc. The mux, its two inputs and the select signal follow
// the SecWalk load-store unit; the plain 64-bit adder stands for the core's
// existing address adder.
module agu_res_mux (
  input  logic [63:0] operand_a_i,     // base register
  input  logic [63:0] imm_i,           // sign-extended immediate
  input  logic [63:0] res_data_i,      // residue ALU result
  input  logic        res_agu_valid_i, // take the residue ALU result
  output logic [63:0] vaddr_o
);
  assign vaddr_o = res_agu_valid_i ? res_data_i : operand_a_i + imm_i;
endmodule
