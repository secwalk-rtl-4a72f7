// res_alu: execute unit for the SecWalk pointer instructions.
//
// Executes, in one combinational step, the instructions that software uses
// on encoded pointers and for setting up linked page tables:
//   RALU_ENC    rd = Enc(rs1[38:0])           encode a plain pointer
//   RALU_DEC    rd = rs1[38:0]                decode (drop the residues)
//   RALU_ADD    rd = rs1 (+) rs2              encoded pointer addition
//   RALU_SUB    rd = rs1 (-) rs2              encoded pointer subtraction
//   RALU_LINK1  rd = P64(rs1, rs2)            vpnlink1: link a whole PTE
//   RALU_LINK2  rd = {P52(rs1[63:12], rs2[63:12]), 12'b0}
//                                             vpnlink2: link the encoded PPN
//                                             of a leaf with VPN_enc
// fault_o is raised when an encoded operand is not a valid codeword (DEC,
// ADD, SUB), when an addition leaves the 39-bit space, or when ENC gets a
// value with bits above bit 38 set. The instruction set (encode, decode, add,
// subtract, vpnlink1, vpnlink2) follows SecWalk; the operand order of the
// link instructions (rs1 = data, rs2 = key), which operands are checked and
// the opcode numbering are this design's choices.
module res_alu
  import secwalk_pkg::*;
(
  input  logic      valid_i,
  input  ralu_op_e  op_i,
  input  enc_addr_t rs1_i,
  input  enc_addr_t rs2_i,
  output enc_addr_t rd_o,
  output logic      fault_o
);
  enc_addr_t add_y;
  logic      add_fault;
  logic [63:0] link1_y;
  logic [51:0] link2_y;

  res_adder u_add (
    .a_i(rs1_i), .b_i(rs2_i), .sub_i(op_i == RALU_SUB),
    .y_o(add_y), .fault_o(add_fault)
  );

  prince_link #(.BLOCK_W(64)) u_link1 (
    .data_i(rs1_i), .key_i(rs2_i), .unlink_i(1'b0), .data_o(link1_y)
  );

  prince_link #(.BLOCK_W(52)) u_link2 (
    .data_i(rs1_i[63:12]), .key_i(rs2_i[63:12]), .unlink_i(1'b0), .data_o(link2_y)
  );

  always_comb begin
    rd_o    = '0;
    fault_o = 1'b0;
    unique case (op_i)
      RALU_ENC: begin
        rd_o    = encode(rs1_i[ADDR_W-1:0]);
        fault_o = |rs1_i[XLEN-1:ADDR_W];
      end
      RALU_DEC: begin
        rd_o    = {{(XLEN-ADDR_W){1'b0}}, rs1_i[ADDR_W-1:0]};
        fault_o = !is_codeword(rs1_i);
      end
      RALU_ADD, RALU_SUB: begin
        rd_o    = add_y;
        fault_o = add_fault;
      end
      RALU_LINK1: rd_o = link1_y;
      RALU_LINK2: rd_o = {link2_y, 12'b0};
      default: ;
    endcase
    fault_o = fault_o & valid_i;
  end
endmodule
