// res_adder: encoded addition and subtraction with an integrated check.
//
// Works on two multi-residue encoded 64-bit addresses. The 39-bit payloads are
// added (or subtracted) as plain integers and every residue is added (or
// subtracted) modulo its own modulus, so a correct result is again a valid
// codeword. The result's payload is then encoded afresh and compared with the
// computed residues; any mismatch, a redundancy bit outside the used 23, or a
// carry/borrow out of the 39-bit address space raises fault_o, so faults
// cannot pile up over a chain of additions. The compare on the result follows
// the residue adder and its compare stage in the residue page table walker.
// The operands are checked as well (a residue pushed above its modulus would
// otherwise be reduced away by the modular addition), and so is the carry:
// both are this design's additions.
// Purely combinational.
//
//   a_i, b_i  encoded operands
//   sub_i     1: y = a - b, 0: y = a + b
//   y_o       encoded result
//   fault_o   result is not a valid codeword
module res_adder
  import secwalk_pkg::*;
(
  input  enc_addr_t a_i,
  input  enc_addr_t b_i,
  input  logic      sub_i,
  output enc_addr_t y_o,
  output logic      fault_o
);
  logic [ADDR_W:0] sum;   // one extra bit for the carry / borrow
  red_t            red;
  red_t            red_chk;

  always_comb begin
    if (sub_i) sum = {1'b0, a_i[ADDR_W-1:0]} - {1'b0, b_i[ADDR_W-1:0]};
    else       sum = {1'b0, a_i[ADDR_W-1:0]} + {1'b0, b_i[ADDR_W-1:0]};
    red     = red_addsub(a_i[XLEN-1:ADDR_W], b_i[XLEN-1:ADDR_W], sub_i);
    y_o     = {red, sum[ADDR_W-1:0]};
    red_chk = residues(sum[ADDR_W-1:0]);
    fault_o = (red_chk != red) || sum[ADDR_W]
              || (a_i[XLEN-1:ADDR_W] != residues(a_i[ADDR_W-1:0]))
              || (b_i[XLEN-1:ADDR_W] != residues(b_i[ADDR_W-1:0]));
  end
endmodule
