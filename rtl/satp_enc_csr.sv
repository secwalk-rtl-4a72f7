// satp_enc_csr: the encoded page-table base register.
//
// The standard satp register has no room for an encoded root PPN, so SecWalk
// adds a CSR that holds it in the multi-residue encoded form: the walk starts
// at the codeword {ppn_enc, 12'b0}. Layout of the 64-bit CSR (this design's
// choice): [63:60] MODE (0 = bare, 8 = Sv39, as in satp), [59:52] zero,
// [51:0] PPN_enc. It is accessed like any CSR: csrrw / csrrs / csrrc (op 1 /
// 2 / 3) with a read of the old value in the same cycle; the write takes
// effect at the next clock edge. MODE is WARL: a write of any mode other than
// bare or Sv39 keeps the old mode. ppn_enc_valid_o tells whether the stored
// PPN is a valid codeword. Reset clears the register (bare mode).
module satp_enc_csr
  import secwalk_pkg::*;
#(
  parameter logic [11:0] CSR_ADDR = 12'h5c0   // custom supervisor read/write CSR
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        csr_en_i,
  input  logic [1:0]  csr_op_i,     // 1 write, 2 set, 3 clear
  input  logic [11:0] csr_addr_i,
  input  logic [63:0] csr_wdata_i,
  output logic [63:0] csr_rdata_o,
  output logic        sv39_o,
  output logic [PPN_ENC_W-1:0] ppn_enc_o,
  output logic        ppn_enc_valid_o
);
  logic [3:0]           mode_q;
  logic [PPN_ENC_W-1:0] ppn_q;
  logic [63:0]          cur, nxt;
  logic                 hit;

  assign cur         = {mode_q, 8'b0, ppn_q};
  assign hit         = csr_en_i && (csr_addr_i == CSR_ADDR);
  assign csr_rdata_o = hit ? cur : '0;

  always_comb begin
    unique case (csr_op_i)
      2'd1:    nxt = csr_wdata_i;
      2'd2:    nxt = cur | csr_wdata_i;
      2'd3:    nxt = cur & ~csr_wdata_i;
      default: nxt = cur;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mode_q <= SATP_MODE_BARE;
      ppn_q  <= '0;
    end else if (hit && csr_op_i != 2'd0) begin
      ppn_q <= nxt[PPN_ENC_W-1:0];
      if (nxt[63:60] == SATP_MODE_BARE || nxt[63:60] == SATP_MODE_SV39)
        mode_q <= nxt[63:60];
    end
  end

  assign sv39_o          = (mode_q == SATP_MODE_SV39);
  assign ppn_enc_o       = ppn_q;
  assign ppn_enc_valid_o = is_codeword({ppn_q, 12'b0});
endmodule
