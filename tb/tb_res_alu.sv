// tb_res_alu: each pointer instruction against the reference model:
// encode, decode (with fault on a corrupted pointer), encoded add and sub,
// vpnlink1 and vpnlink2 (compared with the reference links), and the fault
// qualification by valid_i.
module tb_res_alu;
  import secwalk_pkg::*;
  import secwalk_ref_pkg::*;
  logic        valid;
  ralu_op_e    op;
  logic [63:0] rs1, rs2, rd;
  logic        fault;
  int checks = 0, failures = 0;

  res_alu dut (.valid_i(valid), .op_i(op), .rs1_i(rs1), .rs2_i(rs2), .rd_o(rd), .fault_o(fault));

  task automatic expect_op(input ralu_op_e o, input logic [63:0] a, input logic [63:0] b,
                           input logic [63:0] exp_rd, input logic exp_fault, input string name);
    op = o; rs1 = a; rs2 = b;
    #1;
    checks++;
    if (rd !== exp_rd || fault !== exp_fault) begin
      failures++;
      $display("FAIL %s a=%h b=%h rd=%h exp=%h f=%b exp_f=%b", name, a, b, rd, exp_rd, fault, exp_fault);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [37:0] x, y;
    logic [63:0] bad, t, pa_e, vpn_e;
    valid = 1'b1;
    for (int i = 0; i < 300; i++) begin
      x = {$urandom, $urandom} [37:0];
      y = {$urandom, $urandom} [37:0];
      expect_op(RALU_ENC, 64'(x), 64'd0, ref_enc(39'(x)), 1'b0, "enc");
      expect_op(RALU_DEC, ref_enc(39'(x)), 64'd0, 64'(x), 1'b0, "dec");
      bad = ref_enc(39'(x)) ^ (64'd1 << $urandom_range(63, 0));
      expect_op(RALU_DEC, bad, 64'd0, 64'(bad[38:0]), 1'b1, "dec-fault");
      expect_op(RALU_ADD, ref_enc(39'(x)), ref_enc(39'(y)), ref_enc(39'(x) + 39'(y)), 1'b0, "add");
      if (x >= y) expect_op(RALU_SUB, ref_enc(39'(x)), ref_enc(39'(y)), ref_enc(39'(x - y)), 1'b0, "sub");
      t = {$urandom, $urandom};
      expect_op(RALU_LINK1, t, ref_enc(39'(x[8:0])), ref_link64(t, ref_enc(39'(x[8:0]))), 1'b0, "vpnlink1");
      pa_e  = ref_enc(39'(y) << 12);
      vpn_e = ref_enc(39'(x) << 12);
      expect_op(RALU_LINK2, pa_e, vpn_e, {ref_link52(pa_e[63:12], vpn_e[63:12]), 12'h000},
                1'b0, "vpnlink2");
    end
    expect_op(RALU_ENC, 64'h8000_0000_0000_0001, 64'd0, ref_enc(39'd1), 1'b1, "enc-range");
    valid = 1'b0;
    expect_op(RALU_DEC, bad, 64'd0, 64'(bad[38:0]), 1'b0, "no-valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
