// tb_res_encode: checks the residue encoder against digit-sum residues.
// Random and corner addresses (0, all ones, powers of two, multiples of the
// moduli); each output must equal the reference encoding bit for bit.
module tb_res_encode;
  import secwalk_ref_pkg::*;
  logic [38:0] a;
  logic [63:0] e;
  int checks = 0, failures = 0;

  res_encode dut (.addr_i(a), .enc_o(e));

  task automatic check(input logic [38:0] v);
    a = v;
    #1;
    checks++;
    if (e !== ref_enc(v)) begin
      failures++;
      $display("FAIL addr=%h got=%h exp=%h", v, e, ref_enc(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(39'd0);
    check('1);
    check(39'd5 * 39'd7 * 39'd17 * 39'd31 * 39'd127);
    check(39'd1);
    // residues of 1 are all 1: redundancy = 1 in every slot
    checks++;
    if (e[63:39] !== 25'b00_0000001_00001_00001_001_001) failures++;
    for (int i = 0; i < 39; i++) check(39'd1 << i);
    for (int i = 0; i < 2000; i++) check({$urandom, $urandom} [38:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
