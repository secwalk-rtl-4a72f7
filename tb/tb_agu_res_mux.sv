// tb_agu_res_mux: checks both sources of the virtual address.
// With the select high the encoded result of the residue ALU must pass
// unchanged; with it low the output is the plain sum of base and immediate
// (also with negative immediates and wrap-around). Random operands, one
// combination per time step.
module tb_agu_res_mux;
  logic [63:0] a, imm, res, va;
  logic        sel;
  int checks = 0, failures = 0;

  agu_res_mux dut (.operand_a_i(a), .imm_i(imm), .res_data_i(res), .res_agu_valid_i(sel), .vaddr_o(va));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp;
    for (int i = 0; i < 2000; i++) begin
      a   = {$urandom, $urandom};
      imm = (i % 3 == 0) ? 64'(signed'(12'($urandom))) : {$urandom, $urandom};
      res = {$urandom, $urandom};
      sel = i[0];
      #1;
      exp = sel ? res : 64'(a + imm);
      checks++;
      if (va !== exp) begin
        failures++;
        $display("FAIL sel=%0d a=%h imm=%h res=%h got=%h", sel, a, imm, res, va);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
