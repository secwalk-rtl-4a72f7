// tb_ptr_reduce: byte keys for every lane against the reference keys of the
// lane's byte address, for all in-word offsets; a corrupted encoded address
// must change the keys.
module tb_ptr_reduce;
  import secwalk_ref_pkg::*;
  logic [63:0] pa, key;
  int checks = 0, failures = 0;

  ptr_reduce dut (.pa_enc_i(pa), .key_o(key));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] a;
    logic [63:0] good;
    for (int i = 0; i < 1000; i++) begin
      a  = {$urandom, $urandom} [38:0];
      pa = ref_enc(a);
      #1;
      checks++;
      if (key !== ref_mask(a)) begin
        failures++;
        $display("FAIL a=%h key=%h exp=%h", a, key, ref_mask(a));
      end
      good = key;
      pa[39 + $urandom_range(22, 0)] ^= 1'b1;   // fault on the redundancy
      #1;
      checks++;
      if (key === good) begin failures++; $display("FAIL fault not reflected"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
