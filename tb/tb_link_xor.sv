// tb_link_xor: store then load through the link with the same keys returns
// the data; stored bytes are scrambled with the keys; a load with the keys of
// another address garbles every byte; with linking off data passes through.
module tb_link_xor;
  import secwalk_ref_pkg::*;
  logic en;
  logic [63:0] key, sd, sdo, ld, ldo;
  int checks = 0, failures = 0;

  link_xor dut (.en_linking_i(en), .key_i(key), .store_data_i(sd), .store_data_o(sdo),
                .load_data_i(ld), .load_data_o(ldo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] a;
    logic [63:0] mem;
    for (int i = 0; i < 500; i++) begin
      a  = {$urandom, $urandom} [38:0];
      en = 1'b1;
      key = ref_mask(a);
      sd  = {$urandom, $urandom};
      #1;
      mem = sdo;
      checks++;
      if (mem !== (sd ^ ref_mask(a))) failures++;
      ld = mem;
      #1;
      checks++;
      if (ldo !== sd) begin failures++; $display("FAIL roundtrip"); end
      key = ref_mask(a + 39'd8);   // neighbouring word: wrong location
      #1;
      checks++;
      if (ldo === sd) begin failures++; $display("FAIL wrong address accepted"); end
      en = 1'b0;
      #1;
      checks++;
      if (ldo !== mem || sdo !== sd) begin failures++; $display("FAIL bypass"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
