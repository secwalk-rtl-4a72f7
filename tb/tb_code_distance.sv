// tb_code_distance: detection of multi-bit faults on encoded pointers.
//
// The multi-residue code with moduli {5, 7, 17, 31, 127} is meant to have a
// Hamming distance of 5, so every fault of one to four flipped bits in a
// 64-bit encoded address must be caught. This bench flips bits in valid
// codewords fed to the checked residue adder (adding Enc(0), so only the
// operand check can fire) and counts a failure for every flip pattern that
// is not reported. One- and two-bit flips are tried exhaustively on random
// codewords, three- and four-bit flips at random positions. Purely
// combinational; one pattern per time step.
module tb_code_distance;
  import secwalk_ref_pkg::*;
  logic [63:0] a, b, y;
  logic        fault;
  int checks = 0, failures = 0;
  int missed [5] = '{0, 0, 0, 0, 0};

  res_adder dut (.a_i(a), .b_i(b), .sub_i(1'b0), .y_o(y), .fault_o(fault));

  task automatic try(input logic [63:0] cw, input logic [63:0] pat, input int n);
    a = cw ^ pat;
    #1;
    checks++;
    if (!fault) begin
      failures++;
      missed[n]++;
      if (missed[n] <= 5) $display("FAIL %0d-bit flip %h on %h not detected", n, pat, cw);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] cw, pat;
    int p [4];
    bit dup;
    b = ref_enc(39'd0);
    for (int t = 0; t < 20; t++) begin
      cw = ref_enc({$urandom, $urandom} [38:0]);
      for (int i = 0; i < 64; i++) begin
        try(cw, 64'd1 << i, 1);
        for (int j = i + 1; j < 64; j++) try(cw, (64'd1 << i) | (64'd1 << j), 2);
      end
    end
    for (int t = 0; t < 40000; t++) begin
      int n;
      cw = ref_enc({$urandom, $urandom} [38:0]);
      n  = 3 + (t % 2);
      do begin
        dup = 0;
        for (int k = 0; k < n; k++) p[k] = $urandom_range(63, 0);
        for (int k = 0; k < n; k++)
          for (int l = k + 1; l < n; l++) if (p[k] == p[l]) dup = 1;
      end while (dup);
      pat = '0;
      for (int k = 0; k < n; k++) pat[p[k]] = 1'b1;
      try(cw, pat, n);
    end
    $display("missed: 1-bit %0d, 2-bit %0d, 3-bit %0d, 4-bit %0d", missed[1], missed[2], missed[3], missed[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
