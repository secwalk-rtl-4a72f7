// tb_prince_link: checks P64 and P52 against the table-driven reference,
// checks that unlink inverts link, that a wrong key does not unlink, and
// that one flipped bit in a linked 64-bit PTE spreads into the PPN field
// after unlinking (the diffusion the residue check relies on).
module tb_prince_link;
  import secwalk_ref_pkg::*;
  logic [63:0] d64, k64, l64, u64, w64;
  logic [51:0] d52, k52, l52, u52;
  logic [63:0] kw, win;
  int checks = 0, failures = 0;

  prince_link #(.BLOCK_W(64)) l1 (.data_i(d64), .key_i(k64), .unlink_i(1'b0), .data_o(l64));
  prince_link #(.BLOCK_W(64)) u1 (.data_i(l64), .key_i(k64), .unlink_i(1'b1), .data_o(u64));
  prince_link #(.BLOCK_W(64)) u1w (.data_i(win), .key_i(kw), .unlink_i(1'b1), .data_o(w64));
  prince_link #(.BLOCK_W(52)) l2 (.data_i(d52), .key_i(k52), .unlink_i(1'b0), .data_o(l52));
  prince_link #(.BLOCK_W(52)) u2 (.data_i(l52), .key_i(k52), .unlink_i(1'b1), .data_o(u52));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int spread;
    for (int i = 0; i < 500; i++) begin
      d64 = {$urandom, $urandom};
      k64 = (i < 250) ? ref_enc(39'($urandom_range(511, 0))) : {$urandom, $urandom};
      kw  = k64 ^ (64'd1 << $urandom_range(63, 0));
      d52 = {$urandom, $urandom} [51:0];
      k52 = {$urandom, $urandom} [51:0];
      #1;
      win = l64;
      #1;
      checks += 5;
      if (l64 !== ref_link64(d64, k64)) begin
        failures++; $display("FAIL P64 d=%h k=%h got=%h exp=%h", d64, k64, l64, ref_link64(d64, k64));
      end
      if (u64 !== d64) begin failures++; $display("FAIL P64^-1"); end
      if (w64 === d64) begin failures++; $display("FAIL wrong key unlinked"); end
      if (l52 !== ref_link52(d52, k52)) begin
        failures++; $display("FAIL P52 got=%h exp=%h", l52, ref_link52(d52, k52));
      end
      if (u52 !== d52) begin failures++; $display("FAIL P52^-1"); end
    end
    // diffusion: each single-bit fault on a linked word changes the
    // unlinked PPN field [61:10]
    spread = 0;
    d64 = {$urandom, $urandom};
    k64 = ref_enc(39'd77);
    for (int b = 0; b < 64; b++) begin
      #1;
      kw = k64;
      // unlink the faulted linked word through u1w (same key)
      win = l64 ^ (64'd1 << b);
      #1;
      if (w64[61:10] != d64[61:10]) spread++;
    end
    checks++;
    if (spread != 64) begin
      failures++; $display("FAIL diffusion: %0d of 64 flips reached the PPN", spread);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
