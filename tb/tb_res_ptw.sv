// tb_res_ptw: drives the residue walker datapath through the operations of
// a walk and of a TLB hit with entries built by the reference model:
// VPN_enc, PTE address, unlink of a pointer PTE, leaf PA_enc, TLB PA_enc;
// then the fault cases: corrupted VA_enc, corrupted table base, faulted
// linked PTE, a leaf unlinked with another address's VPN_enc, a TLB entry
// used for the wrong VPN.
module tb_res_ptw;
  import secwalk_pkg::*;
  import secwalk_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  rp_state_e st;
  logic [63:0] rdata, pa, pb, ma, mb, drd, res, vpne;
  logic [51:0] dpte;
  logic fault;
  int checks = 0, failures = 0;

  res_ptw dut (.clk_i(clk), .rst_ni(rst_n), .state_i(st), .rdata_xorcorr_i(rdata),
               .ptw_op_a_i(pa), .ptw_op_b_i(pb), .mmu_op_a_i(ma), .mmu_op_b_i(mb),
               .decoded_rdata_o(drd), .decoded_pte_o(dpte), .result_o(res),
               .res_fault_o(fault), .vpn_enc_o(vpne));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] va, va2, tbl, nxt, page;
    logic [63:0] plain_leaf, entry;
    st = RP_IDLE; rdata = 0; pa = 0; pb = 0; ma = 0; mb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      va   = {$urandom, $urandom} [38:0];
      va2  = va ^ (39'd1 << (21 + $urandom_range(17, 0)));
      tbl  = 39'({$urandom_range(32'hffffff, 1), 12'h000});
      nxt  = 39'({$urandom_range(32'hffffff, 1), 12'h000});
      page = 39'({$urandom_range(32'hffffff, 1), 12'h000});
      @(negedge clk);
      // corrupted VA_enc
      st = RP_VPN; ma = ref_enc(va) ^ (64'd1 << $urandom_range(63, 0)); mb = 64'(va[11:0]);
      #1 chk(fault, "VA fault");
      // step 2: VPN_enc
      ma = ref_enc(va);
      #1 chk(!fault && res == ref_enc({va[38:12], 12'h0}), "VPN_enc");
      @(negedge clk);
      chk(vpne == ref_enc({va[38:12], 12'h0}), "VPN_enc kept");
      // step 3, level 2
      st = RP_PTE_ADDR; pa = ref_enc(tbl); pb = 64'({va[38:30], 3'b000});
      #1 chk(!fault && res == ref_enc(tbl + 39'({va[38:30], 3'b000})), "PTE address");
      pa = ref_enc(tbl) ^ (64'd1 << (39 + $urandom_range(22, 0)));
      #1 chk(fault, "table base fault");
      pa = ref_enc(tbl);
      @(negedge clk);
      // step 4: unlink a pointer PTE
      st = RP_IDLE; rdata = ref_pte_ptr(nxt, va[38:30]);
      #1 chk(drd == {2'b00, ref_ppn_enc(nxt), 2'b00, 8'h01}, "unlink1");
      rdata = rdata ^ (64'd1 << $urandom_range(63, 0));
      #1 chk(!ref_valid({drd[61:10], 12'h0}), "faulted PTE breaks the PPN code");
      // level 0 leaf
      st = RP_PTE_ADDR; pa = ref_enc(nxt); pb = 64'({va[20:12], 3'b000});
      @(negedge clk);
      st = RP_LEAF; rdata = ref_pte_leaf(va, page, 8'hcf); pb = 64'(va[11:0]);
      #1 chk(!fault && res == ref_enc(page | 39'(va[11:0])) && dpte == ref_ppn_enc(page),
             "leaf PA_enc");
      // a leaf that belongs to another address (same vpn[0]) must not unlink
      rdata = ref_pte_leaf({va2[38:21], va[20:0]}, page, 8'hcf);
      #1 chk(fault, "leaf of other VPN_enc");
      // TLB entry: leaf with plain PPN_enc, linked with VPN_enc
      plain_leaf = {2'b00, ref_ppn_enc(page), 2'b00, 8'hcf};
      entry = ref_link64(plain_leaf, ref_enc({va[38:12], 12'h0}));
      st = RP_TLB; ma = entry; mb = 64'(va[11:0]);
      #1 chk(!fault && res == ref_enc(page | 39'(va[11:0])) && drd == plain_leaf, "TLB PA_enc");
      ma = ref_link64(plain_leaf, ref_enc({va2[38:12], 12'h0}));
      #1 chk(fault, "TLB entry of another VPN");
      ma = entry ^ (64'd1 << $urandom_range(63, 0));
      #1 chk(fault || res == ref_enc(page | 39'(va[11:0])) && drd != plain_leaf, "TLB entry fault");
      @(negedge clk);
      st = RP_IDLE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
