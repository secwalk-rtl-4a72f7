// tb_secwalk_mmu: the MMU with a behavioural page-directory memory holding
// linked page tables built by the reference model. Checks: translation by
// walk on a TLB miss and by the linked TLB on a hit (PA_enc, hit flag,
// latency), ITLB for fetches, permission faults on the TLB path, residue
// faults for a corrupted VA_enc, a corrupted stored PTE, a TLB tag matching
// the wrong address and flipped bits in a TLB entry, TLB flush, and
// bare mode (PA_enc = VA_enc after the integrity check).
module tb_secwalk_mmu;
  import secwalk_pkg::*;
  import secwalk_ref_pkg::*;
  localparam int LAT = 1;
  localparam logic [38:0] ROOT = 39'h00_0010_0000;

  logic clk = 0, rst_n = 0;
  logic sv39, flush;
  logic [51:0] root_ppn;
  logic req_valid, req_ready, req_store, req_instr;
  logic [63:0] req_va;
  logic resp_valid, resp_pf, resp_rf, resp_hit;
  logic [63:0] resp_pa;
  logic mreq, mgnt, mrvalid;
  logic [38:0] maddr;
  logic [63:0] mrdata;
  logic [63:0] mem [logic [35:0]];
  int checks = 0, failures = 0;

  secwalk_mmu dut (
    .clk_i(clk), .rst_ni(rst_n), .sv39_i(sv39), .root_ppn_enc_i(root_ppn), .flush_i(flush),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_va_enc_i(req_va),
    .req_store_i(req_store), .req_instr_i(req_instr),
    .resp_valid_o(resp_valid), .resp_pa_enc_o(resp_pa), .resp_page_fault_o(resp_pf),
    .resp_res_fault_o(resp_rf), .resp_tlb_hit_o(resp_hit),
    .mem_req_o(mreq), .mem_addr_o(maddr), .mem_gnt_i(mgnt), .mem_rvalid_i(mrvalid),
    .mem_rdata_i(mrdata));

  always #5 clk = ~clk;

  // behavioural memory: grant at once, data LAT cycles later
  logic [38:0] pend_addr;
  int          pend_cnt;
  assign mgnt = mreq;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mrvalid <= 1'b0; mrdata <= '0; pend_addr <= '0; pend_cnt <= 0;
    end else begin
    mrvalid <= 1'b0;
    if (mreq && mgnt) begin
      pend_addr <= maddr;
      pend_cnt  <= LAT;
    end else if (pend_cnt > 0) begin
      pend_cnt <= pend_cnt - 1;
      if (pend_cnt == 1) begin
        mrvalid <= 1'b1;
        mrdata  <= mem.exists(pend_addr[38:3]) ? mem[pend_addr[38:3]] : 64'd0;
      end
    end
    end
  end

  // ---- page table builder ----
  logic [38:0] t1_of [logic [8:0]];
  logic [38:0] t0_of [logic [17:0]];
  logic [38:0] next_table = 39'h00_0020_0000;

  function automatic void put(input logic [38:0] a, input logic [63:0] linked);
    mem[a[38:3]] = linked ^ ref_mask(a);     // stored with a linked store
  endfunction

  task automatic map(input logic [38:0] va, input logic [38:0] page, input logic [7:0] flags);
    logic [38:0] t1, t0;
    if (!t1_of.exists(va[38:30])) begin
      t1 = next_table; next_table += 39'h1000; t1_of[va[38:30]] = t1;
      put(ROOT + 39'({va[38:30], 3'b0}), ref_pte_ptr(t1, va[38:30]));
    end
    t1 = t1_of[va[38:30]];
    if (!t0_of.exists(va[38:21])) begin
      t0 = next_table; next_table += 39'h1000; t0_of[va[38:21]] = t0;
      put(t1 + 39'({va[29:21], 3'b0}), ref_pte_ptr(t0, va[29:21]));
    end
    t0 = t0_of[va[38:21]];
    put(t0 + 39'({va[20:12], 3'b0}), ref_pte_leaf(va, page, flags));
  endtask

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic xlate(input logic [63:0] va_e, input logic st, input logic ins, output int cycles);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1; req_va = va_e; req_store = st; req_instr = ins;
    @(negedge clk);
    req_valid = 1'b0;
    cycles = 1;
    while (!resp_valid) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] vas [24];
    logic [38:0] pages [24];
    logic [63:0] rootv, keep;
    logic [38:0] a;
    int cyc;
    sv39 = 1'b1; flush = 1'b0; req_valid = 0; req_va = 0; req_store = 0; req_instr = 0;
    rootv = ref_enc(ROOT);
    root_ppn = rootv[63:12];
    for (int i = 0; i < 24; i++) begin
      vas[i] = {$urandom, $urandom} [38:0];
      if (i > 0 && i % 3 != 0) vas[i][38:21] = vas[i-1][38:21];
      pages[i] = 39'({$urandom_range(32'h7ffff, 32'h1000), 12'h000});
      map(vas[i], pages[i], (i % 4 == 3) ? 8'h4b : 8'hc7);   // i%4==3: read+exec only
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // misses then hits (DTLB holds 16: use 12 of them)
    for (int i = 0; i < 12; i++) begin
      xlate(ref_enc(vas[i]), 1'b0, 1'b0, cyc);
      chk(!resp_hit && !resp_pf && !resp_rf && resp_pa == ref_enc(pages[i] | 39'(vas[i][11:0])), "walk");
    end
    for (int i = 0; i < 12; i++) begin
      xlate(ref_enc(vas[i] ^ 39'h123), 1'b0, 1'b0, cyc);
      chk(resp_hit && !resp_pf && !resp_rf
          && resp_pa == ref_enc(pages[i] | 39'(vas[i][11:0] ^ 12'h123)), "tlb hit");
      chk(cyc == 3, $sformatf("hit latency %0d", cyc));
      xlate(ref_enc(vas[i]), 1'b1, 1'b0, cyc);
      chk(resp_hit && ((i % 4 == 3) ? (resp_pf && !resp_rf) : (!resp_pf && !resp_rf)), "store perm on hit");
    end
    // instruction fetch goes to the ITLB: first a walk, then a hit
    xlate(ref_enc(vas[3]), 1'b0, 1'b1, cyc);
    chk(!resp_hit && !resp_pf && resp_pa == ref_enc(pages[3] | 39'(vas[3][11:0])), "fetch walk");
    xlate(ref_enc(vas[3]), 1'b0, 1'b1, cyc);
    chk(resp_hit && !resp_pf, "fetch hit");
    // faults on the DTLB itself. A tag that matches the wrong address (here:
    // entry k's tag overwritten with the VPN of vas[20]) hands out an entry
    // linked with another VPN_enc; a flipped bit in a stored entry scrambles
    // it. Both must end in a residue fault, never in a translation.
    begin
      int k;
      logic [26:0] tag;
      logic [63:0] ent;
      k = -1;
      for (int e = 0; e < 16; e++)
        if (dut.u_dtlb.valid_q[e] && dut.u_dtlb.vpn_q[e] == vas[0][38:12]) k = e;
      chk(k >= 0, "entry of vas[0] in the DTLB");
      if (k >= 0) begin
        tag = dut.u_dtlb.vpn_q[k];
        dut.u_dtlb.vpn_q[k] = vas[20][38:12];
        xlate(ref_enc(vas[20]), 1'b0, 1'b0, cyc);
        chk(resp_hit && resp_rf && !resp_pf && resp_pa == 64'd0, "wrong TLB tag match");
        dut.u_dtlb.vpn_q[k] = tag;
        ent = dut.u_dtlb.data_q[k];
        for (int b = 0; b < 64; b += 3) begin
          dut.u_dtlb.data_q[k] = ent ^ (64'd1 << b);
          xlate(ref_enc(vas[0]), 1'b0, 1'b0, cyc);
          chk(resp_hit && resp_rf && !resp_pf, $sformatf("flipped TLB entry bit %0d", b));
        end
        dut.u_dtlb.data_q[k] = ent;
        xlate(ref_enc(vas[0]), 1'b0, 1'b0, cyc);
        chk(resp_hit && !resp_rf && !resp_pf && resp_pa == ref_enc(pages[0] | 39'(vas[0][11:0])), "TLB entry repaired");
      end
    end
    // corrupted VA_enc
    for (int i = 0; i < 20; i++) begin
      xlate(ref_enc(vas[i % 12]) ^ (64'd1 << $urandom_range(63, 0)), 1'b0, 1'b0, cyc);
      chk(resp_rf && resp_pa == 64'd0, "VA_enc fault");
    end
    // stored PTE flipped: walk (TLB miss) must trap
    a = t0_of[vas[20][38:21]] + 39'({vas[20][20:12], 3'b0});
    keep = mem[a[38:3]];
    mem[a[38:3]] = keep ^ 64'h0000_0400_0000_0000;
    xlate(ref_enc(vas[20]), 1'b0, 1'b0, cyc);
    chk(resp_rf || resp_pf, "PTE fault");
    mem[a[38:3]] = keep;
    // flush: the next access walks again
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    xlate(ref_enc(vas[0]), 1'b0, 1'b0, cyc);
    chk(!resp_hit && resp_pa == ref_enc(pages[0] | 39'(vas[0][11:0])), "after flush");
    // bare mode
    sv39 = 1'b0;
    xlate(ref_enc(39'h12_3456_789a), 1'b0, 1'b0, cyc);
    chk(!resp_rf && !resp_pf && resp_pa == ref_enc(39'h12_3456_789a) && cyc == 2, "bare");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
