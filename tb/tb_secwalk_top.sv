// tb_secwalk_top: end-to-end run of the SecWalk core additions.
//
// The testbench plays the operating system and the rest of the core. In
// bare mode it builds linked Sv39 page tables with the design's own
// instructions (encode, encoded subtract, vpnlink1, vpnlink2) and writes them
// with linked stores (translation + byte xor link) into a behavioural memory
// that also serves the page table walker. It then switches satp_enc to Sv39
// and runs protected accesses: walks, TLB hits, instruction fetches through
// the ITLB, linked stores and loads, a shared page mapped at two virtual
// addresses, and attacks (flipped pointer bits, a flipped PTE in memory, a
// load from a wrong location, a corrupted root). Addresses reach the MMU
// through the address mux, at random either as base (+) offset computed by
// the residue ALU or as base + immediate. Values are checked against
// the reference model; each mechanism is counted and must occur.
// All parameters of the top are left at their defaults.
module tb_secwalk_top;
  import secwalk_pkg::*;
  import secwalk_ref_pkg::*;
  localparam int LAT = 1;
  localparam logic [38:0] ROOT = 39'h00_0010_0000;
  localparam logic [11:0] SATP_ENC = 12'h5c0;

  logic clk = 0, rst_n = 0;
  logic csr_en; logic [1:0] csr_op; logic [11:0] csr_addr; logic [63:0] csr_wdata, csr_rdata;
  logic alu_valid; ralu_op_e alu_op; logic [63:0] alu_rs1, alu_rs2, alu_rd; logic alu_fault;
  logic sfence, req_valid, req_ready, req_store, req_instr;
  logic [63:0] agu_a, agu_imm;
  logic res_agu;
  logic resp_valid, resp_pf, resp_rf, resp_hit;
  logic [63:0] resp_pa;
  logic ptw_req, ptw_gnt, ptw_rvalid;
  logic [38:0] ptw_addr;
  logic [63:0] ptw_rdata;
  logic en_link;
  logic [38:0] dc_addr;
  logic [63:0] st_data, dc_wdata, dc_rdata, ld_data;
  logic [63:0] mem [logic [35:0]];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_walk = 0, n_hit = 0, n_fetch = 0, n_pf = 0, n_rf_va = 0, n_rf_pte = 0, n_rf_root = 0;
  int n_link_st = 0, n_link_ld = 0, n_shared = 0, n_wrong_loc = 0, n_bare = 0, n_alu_fault = 0;
  int n_flush = 0, n_agu_res = 0, n_agu_plain = 0;

  secwalk_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .csr_en_i(csr_en), .csr_op_i(csr_op), .csr_addr_i(csr_addr), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata),
    .alu_valid_i(alu_valid), .alu_op_i(alu_op), .alu_rs1_i(alu_rs1), .alu_rs2_i(alu_rs2),
    .alu_rd_o(alu_rd), .alu_fault_o(alu_fault),
    .sfence_i(sfence), .req_valid_i(req_valid), .req_ready_o(req_ready),
    .agu_operand_a_i(agu_a), .agu_imm_i(agu_imm), .res_agu_valid_i(res_agu),
    .req_store_i(req_store), .req_instr_i(req_instr), .resp_valid_o(resp_valid),
    .resp_pa_enc_o(resp_pa), .resp_page_fault_o(resp_pf), .resp_res_fault_o(resp_rf),
    .resp_tlb_hit_o(resp_hit),
    .ptw_mem_req_o(ptw_req), .ptw_mem_addr_o(ptw_addr), .ptw_mem_gnt_i(ptw_gnt),
    .ptw_mem_rvalid_i(ptw_rvalid), .ptw_mem_rdata_i(ptw_rdata),
    .en_linking_i(en_link), .dcache_addr_o(dc_addr), .store_data_i(st_data),
    .dcache_wdata_o(dc_wdata), .dcache_rdata_i(dc_rdata), .load_data_o(ld_data));

  always #5 clk = ~clk;

  // behavioural memory: grant at once, data LAT cycles later
  logic [38:0] pend_addr;
  int          pend_cnt;
  assign ptw_gnt = ptw_req;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptw_rvalid <= 1'b0; ptw_rdata <= '0; pend_addr <= '0; pend_cnt <= 0;
    end else begin
    ptw_rvalid <= 1'b0;
    if (ptw_req && ptw_gnt) begin
      pend_addr <= ptw_addr;
      pend_cnt  <= LAT;
    end else if (pend_cnt > 0) begin
      pend_cnt <= pend_cnt - 1;
      if (pend_cnt == 1) begin
        ptw_rvalid <= 1'b1;
        ptw_rdata  <= mem.exists(pend_addr[38:3]) ? mem[pend_addr[38:3]] : 64'd0;
      end
    end
    end
  end

  assign dc_rdata = mem.exists(dc_addr[38:3]) ? mem[dc_addr[38:3]] : 64'd0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // one residue-ALU instruction
  task automatic alu(input ralu_op_e op, input logic [63:0] a, input logic [63:0] b,
                     output logic [63:0] rd);
    alu_valid = 1'b1; alu_op = op; alu_rs1 = a; alu_rs2 = b;
    #1;
    rd = alu_rd;
    if (alu_fault) begin failures++; $display("FAIL unexpected ALU fault op=%0d", op); end
    alu_valid = 1'b0;
  endtask

  task automatic xlate(input logic [63:0] va_e, input logic st, input logic ins);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    if (ref_valid(va_e) && $urandom_range(1, 0) == 1) begin
      // encoded pointer arithmetic: base (+) offset in the residue ALU,
      // its result taken by the address mux
      logic [38:0] off;
      off = 39'($urandom_range(255, 0)) & va_e[38:0];
      alu_valid = 1'b1; alu_op = RALU_ADD;
      alu_rs1 = ref_enc(va_e[38:0] - off); alu_rs2 = ref_enc(off);
      res_agu = 1'b1;
      #1;
      chk(alu_rd == va_e && !alu_fault, "residue ALU address");
      n_agu_res++;
    end else begin
      // plain base + immediate
      agu_imm = 64'(signed'(12'($urandom)));
      agu_a   = va_e - agu_imm;
      res_agu = 1'b0;
      n_agu_plain++;
    end
    req_valid = 1'b1; req_store = st; req_instr = ins;
    @(negedge clk);
    req_valid = 1'b0; res_agu = 1'b0; alu_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    if (!resp_rf && !resp_pf) begin
      if (resp_hit) n_hit++;
      else if (dut.sv39) n_walk++;
    end
    if (resp_pf) n_pf++;
    @(negedge clk);   // PA_enc now held for the data link
  endtask

  // linked store of one word at an encoded address (after translation)
  task automatic store(input logic [63:0] va_e, input logic [63:0] d);
    xlate(va_e, 1'b1, 1'b0);
    chk(!resp_pf && !resp_rf, "store translation");
    en_link = 1'b1; st_data = d;
    #1;
    mem[dc_addr[38:3]] = dc_wdata;
    n_link_st++;
  endtask

  task automatic load(input logic [63:0] va_e, output logic [63:0] d);
    xlate(va_e, 1'b0, 1'b0);
    chk(!resp_pf && !resp_rf, "load translation");
    en_link = 1'b1;
    #1;
    d = ld_data;
    n_link_ld++;
  endtask

  task automatic csr_write(input logic [63:0] v);
    @(negedge clk);
    csr_en = 1'b1; csr_op = 2'd1; csr_addr = SATP_ENC; csr_wdata = v;
    @(negedge clk);
    csr_en = 1'b0;
  endtask

  // ---- page tables, built with the design's instructions ----
  logic [38:0] t1_of [logic [8:0]];
  logic [38:0] t0_of [logic [17:0]];
  logic [38:0] next_table = 39'h00_0020_0000;

  task automatic pte_ptr(input logic [38:0] at, input logic [38:0] next_pa, input logic [8:0] idx);
    logic [63:0] key, e, linked;
    alu(RALU_ENC, 64'(idx), 64'd0, key);
    alu(RALU_ENC, 64'(next_pa), 64'd0, e);
    alu(RALU_LINK1, {2'b00, e[63:12], 2'b00, 8'h01}, key, linked);
    chk(linked == ref_pte_ptr(next_pa, idx), "vpnlink1 pointer PTE");
    store(ref_enc(at), linked);
  endtask

  task automatic pte_leaf(input logic [38:0] at, input logic [38:0] va, input logic [38:0] page,
                          input logic [7:0] flags);
    logic [63:0] va_e, po_e, vpn_e, ppn_e, l2, key, linked;
    alu(RALU_ENC, 64'(va), 64'd0, va_e);
    alu(RALU_ENC, 64'(va[11:0]), 64'd0, po_e);
    alu(RALU_SUB, va_e, po_e, vpn_e);
    alu(RALU_ENC, 64'(page), 64'd0, ppn_e);
    alu(RALU_LINK2, ppn_e, vpn_e, l2);
    alu(RALU_ENC, 64'(va[20:12]), 64'd0, key);
    alu(RALU_LINK1, {2'b00, l2[63:12], 2'b00, flags}, key, linked);
    chk(linked == ref_pte_leaf(va, page, flags), "vpnlink2 leaf PTE");
    store(ref_enc(at), linked);
  endtask

  task automatic map(input logic [38:0] va, input logic [38:0] page, input logic [7:0] flags);
    logic [38:0] t1, t0;
    if (!t1_of.exists(va[38:30])) begin
      t1 = next_table; next_table += 39'h1000; t1_of[va[38:30]] = t1;
      pte_ptr(ROOT + 39'({va[38:30], 3'b0}), t1, va[38:30]);
    end
    t1 = t1_of[va[38:30]];
    if (!t0_of.exists(va[38:21])) begin
      t0 = next_table; next_table += 39'h1000; t0_of[va[38:21]] = t0;
      pte_ptr(t1 + 39'({va[29:21], 3'b0}), t0, va[29:21]);
    end
    t0 = t0_of[va[38:21]];
    pte_leaf(t0 + 39'({va[20:12], 3'b0}), va, page, flags);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int N = 20;
    logic [38:0] vas [N];
    logic [38:0] pages [N];
    logic [63:0] d, v, root_e, bad;
    logic [38:0] a, shared_va;
    csr_en = 0; csr_op = 0; csr_addr = 0; csr_wdata = 0;
    alu_valid = 0; alu_op = RALU_ENC; alu_rs1 = 0; alu_rs2 = 0;
    sfence = 0; req_valid = 0; agu_a = 0; agu_imm = 0; res_agu = 0; req_store = 0; req_instr = 0;
    en_link = 0; st_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- bare mode: build the page tables ----
    for (int i = 0; i < N; i++) begin
      vas[i] = {$urandom, $urandom} [38:0];
      vas[i][2:0] = 3'b000;
      if (i > 0 && i % 4 != 0) vas[i][38:21] = vas[i-1][38:21];
      pages[i] = 39'({$urandom_range(32'h7ffff, 32'h1000), 12'h000});
      map(vas[i], pages[i], (i == 5) ? 8'h43 : 8'hcf);   // entry 5 read-only
    end
    // a second virtual address for the page of vas[0] (shared memory)
    shared_va = {vas[0][38:30] ^ 9'h55, 9'h1a5, vas[0][20:0]};
    map(shared_va, pages[0], 8'hc7);
    n_bare = n_link_st;

    // ---- enable Sv39 with the encoded root ----
    alu(RALU_ENC, 64'(ROOT), 64'd0, root_e);
    csr_write({4'h8, 8'h0, root_e[63:12]});
    chk(dut.sv39, "satp_enc sv39");

    // ---- protected accesses ----
    for (int i = 0; i < N; i++) begin
      if (i == 5) continue;
      d = {$urandom, $urandom};
      store(ref_enc(vas[i]), d);
      chk(resp_pa == ref_enc(pages[i] | 39'(vas[i][11:0])), "store PA_enc");
      a = pages[i] | 39'(vas[i][11:0]);
      chk(mem[a[38:3]] == (d ^ ref_mask(a)), "stored data linked");
      load(ref_enc(vas[i]), v);
      chk(resp_hit && v == d, "load after store (TLB hit)");
    end
    // shared page: data written through vas[0] read through shared_va
    store(ref_enc(vas[0]), 64'hfeed_beef_0bad_cafe);
    load(ref_enc(shared_va), v);
    chk(v == 64'hfeed_beef_0bad_cafe && resp_pa == ref_enc(pages[0] | 39'(vas[0][11:0])), "shared page");
    n_shared++;
    // read-only page: store faults
    xlate(ref_enc(vas[5]), 1'b1, 1'b0);
    chk(resp_pf && !resp_rf, "store to read-only page");
    // instruction fetch via ITLB
    xlate(ref_enc(vas[6]), 1'b0, 1'b1);
    chk(!resp_pf && !resp_hit && resp_pa == ref_enc(pages[6] | 39'(vas[6][11:0])), "fetch walk");
    xlate(ref_enc(vas[6]), 1'b0, 1'b1);
    chk(!resp_pf && resp_hit, "fetch ITLB hit");
    n_fetch++;
    // load from a wrong location: data of a neighbouring word, unlinked with
    // this word's keys, comes back garbled
    load(ref_enc(vas[7]), v);
    mem[dc_addr[38:3]] = mem[(dc_addr[38:3]) ^ 36'h1];
    #1;
    chk(ld_data != v, "misdirected load garbled");
    n_wrong_loc++;
    // pointer faults: corrupted VA_enc is caught before translation
    for (int i = 0; i < 10; i++) begin
      bad = ref_enc(vas[i]) ^ (64'd1 << $urandom_range(63, 0));
      xlate(bad, 1'b0, 1'b0);
      chk(resp_rf, "VA_enc fault");
      if (resp_rf) n_rf_va++;
      alu_valid = 1'b1; alu_op = RALU_DEC; alu_rs1 = bad; alu_rs2 = 0;
      #1;
      chk(alu_fault, "decode of corrupted pointer");
      if (alu_fault) n_alu_fault++;
      alu_valid = 1'b0;
    end
    // flush, then a flipped bit in a stored leaf PTE must trap the walk
    @(negedge clk); sfence = 1'b1; @(negedge clk); sfence = 1'b0;
    n_flush++;
    a = t0_of[vas[9][38:21]] + 39'({vas[9][20:12], 3'b0});
    d = mem[a[38:3]];
    for (int b = 12; b < 62; b += 7) begin
      mem[a[38:3]] = d ^ (64'd1 << b);
      xlate(ref_enc(vas[9]), 1'b0, 1'b0);
      chk(resp_rf || resp_pf, "PTE fault trapped");
      if (resp_rf) n_rf_pte++;
    end
    mem[a[38:3]] = d;
    xlate(ref_enc(vas[9]), 1'b0, 1'b0);
    chk(!resp_rf && !resp_pf && !resp_hit, "walk after repair");
    // corrupted root in satp_enc
    @(negedge clk); sfence = 1'b1; @(negedge clk); sfence = 1'b0;
    csr_write({4'h8, 8'h0, root_e[63:12] ^ 52'h8_0000_0000_0000});
    xlate(ref_enc(vas[1]), 1'b0, 1'b0);
    chk(resp_rf, "root fault");
    if (resp_rf) n_rf_root++;

    $display("mechanisms: walk=%0d tlb_hit=%0d fetch=%0d page_fault=%0d res_fault(va/pte/root)=%0d/%0d/%0d",
             n_walk, n_hit, n_fetch, n_pf, n_rf_va, n_rf_pte, n_rf_root);
    $display("            linked_store=%0d linked_load=%0d bare_store=%0d shared=%0d wrong_loc=%0d alu_fault=%0d flush=%0d",
             n_link_st, n_link_ld, n_bare, n_shared, n_wrong_loc, n_alu_fault, n_flush);
    $display("            agu_residue=%0d agu_plain=%0d", n_agu_res, n_agu_plain);
    chk(n_agu_res > 0 && n_agu_plain > 0, "both address sources used");
    chk(n_walk > 0, "walk happened");
    chk(n_hit > 0, "TLB hit happened");
    chk(n_fetch > 0, "ITLB fetch happened");
    chk(n_pf > 0, "page fault happened");
    chk(n_rf_va > 0, "VA residue fault happened");
    chk(n_rf_pte > 0, "PTE residue fault happened");
    chk(n_rf_root > 0, "root residue fault happened");
    chk(n_link_st > 0 && n_link_ld > 0, "linked accesses happened");
    chk(n_bare > 0, "bare-mode access happened");
    chk(n_shared > 0, "shared mapping happened");
    chk(n_wrong_loc > 0, "misdirected load happened");
    chk(n_alu_fault > 0, "ALU fault happened");
    chk(n_flush > 0, "flush happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
