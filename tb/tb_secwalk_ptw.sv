// tb_secwalk_ptw: the walk controller with the residue datapath and a page
// directory in a behavioural memory (linked PTEs, stored through the byte
// xor link, built by the reference model as system software would).
// Checks PA_enc, the leaf handed to the TLB and the walk latency for good
// walks, and a page fault or residue fault for: unmapped addresses, missing
// write permission, a bit flipped in a stored PTE, a corrupted root, and a
// walk with the VPN_enc of another address.
module tb_secwalk_ptw;
  import secwalk_pkg::*;
  import secwalk_ref_pkg::*;
  localparam int LAT = 2;                 // memory read latency after grant
  localparam logic [38:0] ROOT = 39'h00_0010_0000;

  logic clk = 0, rst_n = 0;
  // walker <-> residue datapath
  rp_state_e rp_state, mmu_state, st_mux;
  logic [63:0] rp_rdata, rp_a, rp_b, res, drd, vpne, ma, mb;
  logic [51:0] dpte;
  logic rfault;
  // walker control
  logic start, busy, done, pf, rf;
  logic [63:0] va_enc, pa_enc, leaf;
  logic store;
  logic [51:0] root_ppn;
  // memory
  logic mreq, mgnt, mrvalid;
  logic [38:0] maddr;
  logic [63:0] mrdata;
  logic [63:0] mem [logic [35:0]];
  int checks = 0, failures = 0;

  assign st_mux = (mmu_state != RP_IDLE) ? mmu_state : rp_state;

  res_ptw u_rp (.clk_i(clk), .rst_ni(rst_n), .state_i(st_mux), .rdata_xorcorr_i(rp_rdata),
                .ptw_op_a_i(rp_a), .ptw_op_b_i(rp_b), .mmu_op_a_i(ma), .mmu_op_b_i(mb),
                .decoded_rdata_o(drd), .decoded_pte_o(dpte), .result_o(res),
                .res_fault_o(rfault), .vpn_enc_o(vpne));

  secwalk_ptw dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .va_enc_i(va_enc), .is_store_i(store),
    .is_instr_i(1'b0), .root_ppn_enc_i(root_ppn), .busy_o(busy), .done_o(done),
    .page_fault_o(pf), .res_fault_o(rf), .pa_enc_o(pa_enc), .leaf_pte_o(leaf),
    .rp_state_o(rp_state), .rp_rdata_o(rp_rdata), .rp_op_a_o(rp_a), .rp_op_b_o(rp_b),
    .rp_result_i(res), .rp_fault_i(rfault), .rp_decoded_rdata_i(drd), .rp_decoded_pte_i(dpte),
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

  // one walk; vpn_of selects the VA whose VPN_enc is loaded first
  task automatic walk(input logic [38:0] va, input logic [38:0] vpn_of, input logic st,
                      output int cycles);
    @(negedge clk);
    mmu_state = RP_VPN; ma = ref_enc(vpn_of); mb = 64'(vpn_of[11:0]);
    @(negedge clk);
    mmu_state = RP_IDLE;
    va_enc = ref_enc(va); store = st; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
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
    logic [38:0] va, page;
    logic [38:0] vas [20];
    logic [38:0] pages [20];
    int cyc;
    logic [63:0] rootv;
    int res_faults;
    mmu_state = RP_IDLE; ma = 0; mb = 0; start = 0; va_enc = 0; store = 0;
    res_faults = 0;
    rootv = ref_enc(ROOT);
    root_ppn = rootv[63:12];
    for (int i = 0; i < 20; i++) begin
      vas[i]   = {$urandom, $urandom} [38:0];
      if (i > 0 && i % 4 != 0) vas[i][38:21] = vas[i-1][38:21];   // share tables
      pages[i] = 39'({$urandom_range(32'h7ffff, 32'h1000), 12'h000});
      map(vas[i], pages[i], (i % 3 == 2) ? 8'h43 : 8'hc7);        // some read-only
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      walk(vas[i], vas[i], 1'b0, cyc);
      chk(!pf && !rf && pa_enc == ref_enc(pages[i] | 39'(vas[i][11:0])), "load PA_enc");
      chk(leaf == {2'b00, ref_ppn_enc(pages[i]), 2'b00, (i % 3 == 2) ? 8'h43 : 8'hc7}, "leaf");
      chk(cyc == 3 * (3 + LAT + 1) + 2, $sformatf("walk latency %0d", cyc));
      walk(vas[i], vas[i], 1'b1, cyc);
      chk((i % 3 == 2) ? (pf && !rf) : (!pf && !rf), "store permission");
    end
    // unmapped: other vpn[0] inside a known table -> V = 0
    va = vas[0] ^ 39'h1000;
    walk(va, va, 1'b0, cyc);
    chk(pf && !rf, "unmapped");
    // bit flips in stored PTEs: every one must trap
    for (int i = 0; i < 30; i++) begin
      logic [38:0] a;
      logic [63:0] keep;
      int lvl;
      lvl = i % 3;
      va  = vas[i % 20];
      a   = (lvl == 2) ? ROOT + 39'({va[38:30], 3'b0})
          : (lvl == 1) ? t1_of[va[38:30]] + 39'({va[29:21], 3'b0})
          :              t0_of[va[38:21]] + 39'({va[20:12], 3'b0});
      keep = mem[a[38:3]];
      mem[a[38:3]] = keep ^ (64'd1 << $urandom_range(63, 0));
      walk(va, va, 1'b0, cyc);
      chk(pf || rf, "PTE fault detected");
      if (rf) res_faults++;
      mem[a[38:3]] = keep;
    end
    chk(res_faults > 10, $sformatf("PTE faults caught by residues: %0d", res_faults));
    // walk with the VPN_enc of another address
    walk(vas[1], vas[1] ^ 39'h8000, 1'b0, cyc);
    chk(rf, "foreign VPN_enc");
    // corrupted root
    root_ppn = rootv[63:12] ^ 52'h100_0000_0000;
    walk(vas[2], vas[2], 1'b0, cyc);
    chk(rf && !pf, "root fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
