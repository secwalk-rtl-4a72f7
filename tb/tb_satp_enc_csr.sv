// tb_satp_enc_csr: CSR write / set / clear, read-back of the old value,
// WARL mode field, address decode, codeword flag and reset value. After the
// directed cases, 1000 random accesses (any op, mostly this CSR's address,
// random or encoded data) are compared with a register model: the read
// value in the access cycle and the mode, PPN and codeword flag after it.
module tb_satp_enc_csr;
  import secwalk_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en;
  logic [1:0] op;
  logic [11:0] addr;
  logic [63:0] wdata, rdata;
  logic sv39, pvalid;
  logic [51:0] ppn;
  int checks = 0, failures = 0;

  satp_enc_csr dut (.clk_i(clk), .rst_ni(rst_n), .csr_en_i(en), .csr_op_i(op), .csr_addr_i(addr),
                    .csr_wdata_i(wdata), .csr_rdata_o(rdata), .sv39_o(sv39), .ppn_enc_o(ppn),
                    .ppn_enc_valid_o(pvalid));

  always #5 clk = ~clk;

  task automatic csr(input logic [1:0] o, input logic [11:0] a, input logic [63:0] d);
    @(negedge clk);
    en = 1; op = o; addr = a; wdata = d;
    @(negedge clk);
    en = 0;
  endtask

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] root;
    en = 0; op = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!sv39 && ppn == 0, "reset");
    root = ref_enc(39'h12_3450_0000);
    csr(2'd1, 12'h5c0, {4'h8, 8'h0, root[63:12]});
    chk(sv39 && ppn == root[63:12] && pvalid, "write sv39");
    // read returns the current value
    en = 1; op = 2'd0; addr = 12'h5c0;
    #1 chk(rdata == {4'h8, 8'h0, root[63:12]}, "read");
    en = 0;
    // wrong address ignored
    csr(2'd1, 12'h180, 64'd0);
    chk(sv39 && ppn == root[63:12], "other csr");
    // unsupported mode keeps old mode, PPN still written
    csr(2'd1, 12'h5c0, {4'h9, 8'h0, 52'h5});
    chk(sv39 && ppn == 52'h5 && !pvalid, "warl mode");
    // set and clear
    csr(2'd3, 12'h5c0, 64'h8000_0000_0000_0004);
    chk(!sv39 && ppn == 52'h1, "clear");
    csr(2'd2, 12'h5c0, 64'h8000_0000_0000_0002);
    chk(sv39 && ppn == 52'h3, "set");
    // random accesses against a model
    begin
      logic [3:0]  m_mode;
      logic [51:0] m_ppn;
      logic [63:0] cur, nxt, d, e;
      logic [1:0]  o;
      logic [11:0] a;
      m_mode = 4'h8; m_ppn = 52'h3;
      for (int i = 0; i < 1000; i++) begin
        o = 2'($urandom);
        a = ($urandom_range(7, 0) == 0) ? 12'($urandom) : 12'h5c0;
        e = ref_enc({$urandom, $urandom} [38:0]);
        d = {$urandom, $urandom};
        if ($urandom_range(1, 0) == 1) d[51:0] = e[63:12];
        case ($urandom_range(3, 0))
          0: d[63:60] = 4'h0;
          1: d[63:60] = 4'h8;
          default: ;
        endcase
        cur = {m_mode, 8'h0, m_ppn};
        @(negedge clk);
        en = 1; op = o; addr = a; wdata = d;
        #1 chk(rdata == ((a == 12'h5c0) ? cur : 64'd0), "random read");
        @(negedge clk);
        en = 0;
        if (a == 12'h5c0 && o != 2'd0) begin
          nxt = (o == 2'd1) ? d : (o == 2'd2) ? (cur | d) : (cur & ~d);
          m_ppn = nxt[51:0];
          if (nxt[63:60] == 4'h0 || nxt[63:60] == 4'h8) m_mode = nxt[63:60];
        end
        chk(sv39 == (m_mode == 4'h8) && ppn == m_ppn && pvalid == ref_valid({m_ppn, 12'h000}),
            "random state");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
