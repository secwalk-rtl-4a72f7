// tb_secure_tlb: fills entries, checks hits return the entry linked with
// the VPN_enc of its address (reference P64), misses, round-robin
// replacement once all entries are used, and flush.
module tb_secure_tlb;
  import secwalk_pkg::*;
  import secwalk_ref_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic flush, hit, fill;
  logic [26:0] lvpn, fvpn;
  logic [63:0] entry, fpte, fkey;
  int checks = 0, failures = 0;

  secure_tlb #(.ENTRIES(N)) dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .lookup_vpn_i(lvpn), .hit_o(hit), .entry_o(entry), .fill_i(fill),
    .fill_vpn_i(fvpn), .fill_pte_i(fpte), .fill_key_i(fkey));

  always #5 clk = ~clk;

  logic [26:0] vpns [N+1];
  logic [63:0] ptes [N+1];

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic do_fill(input int i);
    @(negedge clk);
    fill = 1; fvpn = vpns[i]; fpte = ptes[i]; fkey = ref_enc({vpns[i], 12'h0});
    @(negedge clk);
    fill = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; fill = 0; lvpn = 0; fvpn = 0; fpte = 0; fkey = 0;
    for (int i = 0; i <= N; i++) begin
      vpns[i] = 27'(i * 27'h1234 + 27'h55);
      ptes[i] = {$urandom, $urandom};
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    lvpn = vpns[0];
    #1 chk(!hit, "empty");
    for (int i = 0; i < N; i++) do_fill(i);
    for (int i = 0; i < N; i++) begin
      lvpn = vpns[i];
      #1 chk(hit && entry == ref_link64(ptes[i], ref_enc({vpns[i], 12'h0})), "hit entry linked");
    end
    lvpn = vpns[N];
    #1 chk(!hit, "miss");
    // full: the next fill replaces entry 0 (round robin)
    do_fill(N);
    lvpn = vpns[N];
    #1 chk(hit && entry == ref_link64(ptes[N], ref_enc({vpns[N], 12'h0})), "refill");
    lvpn = vpns[0];
    #1 chk(!hit, "victim evicted");
    lvpn = vpns[1];
    #1 chk(hit, "others kept");
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    for (int i = 1; i <= N; i++) begin
      lvpn = vpns[i];
      #1 chk(!hit, "flushed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
