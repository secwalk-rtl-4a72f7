// tb_res_adder: encoded add/sub against the reference code.
// Valid operands must give the encoded sum/difference with no fault; a flipped
// bit in either operand, a carry out of 39 bits or a borrow must raise fault.
module tb_res_adder;
  import secwalk_ref_pkg::*;
  logic [63:0] a, b, y;
  logic sub, fault;
  int checks = 0, failures = 0;
  int detected = 0;

  res_adder dut (.a_i(a), .b_i(b), .sub_i(sub), .y_o(y), .fault_o(fault));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [37:0] x0, x1;
    for (int i = 0; i < 1000; i++) begin
      x0 = {$urandom, $urandom} [37:0];
      x1 = {$urandom, $urandom} [37:0];
      // addition, no overflow since both are below 2^38
      a = ref_enc(39'(x0)); b = ref_enc(39'(x1)); sub = 1'b0;
      #1;
      checks++;
      if (y !== ref_enc(39'(x0) + 39'(x1)) || fault) begin
        failures++;
        $display("FAIL add %h + %h -> %h f=%b", x0, x1, y, fault);
      end
      // subtraction of the smaller from the larger
      if (x0 >= x1) begin a = ref_enc(39'(x0)); b = ref_enc(39'(x1)); end
      else          begin a = ref_enc(39'(x1)); b = ref_enc(39'(x0)); end
      sub = 1'b1;
      #1;
      checks++;
      if (y !== ref_enc(a[38:0] - b[38:0]) || fault) begin
        failures++;
        $display("FAIL sub %h - %h -> %h f=%b", a, b, y, fault);
      end
      // single bit flip anywhere in operand a must be detected
      a = ref_enc(39'(x0)); b = ref_enc(39'(x1)); sub = i[0];
      a[$urandom_range(63, 0)] ^= 1'b1;
      #1;
      checks++;
      if (!fault) begin
        failures++;
        $display("FAIL missed flip a=%h", a);
      end
      // flip in b
      a = ref_enc(39'(x0)); b = ref_enc(39'(x1));
      b[$urandom_range(63, 0)] ^= 1'b1;
      #1;
      checks++;
      if (!fault) begin
        failures++;
        $display("FAIL missed flip b=%h", b);
      end
    end
    // carry out of the 39-bit space
    a = ref_enc('1); b = ref_enc(39'd1); sub = 1'b0;
    #1; checks++; if (!fault) failures++;
    // borrow
    a = ref_enc(39'd3); b = ref_enc(39'd4); sub = 1'b1;
    #1; checks++; if (!fault) failures++;
    // page offset removal: VPN_enc = VA_enc - Enc(PO) has 12 zero bits
    a = ref_enc(39'h12_3456_7abc); b = ref_enc(39'habc); sub = 1'b1;
    #1; checks++;
    if (y !== ref_enc(39'h12_3456_7000) || fault) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
