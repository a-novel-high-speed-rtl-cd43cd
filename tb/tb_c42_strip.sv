// Self-checking test of an 8C strip (eight chained 4-2 compressors):
// random rows and carry-in, checks a+b+c+d+cin = s + 2*c + 2^8*cout.
module tb_c42_strip;
  localparam int W = 8;
  logic [W-1:0] a, b, cr, d, s, c;
  logic cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  c42_strip #(.W(W)) dut (.a(a), .b(b), .c_in_row(cr), .d(d), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned lhs, rhs;
    for (int n = 0; n < 5000; n++) begin
      a = W'($urandom); b = W'($urandom); cr = W'($urandom); d = W'($urandom);
      cin = 1'($urandom);
      if (n == 0) begin a = '1; b = '1; cr = '1; d = '1; cin = 1'b1; end
      if (n == 1) begin a = '0; b = '0; cr = '0; d = '0; cin = 1'b0; end
      @(posedge clk);
      lhs = longint'(a) + longint'(b) + longint'(cr) + longint'(d) + longint'(cin);
      rhs = longint'(s) + 2 * longint'(c) + (longint'(cout) << W);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c=%h d=%h cin=%b: %0d != %0d", a, b, cr, d, cin, lhs, rhs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
