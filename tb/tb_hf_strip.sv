// Self-checking test of the H strips: a 21H+1F strip and a 6H strip (no F)
// with random rows and carry-in. The total s_row + c_row (+ cin into the F
// cell) must equal sum + 2*carry, and each cell's sum and carry must be the
// half- or full-adder result of its own column (no carry between cells).
module tb_hf_strip;
  logic [21:0] s1, c1, sum1, carry1;
  logic        cin1;
  logic [5:0]  s2, c2, sum2, carry2;
  logic        cin2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  hf_strip dut1 (.s_row(s1), .c_row(c1), .cin(cin1), .sum(sum1), .carry(carry1));
  hf_strip #(.NH(6), .HAS_F(1'b0)) dut2 (.s_row(s2), .c_row(c2), .cin(cin2), .sum(sum2), .carry(carry2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned l, r;
    int col;
    for (int n = 0; n < 3000; n++) begin
      s1 = 22'($urandom); c1 = 22'($urandom); cin1 = 1'($urandom);
      s2 = 6'($urandom);  c2 = 6'($urandom);  cin2 = 1'($urandom);
      @(posedge clk);
      l = longint'(s1) + longint'(c1) + longint'(cin1);
      r = longint'(sum1) + 2 * longint'(carry1);
      checks++;
      if (l != r) begin
        failures++;
        if (failures < 10) $display("FAIL 21H+1F: %0d != %0d", l, r);
      end
      l = longint'(s2) + longint'(c2);
      r = longint'(sum2) + 2 * longint'(carry2);
      checks++;
      if (l != r) begin
        failures++;
        if (failures < 10) $display("FAIL 6H: %0d != %0d", l, r);
      end
      for (int k = 0; k < 22; k++) begin
        col = int'(s1[k]) + int'(c1[k]) + ((k == 0) ? int'(cin1) : 0);
        checks++;
        if (int'(sum1[k]) + 2 * int'(carry1[k]) != col) begin
          failures++;
          if (failures < 10) $display("FAIL cell %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
