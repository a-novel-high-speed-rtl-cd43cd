// Self-checking test of the 4-2 compressor cell: all 32 input combinations.
// Checks the weight balance i1+i2+i3+i4+cin = x + 2*(y+co), that co does not
// depend on cin, and that co_n is the complement of co.
module tb_compressor42;
  logic i1, i2, i3, i4, cin, x, y, co, co_n;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  compressor42 dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic co_at_cin0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {i1, i2, i3, i4} = 4'(v);
        cin = 1'(c);
        @(posedge clk);
        checks++;
        if (int'(i1) + int'(i2) + int'(i3) + int'(i4) + int'(cin)
            != int'(x) + 2 * (int'(y) + int'(co))) begin
          failures++;
          $display("FAIL sum: in=%b cin=%b -> x=%b y=%b co=%b", 4'(v), cin, x, y, co);
        end
        checks++;
        if (co_n !== ~co) begin
          failures++;
          $display("FAIL co_n");
        end
        if (c == 0) co_at_cin0 = co;
        else begin
          checks++;
          if (co !== co_at_cin0) begin
            failures++;
            $display("FAIL co depends on cin for in=%b", 4'(v));
          end
        end
        // co must be set whenever at least three inputs are 1 (so y and co
        // never both have to carry two)
        checks++;
        if (($countones(4'(v)) >= 3) && !co) begin
          failures++;
          $display("FAIL co low for in=%b", 4'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
