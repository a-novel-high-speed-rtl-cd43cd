// Self-checking test of the Wallace tree: 28 random rows (and all-ones
// rows), each confined to the weights a partial-product row can occupy
// (row i: [2i-2, 2i+56], row 0: [0, 57]), must reduce to a sum and a carry
// row whose total equals the total of the rows modulo 2^108.
module tb_wallace_tree;
  import mult_pkg::*;
  localparam int W = 108;
  logic [N_DIGITS-1:0][W-1:0] rows;
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  wallace_tree dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int k = 0; k < W; k += 32) r[k +: 32] = $urandom;
    return r;
  endfunction

  function automatic logic [W-1:0] row_mask(int i);
    logic [W-1:0] m;
    int lo, hi;
    lo = (i == 0) ? 0 : 2 * i - 2;
    hi = (i == 0) ? 57 : 2 * i + 56;
    m = '0;
    for (int b = lo; b <= hi && b < W; b++) m[b] = 1'b1;
    return m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ref_sum;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N_DIGITS; i++) begin
        rows[i] = rnd();
        if (n == 0) rows[i] = '1;
        if (n == 1) rows[i] = '0;
        if (n % 3 == 2) rows[i] = rows[i] & ({W{1'b1}} >> $urandom_range(W - 1, 0));
        rows[i] = rows[i] & row_mask(i);
      end
      @(posedge clk);
      ref_sum = '0;
      for (int i = 0; i < N_DIGITS; i++) ref_sum += rows[i];
      checks++;
      if (W'(sum + carry) !== ref_sum) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d: %h != %h", n, W'(sum + carry), ref_sum);
      end
      checks++;
      if (carry[0] !== 1'b0) begin
        failures++;
        $display("FAIL carry row bit 0 set");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
