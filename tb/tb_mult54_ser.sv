// End-to-end test of the 54x54 multiplier with the serial recoder
// (RECODE_SERIAL). Every operation runs the return-to-zero protocol:
// spacer (eval low: product 0, done low), then evaluate (eval high: done
// high, product equal to x*y worked out with 108-bit arithmetic).
//
// Operand sets:
//   corner   zeros, all ones, single bits, alternating patterns
//   random   uniformly random 54-bit operands
//   w32/w24  random 32- and 24-bit operands (narrower multiplies run on the
//            54-bit array with zero-extended operands)
//   special  the repeating 32-bit pattern 0x0000B276, 0xFFFF4D89,
//            0xFFFF4D89, 0x0000B276 (16-bit values with 16 sign bits),
//            taken as unsigned operands
// It also counts how often the multiplier operand produced each radix-4
// digit (+0, +X, +2X, -2X, -X and the "-0" group 111 that must be recoded as
// +0) and how often a spacer phase and a completion were seen; it fails if
// any of these never occurred.
module tb_mult54_ser;
  import mult_pkg::*;

  logic [N_BITS-1:0] x, y;
  logic              eval;
  logic [P_BITS-1:0] p;
  logic              done;

  int checks = 0, failures = 0;
  int digit_seen [6];   // +0, +X, +2X, -2X, -X, -0
  int ops = 0;
  int n_spacer = 0, n_done = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mult54 #(.RECODE(RECODE_SERIAL)) dut (.x(x), .y(y), .eval(eval), .p(p), .done(done));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_BITS-1:0] rnd54();
    return {22'($urandom), $urandom};
  endfunction

  // tally the radix-4 groups of the multiplier operand
  task automatic count_digits(logic [N_BITS-1:0] yv);
    logic [2*N_DIGITS:0] ye;
    logic [2:0] grp;
    ye = {{(2*N_DIGITS - N_BITS){1'b0}}, yv, 1'b0};
    for (int i = 0; i < N_DIGITS; i++) begin
      grp = ye[2*i +: 3];
      case (grp)
        3'b000:         digit_seen[0]++;
        3'b001, 3'b010: digit_seen[1]++;
        3'b011:         digit_seen[2]++;
        3'b100:         digit_seen[3]++;
        3'b101, 3'b110: digit_seen[4]++;
        default:        digit_seen[5]++;
      endcase
    end
  endtask

  task automatic run(logic [N_BITS-1:0] xv, logic [N_BITS-1:0] yv, string tag);
    logic [P_BITS-1:0] expect_p;
    x = xv; y = yv; eval = 1'b0;
    @(posedge clk);
    checks++;
    if (done !== 1'b0 || p !== '0) begin
      failures++;
      if (failures < 20) $display("FAIL %s spacer: done=%b p=%h", tag, done, p);
    end else n_spacer++;
    eval = 1'b1;
    @(posedge clk);
    expect_p = P_BITS'(xv) * P_BITS'(yv);
    checks++;
    if (done !== 1'b1 || p !== expect_p) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h * %h = %h, got %h done=%b", tag, xv, yv, expect_p, p, done);
    end
    if (done) n_done++;
    count_digits(yv);
    ops++;
    eval = 1'b0;
  endtask

  initial begin
    logic [31:0] special [4];
    int n_corner, n_rand, n_w32, n_w24, n_special;
    special[0] = 32'h0000_B276;
    special[1] = 32'hFFFF_4D89;
    special[2] = 32'hFFFF_4D89;
    special[3] = 32'h0000_B276;
    foreach (digit_seen[i]) digit_seen[i] = 0;
    eval = 1'b0; x = '0; y = '0;

    // corner cases
    run('0, '0, "corner"); run('1, '1, "corner"); run('1, '0, "corner"); run('0, '1, "corner");
    run('1, 54'd1, "corner"); run(54'd1, '1, "corner");
    for (int i = 0; i < N_BITS; i += 5) begin
      run(54'd1 << i, '1, "corner");
      run('1, 54'd1 << i, "corner");
    end
    run({27{2'b10}}, {27{2'b01}}, "corner");
    run({27{2'b01}}, {27{2'b10}}, "corner");
    run({18{3'b110}}, {18{3'b011}}, "corner");
    n_corner = ops;

    for (int n = 0; n < 3000; n++) run(rnd54(), rnd54(), "random");
    n_rand = ops - n_corner;
    for (int n = 0; n < 1000; n++) run(N_BITS'($urandom), N_BITS'($urandom), "w32");
    n_w32 = ops - n_corner - n_rand;
    for (int n = 0; n < 1000; n++) run(N_BITS'($urandom & 32'hFF_FFFF), N_BITS'($urandom & 32'hFF_FFFF), "w24");
    n_w24 = ops - n_corner - n_rand - n_w32;
    for (int n = 0; n < 400; n++) run(N_BITS'(special[n % 4]), N_BITS'(special[(n + 1) % 4]), "special");
    n_special = ops - n_corner - n_rand - n_w32 - n_w24;

    $display("operations: corner=%0d random=%0d w32=%0d w24=%0d special=%0d",
             n_corner, n_rand, n_w32, n_w24, n_special);
    $display("digits: +0=%0d +X=%0d +2X=%0d -2X=%0d -X=%0d -0(as +0)=%0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4], digit_seen[5]);
    $display("spacer phases=%0d completions=%0d", n_spacer, n_done);
    checks++;
    if (n_spacer == 0 || n_done == 0) begin
      failures++;
      $display("FAIL a protocol phase never occurred");
    end
    foreach (digit_seen[i]) begin
      checks++;
      if (digit_seen[i] == 0) begin
        failures++;
        $display("FAIL digit kind %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
