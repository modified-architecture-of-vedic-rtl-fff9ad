// tb_nikhilam_mult: end-to-end test of the 16 x 16 Nikhilam multiplier at its
// default size (no parameter overrides).
//
// Vectors: the reference simulation's operand pairs (12 x 32647 = 391764,
// 99 x 99, 93 x 92, 98 x 96, 96 x 98, 26971 x 6978, 12 x 3647,
// 3647 x 9565, 3622 x 36) with their printed products, the pencil example
// 89 x 92 = 8188, every pair of corner operands (0, 1, powers of two and
// their neighbours, 65535), and 300000 random pairs, all compared with the
// product computed by the testbench.
//
// The testbench also counts, from the operands, how often each case of the
// datapath was exercised and counts a failure for any case never reached:
// operand swap and no swap, equal radices (no alignment shift) and unequal
// radices, a zero operand (radix 1, complement +1), an operand that is its
// own radix (complement 0), and the largest product.
// Purely combinational: each vector is checked one time unit after it is applied.
module tb_nikhilam_mult;

  logic [15:0] n1, n2;
  logic [32:0] output1;

  int checks   = 0;
  int failures = 0;

  int n_swap, n_noswap, n_same_radix, n_diff_radix, n_zero, n_pow2, n_max;

  nikhilam_mult dut (.n1(n1), .n2(n2), .output1(output1));

  // Operand pairs and products as printed in the reference simulation, plus
  // the pencil example 89 x 92.
  localparam int unsigned     PA [10] = '{12, 99, 93, 98, 96, 26971, 12, 3647, 3622, 89};
  localparam int unsigned     PB [10] = '{32647, 99, 92, 96, 98, 6978, 3647, 9565, 36, 92};
  localparam longint unsigned PP [10] =
    '{391764, 9801, 8556, 9408, 9408, 188203638, 43764, 34883555, 130392, 8188};

  localparam int unsigned CORNER [12] =
    '{0, 1, 2, 3, 255, 256, 257, 16383, 32767, 32768, 32769, 65535};

  function automatic int msb(int unsigned v);
    return (v == 0) ? 0 : $clog2(v + 1) - 1;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned a, input int unsigned b, input longint unsigned expected);
    n1 = 16'(a);
    n2 = 16'(b);
    #1;
    checks++;
    if (longint'(output1) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d = %0d expected %0d", a, b, output1, expected);
    end
    if (b > a) n_swap++; else n_noswap++;
    if (msb(a) == msb(b)) n_same_radix++; else n_diff_radix++;
    if (a == 0 || b == 0) n_zero++;
    if ((a != 0 && (a & (a - 1)) == 0) || (b != 0 && (b & (b - 1)) == 0)) n_pow2++;
    if (a == 65535 && b == 65535) n_max++;
  endtask

  initial begin
    n_swap = 0; n_noswap = 0; n_same_radix = 0; n_diff_radix = 0;
    n_zero = 0; n_pow2 = 0; n_max = 0;

    foreach (PA[i]) begin
      // The printed products are checked as printed, and also recomputed.
      if (longint'(PA[i]) * longint'(PB[i]) != PP[i]) failures++;
      apply(PA[i], PB[i], PP[i]);
    end

    foreach (CORNER[i]) foreach (CORNER[j])
      apply(CORNER[i], CORNER[j], longint'(CORNER[i]) * longint'(CORNER[j]));

    for (int i = 0; i < 300000; i++) begin
      int unsigned a, b;
      // Mix full-range operands with operands of random bit length.
      a = $urandom % 65536;
      b = $urandom % 65536;
      if (i % 2 == 1) begin
        a = a >> ($urandom % 16);
        b = b >> ($urandom % 16);
      end
      apply(a, b, longint'(a) * longint'(b));
    end

    $display("cases: swap=%0d noswap=%0d same_radix=%0d diff_radix=%0d zero=%0d pow2=%0d max=%0d",
             n_swap, n_noswap, n_same_radix, n_diff_radix, n_zero, n_pow2, n_max);
    if (n_swap == 0)       begin failures++; $display("FAIL: operand swap never exercised");        end
    if (n_noswap == 0)     begin failures++; $display("FAIL: unswapped order never exercised");     end
    if (n_same_radix == 0) begin failures++; $display("FAIL: equal radices never exercised");       end
    if (n_diff_radix == 0) begin failures++; $display("FAIL: unequal radices never exercised");     end
    if (n_zero == 0)       begin failures++; $display("FAIL: zero operand never exercised");        end
    if (n_pow2 == 0)       begin failures++; $display("FAIL: power-of-two operand never exercised"); end
    if (n_max == 0)        begin failures++; $display("FAIL: largest product never exercised");     end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
