// tb_residue_multiplier: self-checking test of the signed 17 x 17 complement
// multiplier. Operands are corners (0, 1, -1, most negative, most positive)
// and random values, including the range the multiplier actually sees
// (-(2^15-1) .. 1); the reference is a 64-bit signed product.
// Purely combinational, one time unit per vector.
module tb_residue_multiplier;

  logic signed [16:0] a, b;
  logic signed [33:0] prod;

  int checks   = 0;
  int failures = 0;

  residue_multiplier #(.W(17)) dut (.a(a), .b(b), .prod(prod));

  localparam int CORNER [5] = '{0, 1, -1, -65536, 65535};

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint expected;
    #1;
    expected = longint'(a) * longint'(b);
    checks++;
    if (longint'(prod) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d expected %0d", a, b, prod, expected);
    end
  endtask

  initial begin
    foreach (CORNER[i]) foreach (CORNER[j]) begin
      a = 17'(CORNER[i]);
      b = 17'(CORNER[j]);
      check();
    end
    for (int i = 0; i < 20000; i++) begin
      if (i % 2 == 0) begin
        a = 17'($urandom);
        b = 17'($urandom);
      end else begin
        a = 17'(1 - int'($urandom % 32768));
        b = 17'(1 - int'($urandom % 32768));
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
