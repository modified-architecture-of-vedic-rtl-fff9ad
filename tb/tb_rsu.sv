// tb_rsu: self-checking test of the Radix Selection Unit. For every 16-bit
// operand the radix must be the largest power of two not above it
// (radix <= num < 2*radix, radix a power of two), and 1 for num = 0.
// Purely combinational, one time unit per vector.
module tb_rsu;

  logic [15:0] num;
  logic [16:0] radix;

  int checks   = 0;
  int failures = 0;

  rsu #(.W(16)) dut (.num(num), .radix(radix));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      longint unsigned exp_radix;
      num = 16'(i);
      exp_radix = (i == 0) ? 1 : (64'd1 << ($clog2(i + 1) - 1));
      #1;
      checks++;
      if (longint'(radix) != exp_radix || (i != 0 && !(radix <= 17'(i) && 17'(i) < 2 * radix))) begin
        failures++;
        if (failures < 10) $display("FAIL num=%0d radix=%0d expected=%0d", i, radix, exp_radix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
