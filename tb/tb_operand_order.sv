// tb_operand_order: self-checking test of the operand comparator and swap.
// For random and equal operand pairs, greater must be the larger, lesser the
// smaller, and swapped set exactly when the second operand is larger.
// Purely combinational, one time unit per vector.
module tb_operand_order;

  logic [15:0] in_a, in_b, greater, lesser;
  logic        swapped;

  int checks   = 0;
  int failures = 0;
  int n_swap   = 0;
  int n_keep   = 0;

  operand_order #(.W(16)) dut (
    .in_a(in_a), .in_b(in_b), .greater(greater), .lesser(lesser), .swapped(swapped)
  );

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      in_a = 16'($urandom);
      in_b = (i % 10 == 0) ? in_a : 16'($urandom);
      #1;
      checks++;
      if (swapped != (in_b > in_a) ||
          greater != ((in_a >= in_b) ? in_a : in_b) ||
          lesser  != ((in_a >= in_b) ? in_b : in_a)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d greater=%0d lesser=%0d swapped=%0d", in_a, in_b, greater, lesser, swapped);
      end
      if (in_b > in_a) n_swap++; else n_keep++;
    end
    if (n_swap == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
