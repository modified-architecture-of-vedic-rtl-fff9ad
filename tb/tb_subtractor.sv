// tb_subtractor: self-checking test of the subtractor at 17 bits (complements)
// and 5 bits (exponent difference), with corner and random operands compared
// with integer subtraction modulo 2^W. Purely combinational, one time unit per vector.
module tb_subtractor;

  logic [16:0] a17, b17, d17;
  logic [4:0]  a5, b5, d5;

  int checks   = 0;
  int failures = 0;

  subtractor #(.W(17)) dut17 (.a(a17), .b(b17), .diff(d17));
  subtractor #(.W(5))  dut5  (.a(a5),  .b(b5),  .diff(d5));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a17 = (i < 4) ? 17'(i * 'h1ffff / 3) : 17'($urandom);
      b17 = (i < 4) ? 17'('h1ffff - i)     : 17'($urandom);
      a5  = 5'(i >> 5);
      b5  = 5'(i);
      #1;
      checks++;
      if (d17 != 17'(int'(a17) - int'(b17))) begin
        failures++;
        if (failures < 10) $display("FAIL W=17 %0d - %0d = %0d", a17, b17, d17);
      end
      checks++;
      if (d5 != 5'(int'(a5) - int'(b5))) begin
        failures++;
        if (failures < 10) $display("FAIL W=5 %0d - %0d = %0d", a5, b5, d5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
