// tb_lshifter: self-checking test of the logical left shifter at the three
// sizes the multiplier uses (17 bits by a 4-bit amount, 33 bits by a 5-bit
// amount) with every shift amount and random data, compared with the <<
// operator. Purely combinational, one time unit per vector.
module tb_lshifter;

  logic [16:0] d17, q17;
  logic [3:0]  s4;
  logic [32:0] d33, q33;
  logic [4:0]  s5;

  int checks   = 0;
  int failures = 0;

  lshifter #(.W(17), .SW(4)) dut17 (.din(d17), .shamt(s4), .dout(q17));
  lshifter #(.W(33), .SW(5)) dut33 (.din(d33), .shamt(s5), .dout(q33));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      d17 = 17'($urandom);
      s4  = 4'(i);
      d33 = {$urandom, $urandom} & 64'h1_ffff_ffff;
      s5  = 5'(i);
      #1;
      checks++;
      if (q17 != 17'(d17 << s4)) begin
        failures++;
        if (failures < 10) $display("FAIL W=17 d=%h s=%0d q=%h", d17, s4, q17);
      end
      checks++;
      if (q33 != 33'(d33 << s5)) begin
        failures++;
        if (failures < 10) $display("FAIL W=33 d=%h s=%0d q=%h", d33, s5, q33);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
