// tb_adder_subtractor: self-checking test of the 33-bit adder/subtractor in
// both modes with corner and random operands, compared with 64-bit integer
// arithmetic truncated to 33 bits. Purely combinational, one time unit per vector.
module tb_adder_subtractor;

  logic [32:0] a, b, y;
  logic        sub;

  int checks   = 0;
  int failures = 0;
  int adds     = 0;
  int subs     = 0;

  adder_subtractor #(.W(33)) dut (.a(a), .b(b), .sub(sub), .y(y));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [32:0] expected;
      a   = (i < 2) ? '1 : 33'({$urandom, $urandom});
      b   = (i < 2) ? 33'(1) : 33'({$urandom, $urandom});
      sub = 1'(i);
      #1;
      expected = sub ? 33'(a - b) : 33'(a + b);
      if (sub) subs++; else adds++;
      checks++;
      if (y != expected) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sub=%0d y=%h expected=%h", a, b, sub, y, expected);
      end
    end
    if (adds == 0 || subs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
