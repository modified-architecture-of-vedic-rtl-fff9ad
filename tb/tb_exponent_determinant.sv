// tb_exponent_determinant: self-checking test of the Exponent Determinant.
// Checks every 16-bit input exhaustively and 20000 random 17-bit inputs (the
// width used on the radices) against floor(log2(num)) computed with $clog2,
// and 0 for num = 0. Purely combinational: each vector is applied and checked
// after one time unit.
module tb_exponent_determinant;

  logic [15:0] num16;
  logic [3:0]  expo16;
  logic [16:0] num17;
  logic [4:0]  expo17;

  int checks   = 0;
  int failures = 0;

  exponent_determinant #(.W(16)) dut16 (.num(num16), .expo(expo16));
  exponent_determinant #(.W(17)) dut17 (.num(num17), .expo(expo17));

  function automatic int ref_expo(longint unsigned v);
    return (v == 0) ? 0 : $clog2(v + 1) - 1;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      num16 = 16'(i);
      #1;
      checks++;
      if (int'(expo16) != ref_expo(longint'(i))) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 num=%0d expo=%0d expected=%0d", i, expo16, ref_expo(longint'(i)));
      end
    end
    for (int i = 0; i < 20000; i++) begin
      num17 = (i < 17) ? 17'(1) << i : 17'($urandom) >> ($urandom % 17);
      #1;
      checks++;
      if (int'(expo17) != ref_expo(longint'(num17))) begin
        failures++;
        if (failures < 10) $display("FAIL W=17 num=%0d expo=%0d expected=%0d", num17, expo17, ref_expo(longint'(num17)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
