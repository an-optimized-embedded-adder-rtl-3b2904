// tb_booth_ppg: all 65536 signed operand pairs. The rows, sign-extended,
// weighted by 4^i and completed with their neg bits, must add up to x*y;
// each row is also checked to lie in the range of -2..2 times y.
module tb_booth_ppg;
  import booth_pkg::*;
  logic [7:0] x, y;
  logic [8:0] pp [4];
  logic [3:0] neg;
  int checks = 0, failures = 0;

  booth_ppg dut (.x(x), .y(y), .pp(pp), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int acc;
      {x, y} = 16'(v);
      #1;
      acc = 0;
      for (int i = 0; i < 4; i++)
        acc += (int'($signed(pp[i])) + int'(neg[i])) * (4 ** i);
      checks++;
      if (acc != int'($signed(x)) * int'($signed(y))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d sum=%0d", $signed(x), $signed(y), acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
