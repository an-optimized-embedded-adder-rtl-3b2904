// tb_booth_multiplier: all 65536 pairs of signed 8-bit operands against the
// integer product, including -128 * -128 = 16384.
module tb_booth_multiplier;
  logic [7:0]  x, y;
  logic [15:0] p;
  int checks = 0, failures = 0;

  booth_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x, y} = 16'(v);
      #1;
      checks++;
      if ($signed(p) != 16'(int'($signed(x)) * int'($signed(y)))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", $signed(x), $signed(y), $signed(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
